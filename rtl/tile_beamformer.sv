// tile_beamformer: the Tile beamformer of one TPM FPGA ("Form Tile Beam").
// It takes the channelised samples of the FPGA's N_ANT antennas (station in),
// selects the channel regions to be beamformed (region_selector), weights
// every antenna sample by taper * exp(i tau f) (freq_beamformer) and sums the
// antennas of each channel, adding the partial beam of the other FPGA over the
// FPGA interchange (beam_adder). The result is the tile beam: one 48-bit beam
// sample per selected channel and time sample, channels in region order,
// with beam_sop/beam_eop marking a time sample's first and last channel.
// The tables and flags are written through the AXI4-Lite ctl port
// (tile_bf_control).
//
// Timing: a time sample of N_CHAN_IN*N_ANT input words is buffered, then read
// out; the beam of the selected channels follows after the buffer read, the
// beamformer latency (CORDIC_N + 6 cycles) and the adder (about 4 cycles).
// The structure (region selector, beamformer, beam adder, control) follows the
// document; the data formats are this design's.
module tile_beamformer
  import ska_pkg::*;
#(
  parameter int unsigned N_CHAN_IN = 512,
  parameter int unsigned N_ANT     = 8,
  parameter int unsigned N_REGIONS = 8,
  parameter int unsigned CORDIC_N  = 14,
  parameter int unsigned SUM_W     = PROD_W + $clog2(N_ANT) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  axil_req_t            ctl_req,
  output axil_rsp_t            ctl_rsp,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  ant_sample_t          in_sample,
  output logic                 f2f_out_valid,
  output logic [4*SUM_W-1:0]   f2f_out_data,
  input  logic                 f2f_in_valid,
  input  logic [4*SUM_W-1:0]   f2f_in_data,
  output logic                 beam_valid,
  output logic                 beam_sop,
  output logic                 beam_eop,
  output beam_sample_t         beam_sample,
  output logic                 overrun,
  output logic                 ovf
);
  localparam int unsigned FREQ_W = $clog2(N_CHAN_IN);
  localparam int unsigned AW     = $clog2(N_ANT);
  localparam int unsigned RW     = $clog2(N_REGIONS);
  localparam int unsigned TAG_W  = AW + 2;

  // control
  logic [RW:0]           n_regions;
  logic                  combine, rstart_we, rlen_we, delay_we, taper_we;
  logic [RW-1:0]         region_waddr;
  logic [FREQ_W-1:0]     rstart_wdata;
  logic [FREQ_W:0]       rlen_wdata;
  logic [$clog2(N_REGIONS*N_ANT)-1:0] ant_waddr;
  logic [15:0]           ant_wdata;

  tile_bf_control #(.N_REGIONS(N_REGIONS), .N_ANT(N_ANT), .FREQ_W(FREQ_W)) u_control (
    .clk, .rst, .ctl_req, .ctl_rsp, .n_regions, .combine,
    .rstart_we, .rlen_we, .region_waddr, .rstart_wdata, .rlen_wdata,
    .delay_we, .taper_we, .ant_waddr, .ant_wdata);

  // region selector
  logic              rs_valid, rs_sop, rs_eop;
  ant_sample_t       rs_sample;
  logic [RW-1:0]     rs_region;
  logic [AW-1:0]     rs_ant;
  logic [FREQ_W-1:0] rs_freq;

  region_selector #(.N_CHAN_IN(N_CHAN_IN), .N_ANT(N_ANT), .N_REGIONS(N_REGIONS)) u_region_selector (
    .clk, .rst, .in_valid, .in_sop, .in_sample, .n_regions,
    .rstart_we, .rstart_waddr(region_waddr), .rstart_wdata,
    .rlen_we, .rlen_waddr(region_waddr), .rlen_wdata,
    .out_valid(rs_valid), .out_sop(rs_sop), .out_eop(rs_eop), .out_sample(rs_sample),
    .out_region(rs_region), .out_ant(rs_ant), .out_freq(rs_freq), .overrun);

  // frequency domain beamformer
  logic             bf_valid;
  wsample_t         bf_sample;
  logic [TAG_W-1:0] bf_tag;

  freq_beamformer #(.N_REGIONS(N_REGIONS), .N_ANT(N_ANT), .FREQ_W(FREQ_W), .TAG_W(TAG_W),
                    .CORDIC_N(CORDIC_N)) u_beamformer (
    .clk, .rst, .in_valid(rs_valid), .in_sample(rs_sample), .in_region(rs_region),
    .in_ant(rs_ant), .in_freq(rs_freq), .in_tag({rs_sop, rs_eop, rs_ant}),
    .delay_we, .delay_waddr(ant_waddr), .delay_wdata(ant_wdata),
    .taper_we, .taper_waddr(ant_waddr), .taper_wdata(ant_wdata),
    .out_valid(bf_valid), .out_sample(bf_sample), .out_tag(bf_tag));

  // beam adder
  beam_adder #(.N_ANT(N_ANT), .SUM_W(SUM_W)) u_beam_adder (
    .clk, .rst, .combine, .in_valid(bf_valid), .in_sample(bf_sample),
    .in_ant(bf_tag[AW-1:0]), .in_sop(bf_tag[AW+1]), .in_eop(bf_tag[AW]),
    .f2f_out_valid, .f2f_out_data, .f2f_in_valid, .f2f_in_data,
    .out_valid(beam_valid), .out_sample(beam_sample), .out_sop(beam_sop), .out_eop(beam_eop), .ovf);
endmodule
