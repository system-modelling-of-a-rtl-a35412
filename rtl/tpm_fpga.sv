// tpm_fpga: the beamforming signal chain of one FPGA of a Tile Processing
// Module (TPM). A TPM serves a tile of 16 antennas with two FPGAs, each
// taking 8 dual-polarisation antennas; 16 tiles make an LFAA station.
//
// Data flow: channelised antenna samples (from the channeliser, outside this
// module) -> tile beamformer (region selection, geometric delay correction,
// antenna sum, sum with the other FPGA's half over fpga2fpga) -> station
// beamformer (corner turner through external DDR, addition of the partial
// station beam from the previous tile, formatting as partial beam or as
// station-beam CSP frames) -> packet stream to the 10/40G interface (outside).
// All controls are registers behind one AXI4-Lite port (the AXI4 control's
// interconnect): 0x0000-0x3FFF tile beamformer, 0x4000-0x7FFF station
// beamformer.
// The JESD interface, test signal generator, channeliser, diagnostics,
// Ethernet MAC and chip-to-chip link of the firmware are not included; their
// connections are this module's ports. Parameter defaults are the document's
// numbers where it gives them (8 antennas per FPGA, corner turner generics)
// and this design's choice otherwise. The tile beamformer runs at the
// channeliser's rate and cannot be held, so the corner turner's ready is not
// fed back; a sample it cannot take is flagged on beam_lost.
module tpm_fpga
  import ska_pkg::*;
#(
  parameter int unsigned N_CHAN_IN      = 512,
  parameter int unsigned N_ANT          = 8,
  parameter int unsigned N_REGIONS      = 8,
  parameter int unsigned ADDR_W         = 29,
  parameter int unsigned BURST_LEN      = 64,
  parameter int unsigned IN_FRAME_LEN   = 192,
  parameter int unsigned NOF_FRAMES     = 8,
  parameter int unsigned TPM_NOF_CHANS  = 4,
  parameter int unsigned TPM_FRAME_LEN  = 256,
  parameter int unsigned N_CSP          = 4,
  parameter int unsigned CSP_FIFO_BEATS = 1024,
  parameter int unsigned SUM_W          = PROD_W + $clog2(N_ANT) + 1
) (
  input  logic               clk,
  input  logic               rst,
  // AXI4-Lite control
  input  axil_req_t          ctl_req,
  output axil_rsp_t          ctl_rsp,
  // channelised samples
  input  logic               chan_valid,
  input  logic               chan_sop,
  input  ant_sample_t        chan_sample,
  // FPGA interchange
  output logic               f2f_out_valid,
  output logic [4*SUM_W-1:0] f2f_out_data,
  input  logic               f2f_in_valid,
  input  logic [4*SUM_W-1:0] f2f_in_data,
  // 10/40G packet streams
  input  beat_t              spead_in,
  input  logic               spead_in_valid,
  output logic               spead_in_ready,
  output beat_t              spead_out,
  output logic               spead_out_valid,
  input  logic               spead_out_ready,
  // DDR memory controller user port
  output logic               app_en,
  output logic               app_we,
  output logic [ADDR_W-1:0]  app_addr,
  output logic [BEAT_W-1:0]  app_wdata,
  input  logic               app_rdy,
  input  logic               app_rd_valid,
  input  logic [BEAT_W-1:0]  app_rd_data,
  // status and events
  output logic               region_overrun,
  output logic               f2f_overflow,
  output logic               beam_lost,
  output logic               frame_done,
  output logic               csp_sent,
  output logic               partial_sent
);
  axil_req_t s_req [2];
  axil_rsp_t s_rsp [2];

  axi4_interconnect #(.N_SLAVES(2)) u_interconnect (.clk, .rst, .m_req(ctl_req), .m_rsp(ctl_rsp),
    .s_req, .s_rsp);

  logic         b_valid, b_sop, b_eop, b_ready;
  beam_sample_t b_sample;

  tile_beamformer #(.N_CHAN_IN(N_CHAN_IN), .N_ANT(N_ANT), .N_REGIONS(N_REGIONS), .SUM_W(SUM_W)) u_tile_beamformer (
    .clk, .rst, .ctl_req(s_req[0]), .ctl_rsp(s_rsp[0]),
    .in_valid(chan_valid), .in_sop(chan_sop), .in_sample(chan_sample),
    .f2f_out_valid, .f2f_out_data, .f2f_in_valid, .f2f_in_data,
    .beam_valid(b_valid), .beam_sop(b_sop), .beam_eop(b_eop), .beam_sample(b_sample),
    .overrun(region_overrun), .ovf(f2f_overflow));

  station_beamformer #(.ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN), .IN_FRAME_LEN(IN_FRAME_LEN),
    .NOF_FRAMES(NOF_FRAMES), .TPM_NOF_CHANS(TPM_NOF_CHANS), .TPM_FRAME_LEN(TPM_FRAME_LEN),
    .N_CSP(N_CSP), .CSP_FIFO_BEATS(CSP_FIFO_BEATS)) u_station_beamformer (
    .clk, .rst, .ctl_req(s_req[1]), .ctl_rsp(s_rsp[1]),
    .beam_data(b_sample), .beam_sop(b_sop), .beam_eop(b_eop), .beam_valid(b_valid), .beam_ready(b_ready),
    .spead_in, .spead_in_valid, .spead_in_ready, .spead_out, .spead_out_valid, .spead_out_ready,
    .app_en, .app_we, .app_addr, .app_wdata, .app_rdy, .app_rd_valid, .app_rd_data,
    .frame_done, .csp_sent, .partial_sent, .lost(beam_lost));
endmodule
