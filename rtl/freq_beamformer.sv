// freq_beamformer: the Frequency domain beamformer ("Correct Geometric
// Delay"). Each incoming word is one antenna's sample of one frequency
// channel, tagged with its region index, channel number and a user tag
// (antenna index and frame markers). The block asks coef_gen for
// taper * exp(i tau f) for that antenna, region and channel, delays the
// sample by the coefficient latency and multiplies the two in complex_mult.
//
// Interface: in_valid/in_sample/in_region/in_ant/in_freq/in_tag each cycle, no
// back-pressure; out_valid/out_sample/out_tag follow LATENCY = CORDIC_N + 6
// cycles later. The table write ports are passed to coef_gen. The block, its
// inputs (BF chans, region idx, frequency, table data) and its function follow
// the document; the pipeline is this design's.
module freq_beamformer
  import ska_pkg::*;
#(
  parameter int unsigned N_REGIONS = 8,
  parameter int unsigned N_ANT     = 8,
  parameter int unsigned FREQ_W    = 9,
  parameter int unsigned TAG_W     = 8,
  parameter int unsigned CORDIC_N  = 14
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               in_valid,
  input  ant_sample_t                        in_sample,
  input  logic [$clog2(N_REGIONS)-1:0]       in_region,
  input  logic [$clog2(N_ANT)-1:0]           in_ant,
  input  logic [FREQ_W-1:0]                  in_freq,
  input  logic [TAG_W-1:0]                   in_tag,
  input  logic                               delay_we,
  input  logic [$clog2(N_REGIONS*N_ANT)-1:0] delay_waddr,
  input  logic [PHASE_W-1:0]                 delay_wdata,
  input  logic                               taper_we,
  input  logic [$clog2(N_REGIONS*N_ANT)-1:0] taper_waddr,
  input  logic [COEF_W-1:0]                  taper_wdata,
  output logic                               out_valid,
  output wsample_t                           out_sample,
  output logic [TAG_W-1:0]                   out_tag
);
  localparam int unsigned CLAT = CORDIC_N + 4;   // coef_gen latency

  logic  c_valid;
  coef_t c_coef;

  coef_gen #(.N_REGIONS(N_REGIONS), .N_ANT(N_ANT), .FREQ_W(FREQ_W), .CORDIC_N(CORDIC_N)) u_coef (
    .clk, .rst, .in_valid, .in_region, .in_ant, .in_freq,
    .delay_we, .delay_waddr, .delay_wdata, .taper_we, .taper_waddr, .taper_wdata,
    .out_valid(c_valid), .out_coef(c_coef));

  // delay line for sample and tag, matching the coefficient latency
  ant_sample_t       sdl [CLAT];
  logic [TAG_W-1:0]  tdl [CLAT];
  always_ff @(posedge clk) begin
    sdl[0] <= in_sample;
    tdl[0] <= in_tag;
    for (int i = 1; i < CLAT; i++) begin
      sdl[i] <= sdl[i-1];
      tdl[i] <= tdl[i-1];
    end
  end

  complex_mult #(.TAG_W(TAG_W)) u_cmul (
    .clk, .rst, .in_valid(c_valid), .in_x(sdl[CLAT-1]), .in_c(c_coef), .in_tag(tdl[CLAT-1]),
    .out_valid, .out_y(out_sample), .out_tag);
endmodule
