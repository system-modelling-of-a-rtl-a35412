// station_beamformer: the Station Beamformer of one TPM FPGA. The tile beam
// (beam in) is corner-turned through external memory (corner turner), added
// to the partial station beam arriving from the previous tile (core, the
// station beamformer adder), and formatted either as a partial beam for the
// next tile or, on the last tile of the chain, as station-beam (CSP) frames
// (fmt). Its controls come from an AXI4-Lite register interface (if).
// spead_in/spead_out are the packet streams to and from the 10/40G
// interface; ddr is the memory controller user port.
// Structure and connections (beam in, frame out -> tile frame, frame ID back,
// spead_in, spead_out, ctl, ddr) follow the document's internal block
// diagram; parameter defaults are the corner turner's generics.
module station_beamformer
  import ska_pkg::*;
#(
  parameter int unsigned ADDR_W        = 29,
  parameter int unsigned BURST_LEN     = 64,
  parameter int unsigned IN_FRAME_LEN  = 192,
  parameter int unsigned NOF_FRAMES    = 8,
  parameter int unsigned TPM_NOF_CHANS = 4,
  parameter int unsigned TPM_FRAME_LEN = 256,
  parameter int unsigned N_CSP         = 4,
  parameter int unsigned CSP_FIFO_BEATS = 1024
) (
  input  logic               clk,
  input  logic               rst,
  input  axil_req_t          ctl_req,
  output axil_rsp_t          ctl_rsp,
  // tile beam in
  input  logic [47:0]        beam_data,
  input  logic               beam_sop,
  input  logic               beam_eop,
  input  logic               beam_valid,
  output logic               beam_ready,
  // partial beam from the previous tile
  input  beat_t              spead_in,
  input  logic               spead_in_valid,
  output logic               spead_in_ready,
  // packets out
  output beat_t              spead_out,
  output logic               spead_out_valid,
  input  logic               spead_out_ready,
  // memory controller user port
  output logic               app_en,
  output logic               app_we,
  output logic [ADDR_W-1:0]  app_addr,
  output logic [BEAT_W-1:0]  app_wdata,
  input  logic               app_rdy,
  input  logic               app_rd_valid,
  input  logic [BEAT_W-1:0]  app_rd_data,
  // events
  output logic               frame_done,
  output logic               csp_sent,
  output logic               partial_sent,
  output logic               lost
);
  sb_ctl_t   ctl;
  logic      hdr_error;

  sb_axi4_if u_if (.clk, .rst, .ctl_req, .ctl_rsp,
    .status({5'd0, hdr_error, lost, 1'b0}), .decoded_ctl(ctl));

  // corner turner
  logic              t_valid, t_ready, t_sop, t_eop, casc_stb, casc_rdy;
  logic [BEAT_W-1:0] t_data;
  frame_id_t         t_id, casc_id;

  cornerturner #(.ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN), .IN_FRAME_LEN(IN_FRAME_LEN),
    .NOF_FRAMES(NOF_FRAMES), .TPM_NOF_CHANS(TPM_NOF_CHANS), .TPM_FRAME_LEN(TPM_FRAME_LEN)) u_corner_turner (
    .dsp_clk(clk), .dsp_rst(rst),
    .int_block_len(ctl.int_block_len), .first_tile(ctl.first_tile),
    .inner_chan_loop(ctl.inner_chan_loop), .max_out_chan(ctl.max_out_chan),
    .casc_frame_stb(casc_stb), .casc_frame_id(casc_id), .casc_frame_out_id(t_id),
    .casc_frame_rdy(casc_rdy),
    .data_in(beam_data), .sop_in(beam_sop), .eop_in(beam_eop), .dav_in(beam_valid), .rdy_in(beam_ready),
    .data_out(t_data), .sop_out(t_sop), .eop_out(t_eop), .dav_out(t_valid), .rdy_out(t_ready),
    .app_en, .app_we, .app_addr, .app_wdata, .app_rdy, .app_rd_valid, .app_rd_data,
    .lost, .frame_done);

  // station beamformer adder
  beat_t     s_beat;
  logic      s_valid, s_ready;
  frame_id_t s_id;

  sb_adder u_core (
    .clk, .rst, .first_tile(ctl.first_tile),
    .tile_beat('{sop: t_sop, eop: t_eop, data: t_data}), .tile_valid(t_valid), .tile_ready(t_ready),
    .tile_id(t_id),
    .casc_frame_stb(casc_stb), .casc_frame_id(casc_id), .casc_frame_rdy(casc_rdy),
    .spead_in, .spead_in_valid, .spead_in_ready,
    .out_beat(s_beat), .out_valid(s_valid), .out_ready(s_ready), .out_id(s_id), .hdr_error);

  // formatter
  sb_formatter #(.N_CSP(N_CSP), .CSP_FIFO_BEATS(CSP_FIFO_BEATS),
    .FRAME_BEATS(TPM_FRAME_LEN * TPM_NOF_CHANS / 8), .TPM_NOF_CHANS(TPM_NOF_CHANS)) u_fmt (
    .clk, .rst, .last_tile(ctl.last_tile), .csp_frame_size(ctl.csp_frame_size),
    .inner_chan_loop(ctl.inner_chan_loop), .tile_id(ctl.tile_id),
    .in_beat(s_beat), .in_valid(s_valid), .in_ready(s_ready), .in_id(s_id),
    .spead_out, .spead_out_valid, .spead_out_ready, .csp_sent, .partial_sent);
endmodule
