// cornerturner: DDR based corner turner of the station beamformer. The tile
// beam arrives as frames holding one time sample of all IN_FRAME_LEN
// channels. The corner turner stores a whole integration block in external
// memory and returns it as TPM frames: TPM_FRAME_LEN contiguous time samples
// of TPM_NOF_CHANS channels, DDR_TMF samples per 512-bit beat. Two blocks are
// kept, one being written while the other is read.
//
// Parts (as in the corner turner's structure): input_cornerturner regroups
// NOF_FRAMES input frames into memory frames; write_address places them;
// cornerturner_control tracks the two halves and produces the frame order (or
// follows the previous tile's frame IDs); read_address expands a frame ID
// into read bursts; ddr_mem shares the memory port and frames the output.
//
// Controls (as in the entity): int_block_len (TPM frames per channel group in
// a block, minus 1), first_tile, inner_chan_loop, max_out_chan (last channel
// group sent) and the cascade ports casc_frame_stb/casc_frame_id/
// casc_frame_rdy; casc_frame_out_id is the ID of the frame on data_out.
// csp_frame_size is used by the formatter, not here.
// Deviations from the entity: one clock (dsp_clk) for everything, where the
// original has a separate ddr_clk domain; the DDR PHY pins are replaced by a
// memory-controller user port (app_*); int_block_len is counted per channel
// group. Parameter defaults are the entity's generics.
module cornerturner
  import ska_pkg::*;
#(
  parameter int unsigned DDR_WORD_SIZE = 64,
  parameter int unsigned DDR_TMF       = 8,
  parameter int unsigned ADDR_W        = 29,
  parameter int unsigned ROW_W         = 14,
  parameter int unsigned COL_W         = 10,
  parameter int unsigned BANK_W        = 3,
  parameter int unsigned BURST_LEN     = 64,
  parameter int unsigned DATA_W        = 48,
  parameter int unsigned IN_FRAME_LEN  = 192,
  parameter int unsigned NOF_FRAMES    = 8,
  parameter int unsigned TPM_NOF_CHANS = 4,
  parameter int unsigned TPM_FRAME_LEN = 256
) (
  input  logic                              dsp_clk,
  input  logic                              dsp_rst,
  // control
  input  logic [11:0]                       int_block_len,
  input  logic                              first_tile,
  input  logic [1:0]                        inner_chan_loop,
  input  logic [7:0]                        max_out_chan,
  // cascade
  input  logic                              casc_frame_stb,
  input  frame_id_t                         casc_frame_id,
  output frame_id_t                         casc_frame_out_id,
  output logic                              casc_frame_rdy,
  // input frames
  input  logic [DATA_W-1:0]                 data_in,
  input  logic                              sop_in,
  input  logic                              eop_in,
  input  logic                              dav_in,
  output logic                              rdy_in,
  // output frames
  output logic [DDR_WORD_SIZE*DDR_TMF-1:0]  data_out,
  output logic                              sop_out,
  output logic                              eop_out,
  output logic                              dav_out,
  input  logic                              rdy_out,
  // memory controller user port
  output logic                              app_en,
  output logic                              app_we,
  output logic [ADDR_W-1:0]                 app_addr,
  output logic [DDR_WORD_SIZE*DDR_TMF-1:0]  app_wdata,
  input  logic                              app_rdy,
  input  logic                              app_rd_valid,
  input  logic [DDR_WORD_SIZE*DDR_TMF-1:0]  app_rd_data,
  // status
  output logic                              lost,
  output logic                              frame_done
);
  localparam int unsigned BEAT_BITS = DDR_WORD_SIZE * DDR_TMF;
  localparam int unsigned NG        = IN_FRAME_LEN / TPM_NOF_CHANS;
  localparam int unsigned WR_BEATS  = NOF_FRAMES * TPM_NOF_CHANS / DDR_TMF;
  localparam int unsigned RD_BEATS  = BURST_LEN / DDR_TMF;

  // the address fields must cover the memory
  initial begin
    assert (ROW_W + COL_W + BANK_W <= ADDR_W)
      else $error("row/column/bank fields exceed the address width");
    assert (DATA_W <= DDR_WORD_SIZE)
      else $error("a sample must fit in one memory word");
  end

  // input corner turner -> write path
  logic                  ic_valid, ic_ready;
  logic [BEAT_BITS-1:0]  ic_data;
  logic [$clog2(NG)-1:0] ic_group;
  logic [$clog2(WR_BEATS+1)-1:0] ic_beat;
  logic                  wr_allow, wr_ready;

  input_cornerturner #(.DATA_W(DATA_W), .DDR_WORD_W(DDR_WORD_SIZE), .DDR_TMF(DDR_TMF),
    .IN_FRAME_LEN(IN_FRAME_LEN), .NOF_FRAMES(NOF_FRAMES), .TPM_NOF_CHANS(TPM_NOF_CHANS)) i_input_ct (
    .clk(dsp_clk), .rst(dsp_rst), .data_in, .sop_in, .eop_in, .dav_in, .rdy_in, .lost,
    .out_valid(ic_valid), .out_ready(ic_ready), .out_data(ic_data),
    .out_group(ic_group), .out_beat(ic_beat));

  assign ic_ready = wr_ready && wr_allow;

  logic [ADDR_W-1:0] addr_wr, buf_words, group_words;
  logic              block_done;
  logic [23:0]       block_num;
  logic [1:0]        buf_free;

  write_address #(.ADDR_W(ADDR_W), .DDR_TMF(DDR_TMF), .IN_FRAME_LEN(IN_FRAME_LEN),
    .NOF_FRAMES(NOF_FRAMES), .TPM_NOF_CHANS(TPM_NOF_CHANS), .TPM_FRAME_LEN(TPM_FRAME_LEN)) i_wr_addr (
    .clk(dsp_clk), .rst(dsp_rst), .int_block_len, .buf_free, .wr_allow,
    .addr_valid(ic_valid && ic_ready), .addr_in_group(ic_group), .addr_in_beat(ic_beat),
    .addr_wr_out(addr_wr), .block_done, .block_num, .buf_words, .group_words);

  // control and sequencing
  logic      req_valid, req_ready, frame_issued;
  frame_id_t req_id;

  cornerturner_control i_control_ct (
    .clk(dsp_clk), .rst(dsp_rst), .first_tile, .int_block_len, .inner_chan_loop, .max_out_chan,
    .block_done, .block_num, .buf_free, .casc_frame_stb, .casc_frame_id, .casc_frame_rdy,
    .req_valid, .req_ready, .req_id, .frame_issued);

  // read path
  logic              rc_valid, rc_ready, rc_sop, rc_eop, rc_burst;
  logic [ADDR_W-1:0] addr_rd;
  frame_id_t         rc_id;

  read_address #(.ADDR_W(ADDR_W), .DDR_TMF(DDR_TMF), .BURST_LEN(BURST_LEN),
    .TPM_NOF_CHANS(TPM_NOF_CHANS), .TPM_FRAME_LEN(TPM_FRAME_LEN)) i_rd_addr (
    .clk(dsp_clk), .rst(dsp_rst), .buf_words, .group_words,
    .req_valid, .req_ready, .req_id,
    .cmd_valid(rc_valid), .cmd_ready(rc_ready), .addr_rd_out(addr_rd), .cmd_sop(rc_sop),
    .cmd_eop(rc_eop), .cmd_burst_start(rc_burst), .cmd_id(rc_id), .frame_issued);

  ddr_mem #(.ADDR_W(ADDR_W), .BEAT_BITS(BEAT_BITS), .WR_BEATS(WR_BEATS), .RD_BEATS(RD_BEATS)) i_ddr_mem (
    .clk(dsp_clk), .rst(dsp_rst),
    .wr_valid(ic_valid && wr_allow), .wr_ready, .addr_wr_in(addr_wr), .frame_in(ic_data),
    .rd_valid(rc_valid), .rd_ready(rc_ready), .addr_rd_in(addr_rd), .rd_sop(rc_sop), .rd_eop(rc_eop),
    .rd_burst_start(rc_burst), .rd_id(rc_id),
    .app_en, .app_we, .app_addr, .app_wdata, .app_rdy, .app_rd_valid, .app_rd_data,
    .data_out, .sop_out, .eop_out, .dav_out, .rdy_out, .frame_out_id(casc_frame_out_id), .frame_done);
endmodule
