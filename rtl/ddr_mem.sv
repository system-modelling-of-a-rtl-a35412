// ddr_mem: the corner turner's DDR interface (i_ddr_mem). It shares the
// memory controller's user port between the write path (memory frames from
// the input corner turner) and the read path (TPM frames for the station
// adder), and turns returning read data into an output frame stream.
//
// Memory port: one command per cycle (app_en, app_we, app_addr, app_wdata),
// accepted when app_rdy is high; each command moves DDR_TMF words (one
// 512-bit beat). Read data returns in order on app_rd_valid/app_rd_data after
// any latency. The controller and PHY behind this port are external.
//
// Arbitration is by whole transfers: a memory frame of writes (NOF_FRAMES x
// TPM_NOF_CHANS words) or a read burst of BURST_LEN words is never split, and
// writes win when both wait, so the input never backs up behind reads. A read
// burst starts only if the output queue has room for all the data already
// requested plus the burst, so returning data is never refused.
// The output (data_out, sop_out, eop_out, dav_out, rdy_out, frame_out_id)
// follows the corner turner entity; frame_done pulses when the last beat of a
// frame leaves. The queue depth and arbitration are this design's choice.
module ddr_mem
  import ska_pkg::*;
#(
  parameter int unsigned ADDR_W      = 29,
  parameter int unsigned BEAT_BITS   = 512,
  parameter int unsigned WR_BEATS    = 4,     // beats per memory frame
  parameter int unsigned RD_BEATS    = 8,     // beats per read burst
  parameter int unsigned OUTQ        = 64     // output queue depth in beats
) (
  input  logic                  clk,
  input  logic                  rst,
  // write path
  input  logic                  wr_valid,
  output logic                  wr_ready,
  input  logic [ADDR_W-1:0]     addr_wr_in,
  input  logic [BEAT_BITS-1:0]  frame_in,
  // read commands
  input  logic                  rd_valid,
  output logic                  rd_ready,
  input  logic [ADDR_W-1:0]     addr_rd_in,
  input  logic                  rd_sop,
  input  logic                  rd_eop,
  input  logic                  rd_burst_start,
  input  frame_id_t             rd_id,
  // memory controller user port
  output logic                  app_en,
  output logic                  app_we,
  output logic [ADDR_W-1:0]     app_addr,
  output logic [BEAT_BITS-1:0]  app_wdata,
  input  logic                  app_rdy,
  input  logic                  app_rd_valid,
  input  logic [BEAT_BITS-1:0]  app_rd_data,
  // output frames
  output logic [BEAT_BITS-1:0]  data_out,
  output logic                  sop_out,
  output logic                  eop_out,
  output logic                  dav_out,
  input  logic                  rdy_out,
  output frame_id_t             frame_out_id,
  output logic                  frame_done
);
  typedef enum logic [1:0] {A_IDLE, A_WRITE, A_READ} arb_t;
  arb_t state;
  logic [$clog2(WR_BEATS+RD_BEATS+1)-1:0] left;

  localparam int unsigned QW = $clog2(OUTQ);

  // tags of requested beats, in order: {sop, eop, id}
  logic [49:0] tag_dout;
  logic        tag_empty, tag_full;
  logic [QW:0] tag_cnt;
  logic [BEAT_BITS-1:0] dq_dout;
  logic        dq_empty, dq_full;
  logic [QW:0] dq_cnt;

  wire room     = (int'(tag_cnt) + int'(RD_BEATS)) <= int'(OUTQ);
  wire start_wr = wr_valid;
  wire start_rd = !wr_valid && rd_valid && rd_burst_start && room;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE; left <= '0;
    end else begin
      unique case (state)
        A_IDLE: begin
          if (start_wr) begin
            state <= A_WRITE; left <= ($bits(left))'(WR_BEATS);
          end else if (start_rd) begin
            state <= A_READ;  left <= ($bits(left))'(RD_BEATS);
          end
        end
        A_WRITE: if (app_en && app_rdy) begin
          if (left == 1) state <= A_IDLE;
          left <= left - 1'b1;
        end
        A_READ: if (app_en && app_rdy) begin
          if (left == 1) state <= A_IDLE;
          left <= left - 1'b1;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    app_en = 1'b0; app_we = 1'b0; app_addr = '0; app_wdata = frame_in;
    wr_ready = 1'b0; rd_ready = 1'b0;
    if (state == A_WRITE) begin
      app_en = wr_valid; app_we = 1'b1; app_addr = addr_wr_in;
      wr_ready = app_rdy;
    end else if (state == A_READ) begin
      app_en = rd_valid; app_we = 1'b0; app_addr = addr_rd_in;
      rd_ready = app_rdy;
    end
  end

  wire issue_rd = state == A_READ && app_en && app_rdy;
  wire take     = !dq_empty && !tag_empty && rdy_out;

  sync_fifo #(.WIDTH(50), .DEPTH(OUTQ)) u_tagq (
    .clk, .rst, .push(issue_rd), .din({rd_sop, rd_eop, rd_id}), .pop(take),
    .dout(tag_dout), .empty(tag_empty), .full(tag_full), .count(tag_cnt));
  sync_fifo #(.WIDTH(BEAT_BITS), .DEPTH(OUTQ)) u_dataq (
    .clk, .rst, .push(app_rd_valid), .din(app_rd_data), .pop(take),
    .dout(dq_dout), .empty(dq_empty), .full(dq_full), .count(dq_cnt));

  assign dav_out      = !dq_empty && !tag_empty;
  assign data_out     = dq_dout;
  assign sop_out      = tag_dout[49];
  assign eop_out      = tag_dout[48];
  assign frame_out_id = tag_dout[47:0];
  assign frame_done   = take && tag_dout[48];

  a_no_dq_overflow: assert property (@(posedge clk) disable iff (rst) app_rd_valid |-> !dq_full);
  a_tag_room: assert property (@(posedge clk) disable iff (rst) issue_rd |-> !tag_full);
endmodule
