// input_cornerturner: first stage of the DDR corner turner (i_input_ct). Input
// frames carry one time sample of all IN_FRAME_LEN channels, one DATA_W-bit
// sample per cycle (sop_in/eop_in/dav_in, rdy_in). The block gathers
// NOF_FRAMES consecutive frames and re-emits them as memory frames: for each
// group of TPM_NOF_CHANS channels, the NOF_FRAMES x TPM_NOF_CHANS samples of
// that group, time-major, packed DDR_TMF memory words per beat (one sample per
// DDR_WORD_W-bit word, upper bits zero). Each beat is tagged with its channel
// group and beat index (addr_out) for the write address generator.
//
// How it works: a ping-pong buffer holds two sets of NOF_FRAMES frames, split
// into TPM_NOF_CHANS banks by channel, so a whole time step of a group is read
// in one cycle; a beat is assembled in DDR_TMF/TPM_NOF_CHANS cycles. rdy_in is
// low while the half to be written next is still being emitted; a sample
// offered then is dropped and counted in the sticky flag lost.
// Frame sizes and the memory-frame layout follow the corner turner
// description; the banked buffer and handshakes are this design's choice.
module input_cornerturner #(
  parameter int unsigned DATA_W        = 48,
  parameter int unsigned DDR_WORD_W    = 64,
  parameter int unsigned DDR_TMF       = 8,
  parameter int unsigned IN_FRAME_LEN  = 192,
  parameter int unsigned NOF_FRAMES    = 8,
  parameter int unsigned TPM_NOF_CHANS = 4
) (
  input  logic                                       clk,
  input  logic                                       rst,
  input  logic [DATA_W-1:0]                          data_in,
  input  logic                                       sop_in,
  input  logic                                       eop_in,
  input  logic                                       dav_in,
  output logic                                       rdy_in,
  output logic                                       lost,
  // memory frames
  output logic                                       out_valid,
  input  logic                                       out_ready,
  output logic [DDR_WORD_W*DDR_TMF-1:0]              out_data,
  output logic [$clog2(IN_FRAME_LEN/TPM_NOF_CHANS)-1:0] out_group,
  output logic [$clog2(NOF_FRAMES*TPM_NOF_CHANS/DDR_TMF+1)-1:0] out_beat
);
  localparam int unsigned NC   = TPM_NOF_CHANS;
  localparam int unsigned NG   = IN_FRAME_LEN / NC;
  localparam int unsigned GW   = $clog2(NG);
  localparam int unsigned TW   = $clog2(NOF_FRAMES);
  localparam int unsigned CW   = $clog2(IN_FRAME_LEN);
  localparam int unsigned BPF  = NOF_FRAMES * NC / DDR_TMF;   // beats per memory frame
  localparam int unsigned BW   = $clog2(BPF+1);
  localparam int unsigned SPB  = DDR_TMF / NC;                // time steps per beat
  localparam int unsigned BANK_DEPTH = 2 * NOF_FRAMES * (1 << GW);   // indexed by {half, time, group}

  // ---------------- write side ----------------
  logic [DATA_W-1:0] bank [NC][BANK_DEPTH];
  logic          wh;                  // half being written
  logic [TW-1:0] wt;                  // frame (time step) being written
  logic [CW-1:0] wc;                  // channel being written
  logic [1:0]    full;                // half holds NOF_FRAMES frames waiting to be emitted
  logic          wr_ok;

  assign rdy_in = !full[wh];
  assign wr_ok  = dav_in && rdy_in;
  wire [CW-1:0] ch = sop_in ? '0 : wc;

  always_ff @(posedge clk) begin
    if (wr_ok)
      bank[ch % CW'(NC)][{wh, wt, GW'(ch / CW'(NC))}] <= data_in;
  end

  logic set_full, clr_full;
  logic clr_half;
  always_ff @(posedge clk) begin
    if (rst) begin
      wh <= 1'b0; wt <= '0; wc <= '0; lost <= 1'b0;
    end else begin
      if (dav_in && !rdy_in) lost <= 1'b1;
      if (wr_ok) begin
        if (eop_in || ch == CW'(IN_FRAME_LEN-1)) begin
          wc <= '0;
          if (wt == TW'(NOF_FRAMES-1)) begin
            wt <= '0;
            wh <= ~wh;
          end else wt <= wt + 1'b1;
        end else wc <= ch + 1'b1;
      end
    end
  end
  assign set_full = wr_ok && (eop_in || ch == CW'(IN_FRAME_LEN-1)) && wt == TW'(NOF_FRAMES-1);

  always_ff @(posedge clk) begin
    if (rst) full <= '0;
    else begin
      if (set_full) full[wh] <= 1'b1;
      if (clr_full) full[clr_half] <= 1'b0;
    end
  end

  // ---------------- read side ----------------
  logic          rh;                  // half being read
  logic [GW-1:0] rg;                  // group
  logic [TW-1:0] rt;                  // time step
  logic [$clog2(SPB+1)-1:0] rs;       // time step within beat
  logic [BW-1:0] rb;                  // beat within memory frame
  logic [DDR_WORD_W*DDR_TMF-1:0] asm_q;

  assign clr_half = ~rh;   // clr_full pulses the cycle after rh has moved on

  always_ff @(posedge clk) begin
    if (rst) begin
      rh <= 1'b0; rg <= '0; rt <= '0; rs <= '0; rb <= '0;
      out_valid <= 1'b0; clr_full <= 1'b0; asm_q <= '0;
      out_group <= '0; out_beat <= '0;
    end else begin
      clr_full <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (full[rh] && !clr_full && (!out_valid || out_ready)) begin
        // read all NC channels of time step rt of group rg
        for (int c = 0; c < NC; c++)
          asm_q[(int'(rs) * NC + c) * DDR_WORD_W +: DDR_WORD_W] <=
            DDR_WORD_W'(bank[c][{rh, rt, rg}]);
        rt <= rt + 1'b1;
        if (rs == ($clog2(SPB+1))'(SPB-1)) rs <= '0;
        else rs <= rs + 1'b1;
        if (rs == ($clog2(SPB+1))'(SPB-1)) begin
          out_valid <= 1'b1;
          out_group <= rg;
          out_beat  <= rb;
          if (rb == BW'(BPF-1)) begin
            rb <= '0;
            rt <= '0;
            if (rg == GW'(NG-1)) begin
              rg <= '0;
              rh <= ~rh;
              clr_full <= 1'b1;
            end else rg <= rg + 1'b1;
          end else rb <= rb + 1'b1;
        end
      end
    end
  end
  assign out_data = asm_q;
endmodule
