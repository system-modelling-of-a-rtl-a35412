// cornerturner_tb: two corner turners, each with its own behavioural memory,
// at reduced sizes: 16 channels per input frame (4 channel groups), memory
// frames of 4 input frames, TPM frames of 8 time samples, 16-word read bursts,
// integration blocks of 2 TPM frames per group (int_block_len = 1).
//   tile A is the first tile: it generates the frame order itself, with two
//     channel groups in the inner loop (inner_chan_loop = 1);
//   tile B is a later tile: it reads the frames that tile A announces on its
//     output (cascade).
// Both get three integration blocks of input, each sample encoding (block,
// time, channel, tile). The test checks every output beat against the stored
// input (the corner turn itself: 8 time samples x 4 channels per frame,
// time-major, one sample per 64-bit word with the upper bits zero), the frame
// order of tile A against the nested loop of the design, that tile B follows
// the same order, sop/eop/frame_done, and that no input is lost. rdy_out is
// driven randomly to exercise back-pressure, and the memory model stalls at
// random, so writes and reads compete for the memory port.
module cornerturner_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IFL = 16, NF = 4, NC = 4, TFL = 8, BL = 16, AW = 20;
  localparam int NG = IFL / NC;
  localparam int IBL = 1, ICL = 1, MOC = NG - 1;
  localparam int T = (IBL + 1) * TFL;        // time samples per block
  localparam int NBLK = 3;
  localparam int BPF = TFL * NC / 8;         // beats per TPM frame

  // ------------------------------------------------------------------
  typedef struct packed {
    logic [47:0] data;
    logic sop, eop, dav;
  } in_t;

  in_t  in_a, in_b;
  logic rdy_a, rdy_b, lost_a, lost_b, fd_a, fd_b;
  logic [511:0] dout_a, dout_b;
  logic sop_a, eop_a, dav_a, sop_b, eop_b, dav_b;
  logic rout_a, rout_b;
  frame_id_t oid_a, oid_b, casc_id;
  logic casc_stb, crdy_a, crdy_b;
  logic en_a, we_a, ardy_a, rv_a, en_b, we_b, ardy_b, rv_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [511:0] wd_a, rd_a, wd_b, rd_b;

  cornerturner #(.ADDR_W(AW), .ROW_W(10), .COL_W(7), .BANK_W(3), .BURST_LEN(BL), .IN_FRAME_LEN(IFL),
    .NOF_FRAMES(NF), .TPM_NOF_CHANS(NC), .TPM_FRAME_LEN(TFL)) ct_a (
    .dsp_clk(clk), .dsp_rst(rst), .int_block_len(12'(IBL)), .first_tile(1'b1), .inner_chan_loop(2'(ICL)),
    .max_out_chan(8'(MOC)), .casc_frame_stb(1'b0), .casc_frame_id('0), .casc_frame_out_id(oid_a),
    .casc_frame_rdy(crdy_a), .data_in(in_a.data), .sop_in(in_a.sop), .eop_in(in_a.eop), .dav_in(in_a.dav),
    .rdy_in(rdy_a), .data_out(dout_a), .sop_out(sop_a), .eop_out(eop_a), .dav_out(dav_a), .rdy_out(rout_a),
    .app_en(en_a), .app_we(we_a), .app_addr(addr_a), .app_wdata(wd_a), .app_rdy(ardy_a),
    .app_rd_valid(rv_a), .app_rd_data(rd_a), .lost(lost_a), .frame_done(fd_a));
  ddr_model #(.ADDR_W(AW), .LATENCY(9), .RDY_GAP(6)) mem_a (.clk, .rst, .app_en(en_a), .app_we(we_a),
    .app_addr(addr_a), .app_wdata(wd_a), .app_rdy(ardy_a), .app_rd_valid(rv_a), .app_rd_data(rd_a));

  cornerturner #(.ADDR_W(AW), .ROW_W(10), .COL_W(7), .BANK_W(3), .BURST_LEN(BL), .IN_FRAME_LEN(IFL),
    .NOF_FRAMES(NF), .TPM_NOF_CHANS(NC), .TPM_FRAME_LEN(TFL)) ct_b (
    .dsp_clk(clk), .dsp_rst(rst), .int_block_len(12'(IBL)), .first_tile(1'b0), .inner_chan_loop(2'(ICL)),
    .max_out_chan(8'(MOC)), .casc_frame_stb(casc_stb), .casc_frame_id(casc_id), .casc_frame_out_id(oid_b),
    .casc_frame_rdy(crdy_b), .data_in(in_b.data), .sop_in(in_b.sop), .eop_in(in_b.eop), .dav_in(in_b.dav),
    .rdy_in(rdy_b), .data_out(dout_b), .sop_out(sop_b), .eop_out(eop_b), .dav_out(dav_b), .rdy_out(rout_b),
    .app_en(en_b), .app_we(we_b), .app_addr(addr_b), .app_wdata(wd_b), .app_rdy(ardy_b),
    .app_rd_valid(rv_b), .app_rd_data(rd_b), .lost(lost_b), .frame_done(fd_b));
  ddr_model #(.ADDR_W(AW), .LATENCY(14), .RDY_GAP(4)) mem_b (.clk, .rst, .app_en(en_b), .app_we(we_b),
    .app_addr(addr_b), .app_wdata(wd_b), .app_rdy(ardy_b), .app_rd_valid(rv_b), .app_rd_data(rd_b));

  // ------------------------------------------------------------------
  function automatic logic [47:0] sample(int tile, int blk, int t, int ch);
    return {8'(tile), 8'(blk), 16'(t), 8'(ch), 8'(blk * 37 + t * 5 + ch * 3 + tile)};
  endfunction

  // expected frame order of the first tile
  frame_id_t order[$];
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int cb = 0; cb < NG / (1 << ICL); cb++)
        for (int ti = 0; ti <= IBL; ti++)
          for (int j = 0; j < (1 << ICL); j++)
            order.push_back('{block: 24'(b), group: 8'((cb << ICL) | j), interval: 16'(ti)});
  end

  // input drivers: one time sample of all channels per frame, gaps between frames
  task automatic drive(input int tile, ref in_t in, ref logic rdy);
    for (int b = 0; b < NBLK; b++)
      for (int t = 0; t < T; t++) begin
        for (int c = 0; c < IFL; c++) begin
          @(negedge clk);
          if (($urandom % 3) == 0) begin in.dav = 0; @(negedge clk); end   // gap inside the frame
          // a source that cannot be held: offer only when ready (lost counts the rest)
          in.dav = 0;
          while (!rdy) @(negedge clk);
          in.dav = 1; in.sop = (c == 0); in.eop = (c == IFL-1); in.data = sample(tile, b, t, c);
        end
        @(negedge clk); in.dav = 0; in.sop = 0; in.eop = 0;
        repeat ($urandom % 4) @(negedge clk);
      end
  endtask

  // output checker
  int frames_a = 0, frames_b = 0, fd_cnt_a = 0, fd_cnt_b = 0, stalls = 0;
  frame_id_t ids_a[$];    // frames of tile A, in output order, for the cascade
  frame_id_t seen_b[$];

  task automatic check_beat(input int tile, input frame_id_t id, input int beat, input logic [511:0] d,
                            input logic sop, input logic eop);
    checks++;
    if (sop !== (beat == 0) || eop !== (beat == BPF-1)) begin
      failures++; $display("tile %0d beat %0d sop %b eop %b", tile, beat, sop, eop);
    end
    for (int w = 0; w < 8; w++) begin
      int k, c;
      logic [63:0] exp;
      k = (beat * 8 + w) / NC;
      c = (beat * 8 + w) % NC;
      exp = {16'h0, sample(tile, int'(id.block), int'(id.interval) * TFL + k, int'(id.group) * NC + c)};
      checks++;
      if (d[64*w +: 64] !== exp) begin
        failures++;
        if (failures < 10) $display("tile %0d frame b%0d g%0d i%0d beat %0d word %0d got %h exp %h", tile,
                                    id.block, id.group, id.interval, beat, w, d[64*w +: 64], exp);
      end
    end
  endtask

  int beat_a = 0, beat_b = 0;
  frame_id_t cur_a, cur_b;
  always @(posedge clk) if (!rst) begin
    if (dav_a && !rout_a) stalls++;
    if (dav_a && rout_a) begin
      if (sop_a) begin
        cur_a = oid_a;
        checks++;
        if (frames_a >= order.size() || oid_a !== order[frames_a]) begin
          failures++; $display("tile A frame %0d id b%0d g%0d i%0d out of order", frames_a, oid_a.block,
                               oid_a.group, oid_a.interval);
        end
        ids_a.push_back(oid_a);
        beat_a = 0;
      end
      check_beat(0, cur_a, beat_a, dout_a, sop_a, eop_a);
      beat_a++;
      if (eop_a) frames_a++;
    end
    if (dav_b && rout_b) begin
      if (sop_b) begin
        cur_b = oid_b;
        seen_b.push_back(oid_b);
        beat_b = 0;
      end
      check_beat(1, cur_b, beat_b, dout_b, sop_b, eop_b);
      beat_b++;
      if (eop_b) frames_b++;
    end
    if (fd_a) fd_cnt_a++;
    if (fd_b) fd_cnt_b++;
  end

  // cascade: announce tile A's frames to tile B, in order
  initial begin
    casc_stb = 0; casc_id = '0;
    wait (!rst);
    forever begin
      @(negedge clk);
      casc_stb = 0;
      if (ids_a.size() != 0) begin
        casc_id = ids_a[0];
        casc_stb = 1;
        @(posedge clk);
        if (crdy_b) void'(ids_a.pop_front());
        #1;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: frames A %0d B %0d", frames_a, frames_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    rout_a = ($urandom % 4) != 0;
    rout_b = ($urandom % 3) != 0;
  end

  initial begin
    in_a = '0; in_b = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    fork
      drive(0, in_a, rdy_a);
      drive(1, in_b, rdy_b);
    join
    wait (frames_a == order.size() && frames_b == order.size());
    repeat (20) @(posedge clk);
    checks++;
    for (int i = 0; i < order.size(); i++) if (seen_b[i] !== order[i]) begin
      failures++; $display("tile B frame %0d not in cascade order", i); break;
    end
    checks++;
    if (fd_cnt_a != order.size() || fd_cnt_b != order.size()) begin
      failures++; $display("frame_done %0d %0d", fd_cnt_a, fd_cnt_b);
    end
    checks++;
    if (lost_a || lost_b) begin failures++; $display("input lost"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    checks++;
    // every stored word was written once: NBLK blocks x T x IFL samples, 8 per beat
    if (mem_a.n_wr != NBLK * T * IFL / 8 || mem_a.n_rd != NBLK * T * IFL / 8) begin
      failures++; $display("memory writes %0d reads %0d", mem_a.n_wr, mem_a.n_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
