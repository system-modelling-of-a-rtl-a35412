// cornerturner_rate_tb: the corner turner at its default sizes (192-channel
// input frames, memory frames of 8 frames, TPM frames of 256 time samples x 4
// channels, 64-word bursts, 29-bit addresses) against its input rate: an
// input frame of 192 samples must be taken in 192 consecutive clock cycles.
// Three integration blocks (int_block_len = 0: 256 time samples each) are
// sent as back-to-back frames with no idle cycle at all, while the memory
// model stalls at random and the output is read at full speed. Checks: rdy_in
// never drops, so every frame is taken in exactly 192 cycles; nothing is
// lost; all 3 x 48 TPM frames come out in the first-tile order (one group per
// frame, inner_chan_loop = 0) with every word equal to the stored sample.
module cornerturner_rate_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IFL = 192, NC = 4, TFL = 256, NG = IFL / NC, NBLK = 3;
  localparam int FB = TFL * NC / 8;

  logic [47:0] data_in;
  logic sop_in = 0, eop_in = 0, dav_in = 0, rdy_in;
  logic [511:0] data_out, app_wdata, app_rd_data;
  logic sop_out, eop_out, dav_out, lost, frame_done, casc_frame_rdy;
  logic app_en, app_we, app_rdy, app_rd_valid;
  logic [28:0] app_addr;
  frame_id_t out_id;

  cornerturner dut (
    .dsp_clk(clk), .dsp_rst(rst), .int_block_len(12'd0), .first_tile(1'b1), .inner_chan_loop(2'd0),
    .max_out_chan(8'(NG-1)), .casc_frame_stb(1'b0), .casc_frame_id('0), .casc_frame_out_id(out_id),
    .casc_frame_rdy, .data_in, .sop_in, .eop_in, .dav_in, .rdy_in,
    .data_out, .sop_out, .eop_out, .dav_out, .rdy_out(1'b1),
    .app_en, .app_we, .app_addr, .app_wdata, .app_rdy, .app_rd_valid, .app_rd_data, .lost, .frame_done);

  ddr_model #(.ADDR_W(29)) mem (.clk, .rst, .app_en, .app_we, .app_addr, .app_wdata, .app_rdy,
    .app_rd_valid, .app_rd_data);

  function automatic logic [47:0] sample(int b, int t, int c);
    return {8'(b), 16'(t), 8'(c), 16'hA5A5};
  endfunction

  // ---- input: frames back to back, one sample per cycle ----
  int frame_start, n_frames_in = 0;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int t = 0; t < TFL; t++)
        for (int c = 0; c < IFL; c++) begin
          @(negedge clk);
          dav_in = 1; sop_in = (c == 0); eop_in = (c == IFL-1); data_in = sample(b, t, c);
        end
    @(negedge clk); dav_in = 0; sop_in = 0; eop_in = 0;
  end

  int not_ready = 0;
  always @(posedge clk) if (!rst && dav_in) begin
    if (!rdy_in) not_ready++;
    if (sop_in) frame_start = $time;
    if (eop_in && rdy_in) begin
      checks++;
      n_frames_in++;
      if (($time - frame_start) / 10 != IFL - 1) begin
        failures++; $display("input frame took %0d cycles", ($time - frame_start) / 10 + 1);
      end
    end
  end

  // ---- output ----
  int n_out = 0, beat = 0;
  always @(posedge clk) if (!rst && dav_out) begin
    int b, g;
    b = n_out / NG; g = n_out % NG;
    checks++;
    if (sop_out !== (beat == 0) || eop_out !== (beat == FB-1) ||
        out_id.block != 24'(b) || out_id.group != 8'(g) || out_id.interval != 16'd0) begin
      failures++;
      if (failures < 10) $display("frame %0d beat %0d: sop %b eop %b id %0d/%0d", n_out, beat, sop_out, eop_out, out_id.block, out_id.group);
    end
    for (int w = 0; w < 8; w++) begin
      int t, c;
      t = (beat * 8 + w) / NC; c = (beat * 8 + w) % NC;
      if (data_out[64*w +: 64] !== {16'h0, sample(b, t, g * NC + c)}) begin
        failures++;
        if (failures < 10) $display("frame %0d beat %0d word %0d: %h", n_out, beat, w, data_out[64*w +: 64]);
      end
    end
    if (beat == FB-1) begin beat = 0; n_out++; end else beat++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: frames in %0d, TPM frames out %0d", n_frames_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (n_out == NBLK * NG);
    repeat (20) @(posedge clk);
    checks++;
    if (not_ready != 0 || lost) begin failures++; $display("input refused %0d times, lost %b", not_ready, lost); end
    checks++;
    if (n_frames_in != NBLK * TFL) begin failures++; $display("input frames %0d", n_frames_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
