// sb_adder_tb: the station adder on its own, with the corner turner replaced
// by a model that answers each frame request with a frame of known content.
//   Part 1 (first tile): local frames pass through with a zero frame added.
//   Part 2 (later tile): partial-beam packets (header beat carrying the
//     frame ID, then the payload) arrive on spead_in; the test checks that
//     each frame ID is requested from the corner turner in packet order, and
//     that every output beat is the per-value saturating sum of the partial
//     beam and the local frame, with the right frame ID and sop/eop.
//   A packet with a wrong header magic must set hdr_error.
// Back-pressure on every interface is random.
module sb_adder_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int FB = 4;   // beats per frame in this test

  logic first_tile, tile_valid, tile_ready, casc_frame_stb, casc_frame_rdy;
  logic spead_in_valid, spead_in_ready, out_valid, out_ready, hdr_error;
  beat_t tile_beat, spead_in, out_beat;
  frame_id_t tile_id, casc_frame_id, out_id;

  sb_adder #(.SPEAD_FIFO(16), .DDR_FIFO(8)) dut (.*);

  function automatic logic [511:0] rnd_beat();
    logic [511:0] d;
    d = '0;
    for (int w = 0; w < 8; w++)
      for (int v = 0; v < 4; v++) d[w*64 + v*12 +: 12] = 12'($urandom);
    return d;
  endfunction

  function automatic logic [511:0] local_beat(frame_id_t id, int b);
    logic [511:0] d;
    d = '0;
    for (int w = 0; w < 8; w++)
      for (int v = 0; v < 4; v++) d[w*64 + v*12 +: 12] = 12'(id.group * 97 + id.interval * 13 + b * 611 + w * 29 + v * 1001);
    return d;
  endfunction

  function automatic logic [511:0] ref_add(logic [511:0] a, logic [511:0] b);
    logic [511:0] r;
    r = '0;
    for (int w = 0; w < 8; w++)
      for (int v = 0; v < 4; v++) begin
        int s;
        logic signed [11:0] x, y;
        x = a[w*64 + v*12 +: 12]; y = b[w*64 + v*12 +: 12];
        s = int'(x) + int'(y);
        if (s > 2047) s = 2047;
        if (s < -2048) s = -2048;
        r[w*64 + v*12 +: 12] = 12'(s);
      end
    return r;
  endfunction

  // ---- corner turner model: answers requests in order ----
  frame_id_t req_q[$];
  frame_id_t req_seen[$];
  always @(negedge clk) casc_frame_rdy = ($urandom % 3) != 0;
  always @(posedge clk) if (!rst && casc_frame_stb && casc_frame_rdy) begin
    req_q.push_back(casc_frame_id);
    req_seen.push_back(casc_frame_id);
  end

  typedef struct { logic [511:0] d; logic sop, eop; frame_id_t id; } exp_t;
  exp_t exp_q[$];
  frame_id_t first_q[$];     // part 1: frames produced by the local corner turner

  initial begin : ct_model
    tile_valid = 0; tile_beat = '0; tile_id = '0;
    wait (!rst);
    forever begin
      frame_id_t id;
      @(negedge clk);
      if (first_tile && first_q.size() != 0) id = first_q.pop_front();
      else if (!first_tile && req_q.size() != 0) id = req_q.pop_front();
      else continue;
      for (int b = 0; b < FB; b++) begin
        tile_valid = 1; tile_id = id;
        tile_beat.sop = (b == 0); tile_beat.eop = (b == FB-1); tile_beat.data = local_beat(id, b);
        @(posedge clk);
        while (!tile_ready) @(posedge clk);
        @(negedge clk);
        tile_valid = 0;
        if (($urandom % 3) == 0) @(negedge clk);
      end
    end
  end

  // ---- output checker ----
  int n_out = 0;
  always @(negedge clk) out_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    exp_t e;
    checks++;
    n_out++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output beat"); end
    else begin
      e = exp_q.pop_front();
      if (out_beat.data !== e.d || out_beat.sop !== e.sop || out_beat.eop !== e.eop || out_id !== e.id) begin
        failures++;
        if (failures < 10) $display("beat mismatch id g%0d i%0d (exp g%0d i%0d) sop %b eop %b", out_id.group,
                                    out_id.interval, e.id.group, e.id.interval, out_beat.sop, out_beat.eop);
      end
    end
  end

  task automatic send_packet(frame_id_t id, logic [7:0] magic);
    logic [511:0] hdr;
    hdr = '0;
    hdr[63:0] = {magic, 56'h04_0206_0000_0004};
    hdr[127:64] = {16'h8001, 48'(id)};
    for (int b = -1; b < FB; b++) begin
      @(negedge clk);
      spead_in_valid = 1;
      if (b < 0) begin
        spead_in.sop = 1; spead_in.eop = 0; spead_in.data = hdr;
      end else begin
        exp_t e;
        logic [511:0] p;
        p = rnd_beat();
        spead_in.sop = 0; spead_in.eop = (b == FB-1); spead_in.data = p;
        e.d = ref_add(p, local_beat(id, b)); e.sop = (b == 0); e.eop = (b == FB-1); e.id = id;
        exp_q.push_back(e);
      end
      @(posedge clk);
      while (!spead_in_ready) @(posedge clk);
      @(negedge clk);
      spead_in_valid = 0;
      if (($urandom % 4) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_id_t ids[$];
    first_tile = 1; spead_in_valid = 0; spead_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---- part 1: first tile ----
    for (int f = 0; f < 10; f++) begin
      frame_id_t id;
      id = '{block: 24'(0), group: 8'(f % 4), interval: 16'(f / 4)};
      for (int b = 0; b < FB; b++) exp_q.push_back('{local_beat(id, b), b == 0, b == FB-1, id});
      first_q.push_back(id);
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 10 * FB) begin failures++; $display("part 1 beats %0d", n_out); end
    // ---- part 2: later tile ----
    @(negedge clk); rst = 1; first_tile = 0;
    repeat (2) @(negedge clk); rst = 0;
    n_out = 0;
    for (int f = 0; f < 24; f++) begin
      frame_id_t id;
      id = '{block: 24'(f / 12), group: 8'($urandom % 48), interval: 16'($urandom % 816)};
      ids.push_back(id);
      send_packet(id, 8'h53);
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 24 * FB) begin failures++; $display("part 2 beats %0d", n_out); end
    checks++;
    if (req_seen.size() != 24) begin failures++; $display("requests %0d", req_seen.size()); end
    else for (int i = 0; i < 24; i++) if (req_seen[i] !== ids[i]) begin
      failures++; $display("request %0d wrong id", i); break;
    end
    checks++;
    if (hdr_error) begin failures++; $display("hdr_error without cause"); end
    send_packet('{block: 24'(2), group: 8'(1), interval: 16'(0)}, 8'h00);
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (!hdr_error) begin failures++; $display("bad magic not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

