// sb_formatter_tb: the formatter and its header generator, with 4-beat TPM
// frames and 16-beat CSP FIFOs.
//   Part 1 (not the last tile): every TPM frame must leave as one packet,
//     a header beat then the frame, with the header fields (magic, frame ID,
//     payload length, first channel, kind, tile id) checked against values
//     computed here.
//   Part 2 (last tile, two channel groups in the inner loop, CSP frames of 3
//     TPM frames) and part 3 (four groups, CSP frames of 2 TPM frames): the
//     frames arrive in the interleaved order of the frame sequencer; each
//     packet must hold csp_frame_size + 1 consecutive frames of one channel
//     group, in order, with a station-beam header naming the first frame.
// The output is stalled at random. csp_sent / partial_sent are counted.
module sb_formatter_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int FB = 4, TID = 16'h2b3c;

  logic last_tile, in_valid, in_ready, spead_out_valid, spead_out_ready, csp_sent, partial_sent;
  logic [3:0] csp_frame_size;
  logic [1:0] inner_chan_loop;
  logic [15:0] tile_id;
  beat_t in_beat, spead_out;
  frame_id_t in_id;

  sb_formatter #(.N_CSP(4), .CSP_FIFO_BEATS(16), .TPM_FIFO_BEATS(8), .FRAME_BEATS(FB), .TPM_NOF_CHANS(4)) dut (.*);

  function automatic logic [511:0] fbeat(frame_id_t id, int b);
    logic [511:0] d;
    for (int w = 0; w < 16; w++) d[32*w +: 32] = {id.group, id.interval[7:0], 8'(b), 8'(w)} ^ 32'(id.block * 7919);
    return d;
  endfunction

  // expected packets: queue per channel-group slot; a packet is a list of frame IDs
  typedef struct { frame_id_t ids[$]; } pkt_t;
  pkt_t expq[4][$];
  int n_part = 0, n_csp = 0, n_csp_pulse = 0, n_part_pulse = 0;

  // ---- output packet collector and checker ----
  logic [511:0] rx[$];
  always @(posedge clk) if (!rst) begin
    if (csp_sent) n_csp_pulse++;
    if (partial_sent) n_part_pulse++;
    if (spead_out_valid && spead_out_ready) begin
      checks++;
      if (spead_out.sop != (rx.size() == 0)) begin failures++; $display("sop misplaced"); end
      rx.push_back(spead_out.data);
      if (spead_out.eop) begin
        check_packet();
        rx.delete();
      end
    end
  end

  task automatic check_packet();
    logic [511:0] h;
    frame_id_t id0;
    int slot, nf, kind;
    pkt_t p;
    h = rx[0];
    id0 = h[64 +: 48];
    kind = last_tile ? 1 : 0;
    slot = last_tile ? int'(id0.group) % (1 << inner_chan_loop) : 0;
    nf = last_tile ? int'(csp_frame_size) + 1 : 1;
    checks++;
    if (expq[slot].size() == 0) begin failures++; $display("unexpected packet"); return; end
    p = expq[slot].pop_front();
    if (h[63:56] != 8'h53 || h[127:112] != 16'h8001 || id0 !== p.ids[0] ||
        h[191:176] != 16'h8004 || h[175:128] != 48'(nf * FB * 64) ||
        h[255:240] != 16'h9011 || h[239:192] != 48'(int'(id0.group) * 4) ||
        h[319:304] != 16'h9012 || h[303:296] != 8'(kind) || h[295:288] != 8'(nf) || h[271:256] != TID) begin
      failures++; $display("bad header %h", h[319:0]);
    end
    checks++;
    if (rx.size() != 1 + nf * FB) begin failures++; $display("packet length %0d", rx.size()); return; end
    for (int f = 0; f < nf; f++)
      for (int b = 0; b < FB; b++) begin
        checks++;
        if (rx[1 + f*FB + b] !== fbeat(p.ids[f], b)) begin
          failures++; $display("payload frame %0d beat %0d wrong", f, b);
        end
      end
    if (last_tile) n_csp++; else n_part++;
  endtask

  always @(negedge clk) spead_out_ready = ($urandom % 3) != 0;

  task automatic send_frame(frame_id_t id);
    for (int b = 0; b < FB; b++) begin
      @(negedge clk);
      in_valid = 1; in_id = id; in_beat = '{sop: b == 0, eop: b == FB-1, data: fbeat(id, b)};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
  endtask

  // frames in the sequencer's order: outer channel block, interval, inner group
  task automatic run_last(int icl, int csz, int n_cb, int n_ti);
    pkt_t cur[4];
    @(negedge clk); rst = 1; last_tile = 1; inner_chan_loop = 2'(icl); csp_frame_size = 4'(csz);
    repeat (2) @(negedge clk); rst = 0;
    for (int cb = 0; cb < n_cb; cb++)
      for (int ti = 0; ti < n_ti; ti++)
        for (int j = 0; j < (1 << icl); j++) begin
          frame_id_t id;
          id = '{block: 24'(5), group: 8'((cb << icl) | j), interval: 16'(ti)};
          cur[j].ids.push_back(id);
          if (cur[j].ids.size() == csz + 1) begin
            expq[j].push_back(cur[j]);
            cur[j].ids.delete();
          end
        end
    for (int cb = 0; cb < n_cb; cb++)
      for (int ti = 0; ti < n_ti; ti++)
        for (int j = 0; j < (1 << icl); j++)
          send_frame('{block: 24'(5), group: 8'((cb << icl) | j), interval: 16'(ti)});
    repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last_tile = 0; csp_frame_size = 0; inner_chan_loop = 0; tile_id = TID;
    in_valid = 0; in_beat = '0; in_id = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---- part 1: partial beams ----
    for (int f = 0; f < 12; f++) begin
      pkt_t p;
      frame_id_t id;
      id = '{block: 24'(f / 6), group: 8'($urandom % 48), interval: 16'($urandom % 816)};
      p.ids.delete();
      p.ids.push_back(id);
      expq[0].push_back(p);
      send_frame(id);
    end
    repeat (100) @(posedge clk);
    checks++;
    if (n_part != 12 || n_part_pulse != 12) begin failures++; $display("partial packets %0d", n_part); end
    // ---- part 2: CSP frames, 2 inner groups, 3 frames each ----
    run_last(1, 2, 2, 6);
    checks++;
    if (n_csp != 8) begin failures++; $display("part 2 CSP packets %0d", n_csp); end
    // ---- part 3: 4 inner groups, 2 frames each ----
    run_last(2, 1, 2, 4);
    checks++;
    if (n_csp != 8 + 16 || n_csp_pulse != n_csp) begin failures++; $display("part 3 CSP packets %0d", n_csp); end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (expq[j].size() != 0) begin failures++; $display("slot %0d: %0d packets missing", j, expq[j].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
