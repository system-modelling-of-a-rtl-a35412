// station_beamformer_tb: a chain of two station beamformers, each with its
// own behavioural memory, at reduced sizes (16 channels per beam frame, 4
// channel groups, TPM frames of 8 time samples, blocks of 2 TPM frames per
// group). Tile 0 is the first tile, tile 1 the last; both are programmed over
// their AXI4-Lite ports (two inner-loop groups, CSP frames of 2 TPM frames).
// Both receive three blocks of tile beam with known samples. Tile 0 sends its
// frames as partial beams to tile 1, which requests the same frames from its
// own memory, adds them and packs station-beam packets. The test checks each
// packet: header kind and frame ID, and every 12-bit value of the payload
// against the saturating sum of the two tiles' samples, in the order the
// corner turner defines (8 time samples x 4 channels per frame, time-major).
module station_beamformer_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IFL = 16, NF = 4, NC = 4, TFL = 8, BL = 16, AW = 29;
  localparam int NG = IFL / NC, IBL = 1, ICL = 1, CSZ = 1, NBLK = 3;
  localparam int T = (IBL + 1) * TFL;
  localparam int FB = TFL * NC / 8;

  axil_req_t ctl_req, req [2];
  axil_rsp_t ctl_rsp, rsp [2];
  int sel = 0;
  always_comb begin
    req[0] = (sel == 0) ? ctl_req : '0;
    req[1] = (sel == 1) ? ctl_req : '0;
    ctl_rsp = rsp[sel];
  end

  logic [47:0] bd [2];
  logic bsop [2], beop [2], bvalid [2], bready [2];
  beat_t sp01, sp_out, sp_none;
  logic sp01_valid, sp01_ready, spo_valid, spo_ready, sin_ready0;
  logic en [2], we [2], ardy [2], rv [2];
  logic [AW-1:0] addr [2];
  logic [511:0] wd [2], rd [2];
  logic fdone [2], csp_sent [2], part_sent [2], lost [2];
  beat_t unused_out;

  assign sp_none = '0;

  station_beamformer #(.ADDR_W(AW), .BURST_LEN(BL), .IN_FRAME_LEN(IFL), .NOF_FRAMES(NF),
    .TPM_NOF_CHANS(NC), .TPM_FRAME_LEN(TFL), .N_CSP(4), .CSP_FIFO_BEATS(16)) tile0 (
    .clk, .rst, .ctl_req(req[0]), .ctl_rsp(rsp[0]),
    .beam_data(bd[0]), .beam_sop(bsop[0]), .beam_eop(beop[0]), .beam_valid(bvalid[0]), .beam_ready(bready[0]),
    .spead_in(sp_none), .spead_in_valid(1'b0), .spead_in_ready(sin_ready0),
    .spead_out(sp01), .spead_out_valid(sp01_valid), .spead_out_ready(sp01_ready),
    .app_en(en[0]), .app_we(we[0]), .app_addr(addr[0]), .app_wdata(wd[0]), .app_rdy(ardy[0]),
    .app_rd_valid(rv[0]), .app_rd_data(rd[0]),
    .frame_done(fdone[0]), .csp_sent(csp_sent[0]), .partial_sent(part_sent[0]), .lost(lost[0]));

  station_beamformer #(.ADDR_W(AW), .BURST_LEN(BL), .IN_FRAME_LEN(IFL), .NOF_FRAMES(NF),
    .TPM_NOF_CHANS(NC), .TPM_FRAME_LEN(TFL), .N_CSP(4), .CSP_FIFO_BEATS(16)) tile1 (
    .clk, .rst, .ctl_req(req[1]), .ctl_rsp(rsp[1]),
    .beam_data(bd[1]), .beam_sop(bsop[1]), .beam_eop(beop[1]), .beam_valid(bvalid[1]), .beam_ready(bready[1]),
    .spead_in(sp01), .spead_in_valid(sp01_valid), .spead_in_ready(sp01_ready),
    .spead_out(sp_out), .spead_out_valid(spo_valid), .spead_out_ready(spo_ready),
    .app_en(en[1]), .app_we(we[1]), .app_addr(addr[1]), .app_wdata(wd[1]), .app_rdy(ardy[1]),
    .app_rd_valid(rv[1]), .app_rd_data(rd[1]),
    .frame_done(fdone[1]), .csp_sent(csp_sent[1]), .partial_sent(part_sent[1]), .lost(lost[1]));

  for (genvar i = 0; i < 2; i++) begin : g_mem
    ddr_model #(.ADDR_W(AW), .LATENCY(10 + 3*i), .RDY_GAP(5)) mem (.clk, .rst, .app_en(en[i]), .app_we(we[i]),
      .app_addr(addr[i]), .app_wdata(wd[i]), .app_rdy(ardy[i]), .app_rd_valid(rv[i]), .app_rd_data(rd[i]));
  end

  `include "axil_tasks.svh"

  // four 12-bit values per sample; large values so that the sum saturates at times
  function automatic logic [47:0] sample(int tile, int blk, int t, int ch);
    logic [47:0] s;
    for (int v = 0; v < 4; v++) s[12*v +: 12] = 12'(blk * 331 + t * 173 + ch * 59 + v * 1031 + tile * 1500);
    return s;
  endfunction

  function automatic logic [11:0] sat_add(logic [11:0] a, logic [11:0] b);
    int s;
    s = int'($signed(a)) + int'($signed(b));
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return 12'(s);
  endfunction

  // expected CSP packets, per inner-loop slot: lists of frame IDs
  typedef struct { frame_id_t ids[$]; } pkt_t;
  pkt_t expq[2][$];
  initial begin
    pkt_t cur[2];
    for (int b = 0; b < NBLK; b++)
      for (int cb = 0; cb < NG / 2; cb++)
        for (int ti = 0; ti <= IBL; ti++)
          for (int j = 0; j < 2; j++) begin
            cur[j].ids.push_back('{block: 24'(b), group: 8'(cb*2 + j), interval: 16'(ti)});
            if (cur[j].ids.size() == CSZ + 1) begin
              expq[j].push_back(cur[j]);
              cur[j].ids.delete();
            end
          end
  end

  int n_pkts = 0, n_partial = 0;
  logic [511:0] rx[$];
  always @(negedge clk) spo_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (!rst) begin
    if (part_sent[0]) n_partial++;
    if (spo_valid && spo_ready) begin
      rx.push_back(sp_out.data);
      if (sp_out.eop) begin check_packet(); rx.delete(); end
    end
  end

  task automatic check_packet();
    frame_id_t id0;
    pkt_t p;
    int j;
    id0 = rx[0][64 +: 48];
    j = int'(id0.group) % 2;
    checks++;
    if (expq[j].size() == 0) begin failures++; $display("unexpected packet"); return; end
    p = expq[j].pop_front();
    if (rx[0][63:56] != 8'h53 || id0 !== p.ids[0] || rx[0][303:296] != 8'd1 || rx.size() != 1 + (CSZ+1)*FB) begin
      failures++; $display("bad packet: id b%0d g%0d i%0d, %0d beats", id0.block, id0.group, id0.interval, rx.size());
      return;
    end
    n_pkts++;
    for (int f = 0; f <= CSZ; f++)
      for (int b = 0; b < FB; b++)
        for (int w = 0; w < 8; w++) begin
          int k, c, t, ch;
          logic [47:0] s0, s1;
          logic [63:0] e;
          k = (b * 8 + w) / NC; c = (b * 8 + w) % NC;
          t = int'(p.ids[f].interval) * TFL + k;
          ch = int'(p.ids[f].group) * NC + c;
          s0 = sample(0, int'(p.ids[f].block), t, ch);
          s1 = sample(1, int'(p.ids[f].block), t, ch);
          e = '0;
          for (int v = 0; v < 4; v++) e[12*v +: 12] = sat_add(s0[12*v +: 12], s1[12*v +: 12]);
          checks++;
          if (rx[1 + f*FB + b][64*w +: 64] !== e) begin
            failures++;
            if (failures < 10) $display("frame g%0d i%0d beat %0d word %0d: %h exp %h", p.ids[f].group,
                                        p.ids[f].interval, b, w, rx[1 + f*FB + b][64*w +: 64], e);
          end
        end
  endtask

  task automatic drive(int tile);
    for (int b = 0; b < NBLK; b++)
      for (int t = 0; t < T; t++) begin
        for (int c = 0; c < IFL; c++) begin
          @(negedge clk);
          bvalid[tile] = 0;
          while (!bready[tile]) @(negedge clk);
          bvalid[tile] = 1; bsop[tile] = (c == 0); beop[tile] = (c == IFL-1); bd[tile] = sample(tile, b, t, c);
        end
        @(negedge clk); bvalid[tile] = 0;
        repeat (2) @(negedge clk);
      end
  endtask

  task automatic setup_tile(int tile);
    logic [1:0] r;
    sel = tile;
    axil_write(16'h00, tile == 0 ? 32'h1 : 32'h2, r);
    axil_write(16'h04, IBL, r);
    axil_write(16'h08, CSZ, r);
    axil_write(16'h0C, ICL, r);
    axil_write(16'h10, NG - 1, r);
    axil_write(16'h14, 32'(100 + tile), r);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets", n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl_req = '0;
    for (int i = 0; i < 2; i++) begin bvalid[i] = 0; bsop[i] = 0; beop[i] = 0; bd[i] = '0; end
    repeat (4) @(posedge clk);
    rst <= 0;
    setup_tile(0);
    setup_tile(1);
    fork
      drive(0);
      drive(1);
    join
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    repeat (50) @(posedge clk);
    checks++;
    if (n_pkts != NBLK * NG * (IBL + 1) / (CSZ + 1)) begin failures++; $display("packets %0d", n_pkts); end
    checks++;
    if (n_partial != NBLK * NG * (IBL + 1)) begin failures++; $display("partial beams %0d", n_partial); end
    checks++;
    if (lost[0] || lost[1]) begin failures++; $display("beam lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
