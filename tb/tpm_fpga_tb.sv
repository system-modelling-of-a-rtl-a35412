// tpm_fpga_tb: end-to-end test of the FPGA signal chain at reduced sizes
// (32 input channels, 4 antennas per FPGA, 4 regions selecting 16 channels,
// 4 channel groups, memory frames of 2 beam frames, TPM frames of 16 time
// samples, blocks of 4 TPM frames per group). Three FPGAs form a small station:
//   A0, A1  the two FPGAs of TPM A: their partial tile beams are exchanged
//           over the FPGA interchange (combine on); A0 is the first tile of
//           the station chain, A1's packets are only counted;
//   B       one FPGA of TPM B, combine off; the last tile of the chain.
// A0's partial station beam goes to B, which adds its own beam and packs
// station-beam (CSP) packets, two channel groups in the inner loop, CSP
// frames of 2 TPM frames. Each FPGA has its own memory model; B's output is
// stalled at random.
// Checks: every tile beam value against a floating-point model of the
// weighting and antenna sum (2 LSB tolerance); every CSP payload value against
// the saturating sum of A0's and B's tile beams in corner-turned order; the
// CSP headers; that no data is lost; a DECERR response for an unmapped
// control address. Each mechanism of the design is counted and must occur.
module tpm_fpga_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = 32, NA = 4, NR = 4;
  localparam int IFL = 16, NF = 2, NC = 4, TFL = 16, BL = 16, AW = 29;
  localparam int NG = IFL / NC, IBL = 3, ICL = 1, CSZ = 1, NBLK = 3;
  localparam int T = (IBL + 1) * TFL, NTS = NBLK * T;
  localparam int FB = TFL * NC / 8;
  localparam int SW = PROD_W + $clog2(NA) + 1;
  localparam int NFPGA = 3;   // 0 = A0, 1 = A1, 2 = B

  // ---- control bus, one FPGA at a time ----
  axil_req_t ctl_req, req [NFPGA];
  axil_rsp_t ctl_rsp, rsp [NFPGA];
  int sel = 0;
  always_comb begin
    for (int i = 0; i < NFPGA; i++) req[i] = (sel == i) ? ctl_req : '0;
    ctl_rsp = rsp[sel];
  end

  logic chan_valid, chan_sop;
  ant_sample_t chan_sample [NFPGA];
  logic fov [NFPGA], fiv [NFPGA];
  logic [4*SW-1:0] fod [NFPGA], fid [NFPGA];
  beat_t sin [NFPGA], sout [NFPGA];
  logic sin_v [NFPGA], sin_r [NFPGA], sout_v [NFPGA], sout_r [NFPGA];
  logic en [NFPGA], we [NFPGA], ardy [NFPGA], rv [NFPGA];
  logic [AW-1:0] addr [NFPGA];
  logic [511:0] wd [NFPGA], rd [NFPGA];
  logic ovr [NFPGA], fovf [NFPGA], blost [NFPGA], fdone [NFPGA], csent [NFPGA], psent [NFPGA];

  // interchange inside TPM A; B has no partner (combine off)
  assign fiv[0] = fov[1]; assign fid[0] = fod[1];
  assign fiv[1] = fov[0]; assign fid[1] = fod[0];
  assign fiv[2] = 1'b0;   assign fid[2] = '0;
  // station chain A0 -> B
  assign sin[0] = '0; assign sin_v[0] = 1'b0;
  assign sin[1] = '0; assign sin_v[1] = 1'b0;
  assign sin[2] = sout[0]; assign sin_v[2] = sout_v[0]; assign sout_r[0] = sin_r[2];
  assign sout_r[1] = 1'b1;

  for (genvar i = 0; i < NFPGA; i++) begin : g_fpga
    tpm_fpga #(.N_CHAN_IN(NCH), .N_ANT(NA), .N_REGIONS(NR), .ADDR_W(AW), .BURST_LEN(BL), .IN_FRAME_LEN(IFL),
      .NOF_FRAMES(NF), .TPM_NOF_CHANS(NC), .TPM_FRAME_LEN(TFL), .N_CSP(4), .CSP_FIFO_BEATS(16)) dut (
      .clk, .rst, .ctl_req(req[i]), .ctl_rsp(rsp[i]),
      .chan_valid, .chan_sop, .chan_sample(chan_sample[i]),
      .f2f_out_valid(fov[i]), .f2f_out_data(fod[i]), .f2f_in_valid(fiv[i]), .f2f_in_data(fid[i]),
      .spead_in(sin[i]), .spead_in_valid(sin_v[i]), .spead_in_ready(sin_r[i]),
      .spead_out(sout[i]), .spead_out_valid(sout_v[i]), .spead_out_ready(sout_r[i]),
      .app_en(en[i]), .app_we(we[i]), .app_addr(addr[i]), .app_wdata(wd[i]), .app_rdy(ardy[i]),
      .app_rd_valid(rv[i]), .app_rd_data(rd[i]),
      .region_overrun(ovr[i]), .f2f_overflow(fovf[i]), .beam_lost(blost[i]), .frame_done(fdone[i]),
      .csp_sent(csent[i]), .partial_sent(psent[i]));
    ddr_model #(.ADDR_W(AW), .LATENCY(10 + 2*i), .RDY_GAP(2)) mem (.clk, .rst, .app_en(en[i]), .app_we(we[i]),
      .app_addr(addr[i]), .app_wdata(wd[i]), .app_rdy(ardy[i]), .app_rd_valid(rv[i]), .app_rd_data(rd[i]));
  end
  // B's output: random stalls plus a long pause every 3000 cycles, so that
  // reads back up behind the output and meet the next block's writes
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    sout_r[2] = (($urandom % 4) != 0) && ((cyc % 3000) >= 1200);
  end

  `include "axil_tasks.svh"

  // ---- configuration and stimulus ----
  int starts[NR] = '{20, 2, 28, 9};
  int lens[NR]   = '{6, 4, 3, 3};
  int chan_of[IFL];                 // beam position -> input channel
  int reg_of[IFL];
  int tau [NFPGA][NR*NA];
  int tap [NFPGA][NR*NA];
  ant_sample_t xs [NTS][NCH][NFPGA][NA];

  function automatic real absr(real a); return a < 0 ? -a : a; endfunction

  // tile beam model: the FPGAs f_lo..f_hi summed
  function automatic void beam_model(int t, int p, int f_lo, int f_hi, output real v[4]);
    int c, r;
    c = chan_of[p]; r = reg_of[p];
    for (int k = 0; k < 4; k++) v[k] = 0.0;
    for (int f = f_lo; f <= f_hi; f++)
      for (int a = 0; a < NA; a++) begin
        real ph, cr, ci, xr[2], xi[2];
        int idx;
        idx = r * NA + a;
        ph = 2.0 * 3.14159265358979 * real'((tau[f][idx] * c) % 65536) / 65536.0;
        cr = real'(tap[f][idx]) * $cos(ph) / 16384.0;
        ci = real'(tap[f][idx]) * $sin(ph) / 16384.0;
        xr[0] = real'(int'(xs[t][c][f][a].x_re)); xi[0] = real'(int'(xs[t][c][f][a].x_im));
        xr[1] = real'(int'(xs[t][c][f][a].y_re)); xi[1] = real'(int'(xs[t][c][f][a].y_im));
        for (int q = 0; q < 2; q++) begin
          v[2*q]   += xr[q] * cr - xi[q] * ci;
          v[2*q+1] += xr[q] * ci + xi[q] * cr;
        end
      end
  endfunction

  // ---- tile beams as produced, checked against the model ----
  logic [47:0] beam [NFPGA][NTS][IFL];
  int bt [NFPGA] = '{0, 0, 0}, bp [NFPGA] = '{0, 0, 0};
  int n_beam = 0, n_combined = 0, n_uncombined = 0;
  for (genvar i = 0; i < NFPGA; i++) begin : g_beam
    always @(posedge clk) if (!rst && g_fpga[i].dut.b_valid) begin
      real v[4];
      beam_sample_t s;
      s = g_fpga[i].dut.b_sample;
      checks++;
      if (bt[i] >= NTS) begin failures++; $display("FPGA %0d: extra beam", i); end
      else begin
        beam[i][bt[i]][bp[i]] = s;
        if (i == 2) beam_model(bt[i], bp[i], 2, 2, v); else beam_model(bt[i], bp[i], 0, 1, v);
        if (absr(real'(int'(s.x_re)) - v[0]) > 2.0 || absr(real'(int'(s.x_im)) - v[1]) > 2.0 ||
            absr(real'(int'(s.y_re)) - v[2]) > 2.0 || absr(real'(int'(s.y_im)) - v[3]) > 2.0 ||
            g_fpga[i].dut.b_sop !== (bp[i] == 0) || g_fpga[i].dut.b_eop !== (bp[i] == IFL-1)) begin
          failures++;
          if (failures < 10) $display("FPGA %0d beam t%0d p%0d: %0d exp %f", i, bt[i], bp[i], int'(s.x_re), v[0]);
        end
        n_beam++;
        if (i == 2) n_uncombined++; else n_combined++;
        if (bp[i] == IFL-1) begin bp[i] = 0; bt[i]++; end else bp[i]++;
      end
    end
  end

  // ---- CSP packets from B ----
  typedef struct { frame_id_t ids[$]; } pkt_t;
  pkt_t expq[2][$];
  int n_pkts = 0, n_slot1 = 0;
  logic [511:0] rx[$];

  function automatic logic [11:0] sat_add(logic [11:0] a, logic [11:0] b);
    int s;
    s = int'($signed(a)) + int'($signed(b));
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return 12'(s);
  endfunction

  task automatic check_packet();
    frame_id_t id0;
    pkt_t p;
    int j;
    id0 = rx[0][64 +: 48];
    j = int'(id0.group) % 2;
    checks++;
    if (expq[j].size() == 0) begin failures++; $display("unexpected packet"); return; end
    p = expq[j].pop_front();
    if (rx[0][63:56] != 8'h53 || id0 !== p.ids[0] || rx[0][303:296] != 8'd1 || rx[0][271:256] != 16'd2 ||
        rx.size() != 1 + (CSZ+1)*FB) begin
      failures++; $display("bad CSP packet: g%0d i%0d, %0d beats", id0.group, id0.interval, rx.size());
      return;
    end
    n_pkts++;
    if (j == 1) n_slot1++;
    for (int f = 0; f <= CSZ; f++)
      for (int b = 0; b < FB; b++)
        for (int w = 0; w < 8; w++) begin
          int k, c, t, pos;
          logic [63:0] e;
          k = (b * 8 + w) / NC; c = (b * 8 + w) % NC;
          t = int'(p.ids[f].block) * T + int'(p.ids[f].interval) * TFL + k;
          pos = int'(p.ids[f].group) * NC + c;
          e = '0;
          for (int v = 0; v < 4; v++) e[12*v +: 12] = sat_add(beam[0][t][pos][12*v +: 12], beam[2][t][pos][12*v +: 12]);
          checks++;
          if (rx[1 + f*FB + b][64*w +: 64] !== e) begin
            failures++;
            if (failures < 10) $display("CSP t%0d pos%0d: %h exp %h", t, pos, rx[1 + f*FB + b][64*w +: 64], e);
          end
        end
  endtask

  // ---- mechanism counters ----
  int m_region = 0, m_combine = 0, m_seq = 0, m_casc = 0, m_arb = 0, m_ddr_stall = 0, m_out_stall = 0;
  int m_csp = 0, m_partial = 0, m_inner = 0, m_decerr = 0, m_pingpong = 0, m_uncomb = 0;
  always @(posedge clk) if (!rst) begin
    if (g_fpga[0].dut.u_tile_beamformer.u_region_selector.out_sop) m_region++;
    if (fiv[0] && g_fpga[0].dut.u_tile_beamformer.combine) m_combine++;
    if (g_fpga[0].dut.u_station_beamformer.u_corner_turner.i_control_ct.req_valid &&
        g_fpga[0].dut.u_station_beamformer.u_corner_turner.i_control_ct.req_ready) m_seq++;
    if (g_fpga[2].dut.u_station_beamformer.u_corner_turner.casc_frame_stb &&
        g_fpga[2].dut.u_station_beamformer.u_corner_turner.casc_frame_rdy) m_casc++;

    if (en[0] && !ardy[0]) m_ddr_stall++;
    if (sout_v[2] && !sout_r[2]) m_out_stall++;
    if (csent[2]) m_csp++;
    if (psent[0]) m_partial++;
    if (g_fpga[0].dut.u_station_beamformer.u_corner_turner.block_done &&
        g_fpga[0].dut.u_station_beamformer.u_corner_turner.block_num[0]) m_pingpong++;
    if (g_fpga[2].dut.b_valid && !g_fpga[2].dut.u_tile_beamformer.combine) m_uncomb++;
    if (sout_v[2] && sout_r[2]) begin
      rx.push_back(sout[2].data);
      if (sout[2].eop) begin check_packet(); rx.delete(); end
    end
  end

  // a write or a read waiting while the memory port serves the other direction
  for (genvar i = 0; i < NFPGA; i++) begin : g_arb
    always @(posedge clk) if (!rst) begin
      if ((g_fpga[i].dut.u_station_beamformer.u_corner_turner.i_ddr_mem.wr_valid &&
           g_fpga[i].dut.u_station_beamformer.u_corner_turner.i_ddr_mem.state == 2'd2) ||
          (g_fpga[i].dut.u_station_beamformer.u_corner_turner.i_ddr_mem.rd_valid &&
           g_fpga[i].dut.u_station_beamformer.u_corner_turner.i_ddr_mem.state == 2'd1)) m_arb++;
    end
  end

  task automatic count(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", name); end
    else $display("  %-34s %0d", name, n);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d CSP packets, beams %0d", n_pkts, n_beam);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    int p;
    ctl_req = '0; chan_valid = 0; chan_sop = 0;
    for (int i = 0; i < NFPGA; i++) chan_sample[i] = '0;
    p = 0;
    for (int r = 0; r < NR; r++)
      for (int c = starts[r]; c < starts[r] + lens[r]; c++) begin chan_of[p] = c; reg_of[p] = r; p++; end
    for (int t = 0; t < NTS; t++)
      for (int c = 0; c < NCH; c++)
        for (int f = 0; f < NFPGA; f++)
          for (int a = 0; a < NA; a++) xs[t][c][f][a] = ant_sample_t'($urandom);
    // expected CSP packets
    begin
      pkt_t cur[2];
      for (int b = 0; b < NBLK; b++)
        for (int cb = 0; cb < NG / 2; cb++)
          for (int ti = 0; ti <= IBL; ti++)
            for (int j = 0; j < 2; j++) begin
              cur[j].ids.push_back('{block: 24'(b), group: 8'(cb*2 + j), interval: 16'(ti)});
              if (cur[j].ids.size() == CSZ + 1) begin expq[j].push_back(cur[j]); cur[j].ids.delete(); end
            end
    end
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NFPGA; f++) begin
      sel = f;
      for (int r = 0; r < NR; r++) begin
        axil_write(16'h0100 + 16'(4*r), 32'(starts[r]), resp);
        axil_write(16'h0200 + 16'(4*r), 32'(lens[r]), resp);
      end
      for (int i = 0; i < NR*NA; i++) begin
        tau[f][i] = $urandom % 65536;
        tap[f][i] = 4096 + $urandom % 12289;
        axil_write(16'h0400 + 16'(4*i), 32'(tau[f][i]), resp);
        axil_write(16'h0800 + 16'(4*i), 32'(tap[f][i]), resp);
      end
      axil_write(16'h0004, (f == 2) ? 32'h0 : 32'h1, resp);
      axil_write(16'h0000, 32'(NR), resp);
      axil_write(16'h4000, (f == 2) ? 32'h2 : 32'h1, resp);   // B last tile, A0/A1 first tile
      axil_write(16'h4004, IBL, resp);
      axil_write(16'h4008, CSZ, resp);
      axil_write(16'h400C, ICL, resp);
      axil_write(16'h4010, NG - 1, resp);
      axil_write(16'h4014, 32'(f), resp);
      axil_write(16'h8000, 32'h0, resp);                        // unmapped
      checks++;
      if (resp == 2'b11) m_decerr++; else begin failures++; $display("no DECERR"); end
    end
    // channelised samples: all FPGAs in step, one word per cycle
    for (int t = 0; t < NTS; t++) begin
      for (int c = 0; c < NCH; c++)
        for (int a = 0; a < NA; a++) begin
          @(negedge clk);
          chan_valid = 1; chan_sop = (c == 0 && a == 0);
          for (int f = 0; f < NFPGA; f++) chan_sample[f] = xs[t][c][f][a];
        end
      @(negedge clk); chan_valid = 0; chan_sop = 0;
    end
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    repeat (50) @(posedge clk);
    checks++;
    if (n_pkts != NBLK * NG * (IBL + 1) / (CSZ + 1)) begin failures++; $display("CSP packets %0d", n_pkts); end
    for (int f = 0; f < NFPGA; f++) begin
      checks++;
      if (bt[f] != NTS) begin failures++; $display("FPGA %0d: %0d time samples of beam", f, bt[f]); end
      checks++;
      if (ovr[f] || fovf[f] || blost[f]) begin failures++; $display("FPGA %0d lost data", f); end
    end
    $display("mechanisms:");
    count("region selection (time samples)", m_region);
    count("FPGA interchange combine", m_combine);
    count("combine off (beam samples)", m_uncomb);
    count("first-tile frame sequence", m_seq);
    count("cascade frame requests", m_casc);
    count("memory write/read contention", m_arb);
    count("memory controller stall", m_ddr_stall);
    count("output back-pressure", m_out_stall);
    count("CSP frames packed", m_csp);
    count("partial beams forwarded", m_partial);
    count("inner channel loop (slot 1 packets)", n_slot1);
    count("memory half switch (odd blocks)", m_pingpong);
    count("unmapped control access (DECERR)", m_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
