// tpm_fpga_full_tb: one complete operation of the FPGA signal chain with
// every parameter at its default: 512 input channels, 8 antennas, 8 regions,
// 192-channel beam frames, 48 channel groups of 4 channels, TPM frames of 256
// time samples. The FPGA is both first and last tile of a one-tile station,
// so it turns its own tile beam into station-beam (CSP) packets.
// Configuration: 8 regions of 24 channels (192 channels in all), combine
// off, int_block_len 0 (one TPM frame per group and block, the smallest
// block: 256 time samples), csp_frame_size 0, four channel groups in the
// inner loop. One block of 256 time samples (about 1.05 million cycles of
// input) is streamed; the block is then read back as 48 TPM frames of 128
// beats. Checks: the tile beam against a floating-point model (2 LSB), every
// CSP payload word against the tile beam in corner-turned order, header
// fields, packet count and order per inner-loop slot, the beam rate of one
// beam sample per channel and time sample, and no loss.
module tpm_fpga_full_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = 512, NA = 8, NR = 8, IFL = 192, NC = 4, TFL = 256;
  localparam int NG = IFL / NC, FB = TFL * NC / 8, ICL = 2;
  localparam int RLEN = IFL / NR;
  localparam int SW = PROD_W + $clog2(NA) + 1;

  axil_req_t ctl_req;
  axil_rsp_t ctl_rsp;
  logic chan_valid, chan_sop;
  ant_sample_t chan_sample;
  logic f2f_out_valid, spead_in_ready, spead_out_valid, spead_out_ready;
  logic [4*SW-1:0] f2f_out_data;
  beat_t spead_out;
  logic app_en, app_we, app_rdy, app_rd_valid;
  logic [28:0] app_addr;
  logic [511:0] app_wdata, app_rd_data;
  logic region_overrun, f2f_overflow, beam_lost, frame_done, csp_sent, partial_sent;

  tpm_fpga dut (
    .clk, .rst, .ctl_req, .ctl_rsp, .chan_valid, .chan_sop, .chan_sample,
    .f2f_out_valid, .f2f_out_data, .f2f_in_valid(1'b0), .f2f_in_data('0),
    .spead_in('0), .spead_in_valid(1'b0), .spead_in_ready, .spead_out, .spead_out_valid, .spead_out_ready,
    .app_en, .app_we, .app_addr, .app_wdata, .app_rdy, .app_rd_valid, .app_rd_data,
    .region_overrun, .f2f_overflow, .beam_lost, .frame_done, .csp_sent, .partial_sent);

  ddr_model #(.ADDR_W(29)) mem (.clk, .rst, .app_en, .app_we, .app_addr, .app_wdata, .app_rdy,
    .app_rd_valid, .app_rd_data);

  `include "axil_tasks.svh"

  int starts[NR] = '{300, 12, 150, 480, 60, 200, 400, 250};
  int chan_of[IFL], reg_of[IFL];
  int tau [NR*NA], tap [NR*NA];

  // antenna sample of time t, channel c, antenna a (a fixed hash)
  function automatic ant_sample_t xsample(int t, int c, int a);
    logic [31:0] h;
    h = 32'(t) * 32'h9E37_79B9 ^ 32'(c) * 32'h85EB_CA6B ^ 32'(a) * 32'hC2B2_AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    return ant_sample_t'(h ^ (h >> 12));
  endfunction

  function automatic real absr(real a); return a < 0 ? -a : a; endfunction

  function automatic void beam_model(int t, int p, output real v[4]);
    int c, r;
    c = chan_of[p]; r = reg_of[p];
    for (int k = 0; k < 4; k++) v[k] = 0.0;
    for (int a = 0; a < NA; a++) begin
      real ph, cr, ci, xr[2], xi[2];
      ant_sample_t x;
      int idx;
      idx = r * NA + a;
      x = xsample(t, c, a);
      ph = 2.0 * 3.14159265358979 * real'((tau[idx] * c) % 65536) / 65536.0;
      cr = real'(tap[idx]) * $cos(ph) / 16384.0;
      ci = real'(tap[idx]) * $sin(ph) / 16384.0;
      xr[0] = real'(int'(x.x_re)); xi[0] = real'(int'(x.x_im));
      xr[1] = real'(int'(x.y_re)); xi[1] = real'(int'(x.y_im));
      for (int q = 0; q < 2; q++) begin
        v[2*q]   += xr[q] * cr - xi[q] * ci;
        v[2*q+1] += xr[q] * ci + xi[q] * cr;
      end
    end
  endfunction

  // ---- tile beam capture and check ----
  logic [47:0] beam [TFL][IFL];
  int bt = 0, bp = 0, n_beam = 0;
  always @(posedge clk) if (!rst && dut.b_valid) begin
    real v[4];
    beam_sample_t s;
    s = dut.b_sample;
    checks++;
    if (bt >= TFL) begin failures++; $display("extra beam sample"); end
    else begin
      beam[bt][bp] = s;
      beam_model(bt, bp, v);
      if (absr(real'(int'(s.x_re)) - v[0]) > 2.0 || absr(real'(int'(s.x_im)) - v[1]) > 2.0 ||
          absr(real'(int'(s.y_re)) - v[2]) > 2.0 || absr(real'(int'(s.y_im)) - v[3]) > 2.0 ||
          dut.b_sop !== (bp == 0) || dut.b_eop !== (bp == IFL-1)) begin
        failures++;
        if (failures < 10) $display("beam t%0d p%0d: %0d exp %f", bt, bp, int'(s.x_re), v[0]);
      end
      n_beam++;
      if (bp == IFL-1) begin bp = 0; bt++; end else bp++;
    end
  end

  // ---- CSP packets ----
  // order of the frame sequencer: outer channel block, interval (only 0), inner group
  int next_grp [4];
  int n_pkts = 0, n_csp = 0;
  logic [511:0] rx[$];
  always @(negedge clk) spead_out_ready = ($urandom % 8) != 0;

  task automatic check_packet();
    frame_id_t id;
    int j;
    id = rx[0][64 +: 48];
    j = int'(id.group) % (1 << ICL);
    checks++;
    if (rx[0][63:56] != 8'h53 || rx[0][303:296] != 8'd1 || rx[0][295:288] != 8'd1 || rx.size() != 1 + FB ||
        int'(id.group) != next_grp[j] || id.block != 24'd0 || id.interval != 16'd0 ||
        rx[0][239:192] != 48'(int'(id.group) * NC)) begin
      failures++;
      $display("bad packet: g%0d (expected g%0d) %0d beats", id.group, next_grp[j], rx.size());
      return;
    end
    next_grp[j] += (1 << ICL);
    n_pkts++;
    for (int b = 0; b < FB; b++)
      for (int w = 0; w < 8; w++) begin
        int k, c;
        k = (b * 8 + w) / NC; c = (b * 8 + w) % NC;
        checks++;
        if (rx[1 + b][64*w +: 64] !== {16'h0, beam[k][int'(id.group) * NC + c]}) begin
          failures++;
          if (failures < 10) $display("CSP g%0d beat %0d word %0d: %h", id.group, b, w, rx[1 + b][64*w +: 64]);
        end
      end
  endtask

  always @(posedge clk) if (!rst) begin
    if (csp_sent) n_csp++;
    if (spead_out_valid && spead_out_ready) begin
      rx.push_back(spead_out.data);
      if (spead_out.eop) begin check_packet(); rx.delete(); end
    end
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog: beams %0d packets %0d", n_beam, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    int p;
    ctl_req = '0; chan_valid = 0; chan_sop = 0; chan_sample = '0;
    for (int j = 0; j < 4; j++) next_grp[j] = j;
    p = 0;
    for (int r = 0; r < NR; r++)
      for (int c = starts[r]; c < starts[r] + RLEN; c++) begin chan_of[p] = c; reg_of[p] = r; p++; end
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < NR; r++) begin
      axil_write(16'h0100 + 16'(4*r), 32'(starts[r]), resp);
      axil_write(16'h0200 + 16'(4*r), 32'(RLEN), resp);
    end
    for (int i = 0; i < NR*NA; i++) begin
      tau[i] = $urandom % 65536;
      tap[i] = 2048 + $urandom % 6000;
      axil_write(16'h0400 + 16'(4*i), 32'(tau[i]), resp);
      axil_write(16'h0800 + 16'(4*i), 32'(tap[i]), resp);
    end
    axil_write(16'h0004, 32'h0, resp);
    axil_write(16'h0000, 32'(NR), resp);
    axil_write(16'h4000, 32'h3, resp);      // first and last tile
    axil_write(16'h4004, 32'd0, resp);      // int_block_len
    axil_write(16'h4008, 32'd0, resp);      // csp_frame_size
    axil_write(16'h400C, 32'(ICL), resp);
    // max_out_chan keeps its reset value, 0x2F (48 groups)
    for (int t = 0; t < TFL; t++) begin
      for (int c = 0; c < NCH; c++)
        for (int a = 0; a < NA; a++) begin
          @(negedge clk);
          chan_valid = 1; chan_sop = (c == 0 && a == 0); chan_sample = xsample(t, c, a);
        end
    end
    @(negedge clk); chan_valid = 0; chan_sop = 0;
    wait (n_pkts == NG);
    repeat (100) @(posedge clk);
    checks++;
    if (n_beam != TFL * IFL) begin failures++; $display("beam samples %0d", n_beam); end
    checks++;
    if (n_csp != NG) begin failures++; $display("csp_sent pulses %0d", n_csp); end
    checks++;
    if (region_overrun || f2f_overflow || beam_lost) begin failures++; $display("data lost"); end
    checks++;
    if (mem.n_wr != TFL * IFL / 8 || mem.n_rd != TFL * IFL / 8) begin
      failures++; $display("memory writes %0d reads %0d", mem.n_wr, mem.n_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
