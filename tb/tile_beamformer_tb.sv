// tile_beamformer_tb: the two FPGAs of one TPM, each a tile beamformer with
// 4 antennas, 64 input channels and 4 regions, connected to each other over
// the FPGA interchange with combine set, so that each produces the beam of
// all 8 antennas. Both are programmed over AXI4-Lite with the same regions and
// their own random delays and tapers. Random antenna samples are streamed for
// several time samples. For every selected channel the test computes, in
// floating point, sum over both FPGAs' antennas of x * taper * exp(i 2pi
// (tau f mod 2^16) / 2^16) / 2^14 and compares each 12-bit value of the beam
// with a tolerance of 2 LSB; the two FPGAs must give identical beams. It also
// checks the channel order, sop/eop and that one beam sample per selected
// channel leaves per time sample.
module tile_beamformer_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = 64, NA = 4, NR = 4, NT = 5;
  localparam int SW = PROD_W + $clog2(NA) + 1;

  axil_req_t ctl_req, req [2];
  axil_rsp_t ctl_rsp, rsp [2];
  int sel = 0;
  always_comb begin
    req[0] = (sel == 0) ? ctl_req : '0;
    req[1] = (sel == 1) ? ctl_req : '0;
    ctl_rsp = rsp[sel];
  end

  logic in_valid, in_sop;
  ant_sample_t in_sample [2];
  logic fv [2];
  logic [4*SW-1:0] fd [2];
  logic bv [2], bsop [2], beop [2], overrun [2], ovf [2];
  beam_sample_t bs [2];

  for (genvar i = 0; i < 2; i++) begin : g_fpga
    tile_beamformer #(.N_CHAN_IN(NCH), .N_ANT(NA), .N_REGIONS(NR)) u_tbf (
      .clk, .rst, .ctl_req(req[i]), .ctl_rsp(rsp[i]), .in_valid, .in_sop, .in_sample(in_sample[i]),
      .f2f_out_valid(fv[i]), .f2f_out_data(fd[i]), .f2f_in_valid(fv[1-i]), .f2f_in_data(fd[1-i]),
      .beam_valid(bv[i]), .beam_sop(bsop[i]), .beam_eop(beop[i]), .beam_sample(bs[i]),
      .overrun(overrun[i]), .ovf(ovf[i]));
  end

  `include "axil_tasks.svh"

  int starts[NR] = '{33, 2, 50, 17};
  int lens[NR]   = '{6, 4, 9, 3};
  int tau [2][NR*NA];
  int tap [2][NR*NA];
  ant_sample_t xs [NT][NCH][2][NA];

  typedef struct { real v[4]; int ch; bit sop, eop; } exp_t;
  exp_t eq[2][$];

  function automatic void expect_time(int t);
    int r_of_ch;
    for (int r = 0; r < NR; r++)
      for (int c = starts[r]; c < starts[r] + lens[r]; c++) begin
        exp_t e;
        for (int k = 0; k < 4; k++) e.v[k] = 0.0;
        for (int f = 0; f < 2; f++)
          for (int a = 0; a < NA; a++) begin
            real ph, cr, ci, xr[2], xi[2];
            int idx;
            idx = r * NA + a;
            ph = 2.0 * 3.14159265358979 * real'((tau[f][idx] * c) % 65536) / 65536.0;
            cr = real'(tap[f][idx]) * $cos(ph) / 16384.0;
            ci = real'(tap[f][idx]) * $sin(ph) / 16384.0;
            xr[0] = real'(int'(xs[t][c][f][a].x_re)); xi[0] = real'(int'(xs[t][c][f][a].x_im));
            xr[1] = real'(int'(xs[t][c][f][a].y_re)); xi[1] = real'(int'(xs[t][c][f][a].y_im));
            for (int p = 0; p < 2; p++) begin
              e.v[2*p]   += xr[p] * cr - xi[p] * ci;
              e.v[2*p+1] += xr[p] * ci + xi[p] * cr;
            end
          end
        e.ch = c;
        e.sop = (r == 0 && c == starts[0]);
        e.eop = (r == NR-1 && c == starts[NR-1] + lens[NR-1] - 1);
        eq[0].push_back(e);
        eq[1].push_back(e);
      end
  endfunction

  int n_beam [2] = '{0, 0};
  for (genvar i = 0; i < 2; i++) begin : g_chk
    always @(posedge clk) if (!rst && bv[i]) begin
      exp_t e;
      real got[4];
      n_beam[i]++;
      checks++;
      if (eq[i].size() == 0) begin failures++; $display("fpga %0d: unexpected beam", i); end
      else begin
        e = eq[i].pop_front();
        got[0] = real'(int'(bs[i].x_re)); got[1] = real'(int'(bs[i].x_im));
        got[2] = real'(int'(bs[i].y_re)); got[3] = real'(int'(bs[i].y_im));
        for (int k = 0; k < 4; k++)
          if (got[k] - e.v[k] > 2.0 || e.v[k] - got[k] > 2.0) begin
            failures++;
            if (failures < 10) $display("fpga %0d ch %0d value %0d: %0d exp %f", i, e.ch, k, int'(got[k]), e.v[k]);
          end
        if (bsop[i] !== e.sop || beop[i] !== e.eop) begin failures++; $display("markers ch %0d", e.ch); end
      end
      if (i == 0) begin
        checks++;
        if (bs[0] !== bs[1] || bv[1] !== 1'b1) begin failures++; $display("FPGAs differ"); end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    ctl_req = '0; in_valid = 0; in_sop = 0; in_sample[0] = '0; in_sample[1] = '0;
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < NCH; c++)
        for (int f = 0; f < 2; f++)
          for (int a = 0; a < NA; a++) xs[t][c][f][a] = ant_sample_t'($urandom);
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
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
      axil_write(16'h0004, 32'h1, resp);
      axil_write(16'h0000, 32'(NR), resp);
    end
    for (int t = 0; t < NT; t++) begin
      void'(expect_time(t));
      for (int c = 0; c < NCH; c++)
        for (int a = 0; a < NA; a++) begin
          @(negedge clk);
          in_valid = 1; in_sop = (c == 0 && a == 0);
          in_sample[0] = xs[t][c][0][a]; in_sample[1] = xs[t][c][1][a];
        end
      @(negedge clk); in_valid = 0; in_sop = 0;
      repeat ($urandom % 10) @(negedge clk);
    end
    repeat (300) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (n_beam[i] != NT * (6 + 4 + 9 + 3) || eq[i].size() != 0) begin
        failures++; $display("fpga %0d: %0d beams", i, n_beam[i]);
      end
      checks++;
      if (overrun[i] || ovf[i]) begin failures++; $display("fpga %0d overrun/overflow", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
