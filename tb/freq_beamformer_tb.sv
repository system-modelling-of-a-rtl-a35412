// freq_beamformer_tb: loads random delay and taper tables, streams random
// antenna samples with random region/antenna/channel tags and checks every
// output against x * taper * exp(i * 2*pi * (tau*f mod 2^16) / 2^16),
// computed here in floating point. The tolerance follows from the 3-LSB
// coefficient accuracy: 3 * (|re| + |im|) + 2 per output value. It also
// checks the tag and the latency of CORDIC_N + 6 cycles.
module freq_beamformer_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NR = 8, NA = 8, FW = 9, CN = 14, LAT = CN + 6;

  logic in_valid, out_valid, dwe, twe;
  ant_sample_t x;
  wsample_t y;
  logic [2:0] reg_, ant;
  logic [FW-1:0] freq;
  logic [7:0] tin, tout;
  logic [5:0] dwa, twa;
  logic [15:0] dwd, twd;

  freq_beamformer #(.N_REGIONS(NR), .N_ANT(NA), .FREQ_W(FW), .TAG_W(8), .CORDIC_N(CN)) dut (
    .clk, .rst, .in_valid, .in_sample(x), .in_region(reg_), .in_ant(ant), .in_freq(freq), .in_tag(tin),
    .delay_we(dwe), .delay_waddr(dwa), .delay_wdata(dwd), .taper_we(twe), .taper_waddr(twa), .taper_wdata(twd),
    .out_valid, .out_sample(y), .out_tag(tout));

  logic [15:0] tau [64];
  logic [15:0] tap [64];
  typedef struct { real v[4]; real tol[4]; logic [7:0] t; int cyc; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic real absr(real a); return a < 0 ? -a : a; endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; dwe = 0; twe = 0; reg_ = 0; ant = 0; freq = 0; dwa = 0; twa = 0; dwd = 0; twd = 0;
    x = '0; tin = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      tau[i] = 16'($urandom);
      tap[i] = 16'($urandom % 16385);
      dwe = 1; dwa = 6'(i); dwd = tau[i];
      twe = 1; twa = 6'(i); twd = tap[i];
    end
    @(negedge clk); dwe = 0; twe = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      reg_ = 3'($urandom); ant = 3'($urandom); freq = FW'($urandom);
      x = ant_sample_t'($urandom); tin = 8'($urandom);
      if (in_valid) begin
        exp_t e;
        int idx;
        real ph, cr, ci, xr[2], xi[2];
        idx = {reg_, ant};
        ph = 2.0 * 3.14159265358979 * real'((32'(tau[idx]) * 32'(freq)) % 65536) / 65536.0;
        cr = real'(tap[idx]) * $cos(ph);
        ci = real'(tap[idx]) * $sin(ph);
        xr[0] = real'(int'(x.x_re)); xi[0] = real'(int'(x.x_im));
        xr[1] = real'(int'(x.y_re)); xi[1] = real'(int'(x.y_im));
        for (int p = 0; p < 2; p++) begin
          e.v[2*p]   = xr[p] * cr - xi[p] * ci;
          e.v[2*p+1] = xr[p] * ci + xi[p] * cr;
          e.tol[2*p]   = 3.0 * (absr(xr[p]) + absr(xi[p])) + 2.0;
          e.tol[2*p+1] = e.tol[2*p];
        end
        e.t = tin;
        e.cyc = cycle + LAT + 1;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("missing %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    real got[4];
    logic bad;
    e = q.pop_front();
    got[0] = real'(int'(y.x_re)); got[1] = real'(int'(y.x_im)); got[2] = real'(int'(y.y_re)); got[3] = real'(int'(y.y_im));
    bad = (tout !== e.t) || (cycle != e.cyc);
    for (int i = 0; i < 4; i++) if (absr(got[i] - e.v[i]) > e.tol[i]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("got %f %f exp %f %f cyc %0d/%0d", got[0], got[1], e.v[0], e.v[1], cycle, e.cyc);
    end
  end
endmodule
