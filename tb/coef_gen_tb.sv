// coef_gen_tb: loads random antenna delays and tapers, then requests
// coefficients for random (region, antenna, channel) triples. Each result is
// compared with taper * exp(i * 2*pi * (tau*f mod 2^16) / 2^16) computed here
// in floating point; the CORDIC result must lie within 3 LSB. It also checks
// that out_valid follows in_valid by exactly CORDIC_N + 4 cycles.
module coef_gen_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NR = 8, NA = 8, FW = 9, CN = 14, LAT = CN + 4;

  logic in_valid, out_valid, dwe, twe;
  logic [2:0] reg_, ant;
  logic [FW-1:0] freq;
  logic [5:0] dwa, twa;
  logic [15:0] dwd, twd;
  coef_t coef;

  coef_gen #(.N_REGIONS(NR), .N_ANT(NA), .FREQ_W(FW), .CORDIC_N(CN)) dut (
    .clk, .rst, .in_valid, .in_region(reg_), .in_ant(ant), .in_freq(freq),
    .delay_we(dwe), .delay_waddr(dwa), .delay_wdata(dwd),
    .taper_we(twe), .taper_waddr(twa), .taper_wdata(twd), .out_valid, .out_coef(coef));

  logic [15:0] tau [64];
  logic [15:0] tap [64];
  typedef struct { real re; real im; int cyc; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; dwe = 0; twe = 0; reg_ = 0; ant = 0; freq = 0; dwa = 0; twa = 0; dwd = 0; twd = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      tau[i] = 16'($urandom);
      tap[i] = (i % 5 == 0) ? 16'd16384 : 16'($urandom % 16385);
      dwe = 1; dwa = 6'(i); dwd = tau[i];
      twe = 1; twa = 6'(i); twd = tap[i];
    end
    @(negedge clk); dwe = 0; twe = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      reg_ = 3'($urandom); ant = 3'($urandom); freq = FW'($urandom);
      if (in_valid) begin
        exp_t e;
        int idx;
        real ph;
        idx = {reg_, ant};
        ph = 2.0 * 3.14159265358979 * real'((32'(tau[idx]) * 32'(freq)) % 65536) / 65536.0;
        e.re = real'(tap[idx]) * $cos(ph);
        e.im = real'(tap[idx]) * $sin(ph);
        e.cyc = cycle + LAT + 1;  // sampled at the next edge
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
    real dr, di;
    int cre, cim;
    e = q.pop_front();
    cre = int'(coef.re);
    cim = int'(coef.im);
    dr = real'(cre) - e.re;
    di = real'(cim) - e.im;
    checks++;
    if (dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0 || cycle != e.cyc) begin
      failures++;
      if (failures < 10) $display("got (%0d,%0d) exp (%f,%f) cyc %0d/%0d", cre, cim, e.re, e.im, cycle, e.cyc);
    end
  end
endmodule
