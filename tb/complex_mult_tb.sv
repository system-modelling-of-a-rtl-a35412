// complex_mult_tb: drives random antenna samples and coefficients into the
// complex multiplier and compares each result, two cycles later, with the
// product computed here in integer arithmetic; also checks the tag and the
// valid latency.
module complex_mult_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  ant_sample_t x;
  coef_t c;
  wsample_t y;
  logic [7:0] tin, tout;

  complex_mult #(.TAG_W(8)) dut (.clk, .rst, .in_valid, .in_x(x), .in_c(c), .in_tag(tin),
    .out_valid, .out_y(y), .out_tag(tout));

  typedef struct { wsample_t y; logic [7:0] t; } exp_t;
  exp_t q[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; x = '0; c = '0; tin = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x = ant_sample_t'($urandom);
      c = coef_t'($urandom);
      if (n % 50 == 0) c = '{re: 16'sh7FFF, im: 16'sh8000};
      if (n % 51 == 0) x = '{y_im: -8'sd128, y_re: -8'sd128, x_im: -8'sd128, x_re: 8'sd127};
      tin = 8'($urandom);
      if (in_valid) begin
        e.y.x_re = PROD_W'(int'(x.x_re) * int'(c.re) - int'(x.x_im) * int'(c.im));
        e.y.x_im = PROD_W'(int'(x.x_re) * int'(c.im) + int'(x.x_im) * int'(c.re));
        e.y.y_re = PROD_W'(int'(x.y_re) * int'(c.re) - int'(x.y_im) * int'(c.im));
        e.y.y_im = PROD_W'(int'(x.y_re) * int'(c.im) + int'(x.y_im) * int'(c.re));
        e.t = tin;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("missing %0d results", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency check: out_valid is in_valid delayed by two cycles
  logic v_d1, v_d2;
  always_ff @(posedge clk) begin
    v_d1 <= rst ? 1'b0 : in_valid;
    v_d2 <= rst ? 1'b0 : v_d1;
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (out_valid !== v_d2) begin failures++; $display("latency mismatch"); end
    if (out_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (y !== e.y || tout !== e.t) begin
        failures++;
        if (failures < 10) $display("mismatch got %h exp %h", y, e.y);
      end
    end
  end
endmodule
