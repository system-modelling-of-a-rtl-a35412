// beam_adder_tb: feeds random weighted antenna samples, N_ANT per channel,
// and checks (1) that the partial beam sent to the other FPGA is the exact
// sum over the antennas, one cycle after the last antenna, (2) with combine
// off, that each beam sample is the local sum rounded by 2^14 and saturated
// to 12 bits, and (3) with combine on, that the received partial beams (fed
// here with a random lag, before or after the local ones) are added before
// rounding. The sop/eop markers and the output count are checked as well.
module beam_adder_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NA = 8;
  localparam int SW = PROD_W + $clog2(NA) + 1;

  logic combine, in_valid, in_sop, in_eop, f2f_out_valid, f2f_in_valid;
  logic out_valid, out_sop, out_eop, ovf;
  wsample_t in_sample;
  logic [2:0] in_ant;
  logic [4*SW-1:0] f2f_out_data, f2f_in_data;
  beam_sample_t out_sample;

  beam_adder #(.N_ANT(NA), .QDEPTH(64)) dut (.*);

  typedef struct { longint v[4]; bit sop; bit eop; } exp_t;
  exp_t lq[$];           // local sums, in order
  typedef struct { longint v[4]; } vec_t;
  exp_t eq[$];           // expected beam samples
  vec_t f2fq[$];         // expected f2f_out
  int n_out = 0;

  function automatic int ref_scale(longint s);
    longint r;
    r = (s + 8192) >>> 14;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return int'(r);
  endfunction

  function automatic longint sx(input logic [SW-1:0] v);
    logic signed [SW-1:0] t;
    t = v;
    return longint'(t);
  endfunction

  function automatic longint rnd_prod();
    // mostly moderate values, sometimes near full scale to reach saturation
    logic signed [PROD_W-1:0] a;
    logic signed [19:0] b;
    a = PROD_W'($urandom);
    b = 20'($urandom);
    if (($urandom % 8) == 0) return longint'(a);
    return longint'(b);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check f2f output against the exact sums
  always @(posedge clk) if (!rst && f2f_out_valid) begin
    vec_t e;
    checks++;
    if (f2fq.size() == 0) begin failures++; $display("unexpected f2f"); end
    else begin
      e = f2fq.pop_front();
      for (int k = 0; k < 4; k++)
        if (sx(f2f_out_data[k*SW +: SW]) != e.v[k]) begin
          failures++; $display("f2f %0d got %0d exp %0d", k, sx(f2f_out_data[k*SW +: SW]), e.v[k]);
        end
    end
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    n_out++;
    if (eq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = eq.pop_front();
      if (int'(out_sample.x_re) != ref_scale(e.v[0]) || int'(out_sample.x_im) != ref_scale(e.v[1]) ||
          int'(out_sample.y_re) != ref_scale(e.v[2]) || int'(out_sample.y_im) != ref_scale(e.v[3]) ||
          out_sop !== e.sop || out_eop !== e.eop) begin
        failures++;
        if (failures < 10) $display("beam got %0d exp %0d (sop %b/%b eop %b/%b)", int'(out_sample.x_re),
                                    ref_scale(e.v[0]), out_sop, e.sop, out_eop, e.eop);
      end
    end
  end

  task automatic run(input bit comb, input int nch);
    vec_t rem[$];
    combine = comb;
    // the other FPGA's partial beams for these channels
    for (int c = 0; c < nch; c++) begin
      vec_t r;
      for (int k = 0; k < 4; k++) begin
        logic signed [23:0] t;
        t = 24'($urandom);
        r.v[k] = longint'(t) * 16;
      end
      rem.push_back(r);
    end
    fork
      begin : local_side
        for (int c = 0; c < nch; c++) begin
          vec_t s;
          exp_t e;
          for (int k = 0; k < 4; k++) s.v[k] = 0;
          for (int a = 0; a < NA; a++) begin
            wsample_t w;
            longint v[4];
            for (int k = 0; k < 4; k++) v[k] = rnd_prod();
            w.x_re = PROD_W'(v[0]); w.x_im = PROD_W'(v[1]); w.y_re = PROD_W'(v[2]); w.y_im = PROD_W'(v[3]);
            for (int k = 0; k < 4; k++) s.v[k] += v[k];
            @(negedge clk);
            in_valid = 1; in_sample = w; in_ant = 3'(a);
            in_sop = (c == 0 && a == 0); in_eop = (c == nch-1 && a == NA-1);
            if (($urandom % 5) == 0) begin @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0; end
          end
          f2fq.push_back(s);
          for (int k = 0; k < 4; k++) e.v[k] = s.v[k] + (comb ? rem[c].v[k] : 0);
          e.sop = (c == 0); e.eop = (c == nch-1);
          eq.push_back(e);
        end
        @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0;
      end
      begin : remote_side
        if (comb) begin
          repeat ($urandom % 40) @(negedge clk);
          for (int c = 0; c < nch; c++) begin
            @(negedge clk);
            f2f_in_valid = 1;
            for (int k = 0; k < 4; k++) f2f_in_data[k*SW +: SW] = SW'(rem[c].v[k]);
            @(negedge clk); f2f_in_valid = 0;
            repeat ($urandom % 12) @(negedge clk);
          end
        end
      end
    join
    repeat (60) @(posedge clk);
  endtask

  initial begin
    combine = 0; in_valid = 0; in_sop = 0; in_eop = 0; in_sample = '0; in_ant = 0;
    f2f_in_valid = 0; f2f_in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 6; i++) run(i[0], 20 + i);
    checks++;
    if (eq.size() != 0 || f2fq.size() != 0 || n_out != 20+21+22+23+24+25) begin
      failures++; $display("left %0d %0d n_out %0d", eq.size(), f2fq.size(), n_out);
    end
    checks++;
    if (ovf) begin failures++; $display("ovf"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
