// region_selector_tb: programs a set of channel regions (in an order that
// differs from the channel order, so the reorder is exercised), streams
// several time samples of known antenna data (each word encodes its time,
// channel and antenna) and checks that the output is exactly the selected
// channels, region by region, antennas in order, with the right region
// index, channel number and sop/eop markers. It also checks that a new time
// sample is not needed before the previous one is read (no overrun).
module region_selector_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NC = 64, NA = 4, NR = 4, FW = 6;

  logic in_valid, in_sop, out_valid, out_sop, out_eop, overrun;
  ant_sample_t in_sample, out_sample;
  logic [2:0] n_regions;
  logic rs_we, rl_we;
  logic [1:0] rs_wa, rl_wa, out_region, out_ant;
  logic [FW-1:0] rs_wd, out_freq;
  logic [FW:0] rl_wd;

  region_selector #(.N_CHAN_IN(NC), .N_ANT(NA), .N_REGIONS(NR)) dut (
    .clk, .rst, .in_valid, .in_sop, .in_sample, .n_regions,
    .rstart_we(rs_we), .rstart_waddr(rs_wa), .rstart_wdata(rs_wd),
    .rlen_we(rl_we), .rlen_waddr(rl_wa), .rlen_wdata(rl_wd),
    .out_valid, .out_sop, .out_eop, .out_sample, .out_region, .out_ant, .out_freq, .overrun);

  int starts[NR] = '{40, 3, 20, 60};
  int lens[NR]   = '{5, 7, 1, 4};
  typedef struct { ant_sample_t s; int r; int a; int f; bit sop; bit eop; } exp_t;
  exp_t q[$];
  int samples_out = 0;

  function automatic ant_sample_t word(int t, int c, int a);
    return ant_sample_t'({8'(t), 8'(c), 8'(a), 8'(t ^ c ^ a)});
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sop = 0; in_sample = '0; n_regions = 0;
    rs_we = 0; rl_we = 0; rs_wa = 0; rl_wa = 0; rs_wd = 0; rl_wd = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      rs_we = 1; rs_wa = 2'(r); rs_wd = FW'(starts[r]);
      rl_we = 1; rl_wa = 2'(r); rl_wd = (FW+1)'(lens[r]);
    end
    @(negedge clk); rs_we = 0; rl_we = 0; n_regions = 3'(NR);
    for (int t = 0; t < 6; t++) begin
      // expected output of this time sample
      for (int r = 0; r < NR; r++)
        for (int c = starts[r]; c < starts[r] + lens[r]; c++)
          for (int a = 0; a < NA; a++) begin
            exp_t e;
            e.s = word(t, c, a); e.r = r; e.a = a; e.f = c;
            e.sop = (r == 0 && c == starts[0] && a == 0);
            e.eop = (r == NR-1 && c == starts[NR-1] + lens[NR-1] - 1 && a == NA-1);
            q.push_back(e);
          end
      for (int c = 0; c < NC; c++)
        for (int a = 0; a < NA; a++) begin
          if (($urandom % 8) == 0) begin
            @(negedge clk); in_valid = 0;   // idle cycle inside the frame
          end
          @(negedge clk);
          in_valid = 1; in_sop = (c == 0 && a == 0); in_sample = word(t, c, a);
        end
      @(negedge clk); in_valid = 0; in_sop = 0;
    end
    repeat (400) @(posedge clk);
    checks++;
    if (q.size() != 0 || samples_out != 6) begin failures++; $display("left %0d samples_out %0d", q.size(), samples_out); end
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (out_sample !== e.s || int'(out_region) != e.r || int'(out_ant) != e.a || int'(out_freq) != e.f
          || out_sop !== e.sop || out_eop !== e.eop) begin
        failures++;
        if (failures < 10) $display("got %h r%0d a%0d f%0d sop%b eop%b exp %h r%0d a%0d f%0d", out_sample, out_region,
                                    out_ant, out_freq, out_sop, out_eop, e.s, e.r, e.a, e.f);
      end
      if (out_eop) samples_out++;
    end
  end
endmodule
