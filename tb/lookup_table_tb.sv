// lookup_table_tb: fills the table with random words, reads every entry
// back in random order and checks the one-cycle read latency and the data
// against a copy kept here; then overwrites some entries and checks again.
module lookup_table_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 16, D = 64;
  logic we; logic [5:0] wa, ra; logic [W-1:0] wd, rd;
  logic [W-1:0] model [D];

  lookup_table #(.WIDTH(W), .DEPTH(D)) dut (.clk, .wr_en(we), .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < D; i++) begin
        if (pass == 0 || ($urandom % 3) == 0) begin
          @(negedge clk);
          we = 1; wa = 6'(i); wd = W'($urandom); model[i] = wd;
        end
      end
      @(negedge clk); we = 0;
      for (int n = 0; n < 200; n++) begin
        logic [5:0] a;
        @(negedge clk);
        a = 6'($urandom); ra = a;
        @(posedge clk); #1;
        checks++;
        if (rd !== model[a]) begin failures++; $display("addr %0d got %h exp %h", a, rd, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
