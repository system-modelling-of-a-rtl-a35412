// sync_fifo_tb: random pushes and pops against a queue model; checks the
// output word, empty, full and count every cycle, including pushes into a
// full FIFO and pops from an empty one, which must be ignored.
module sync_fifo_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, pop, empty, full; logic [7:0] din, dout; logic [4:0] count;
  logic [7:0] q[$];

  sync_fifo #(.WIDTH(8), .DEPTH(16)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 5000; n++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 16) || count !== 5'(q.size())
          || (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d size=%0d count=%0d empty=%b full=%b dout=%h", n, q.size(), count, empty, full, dout);
      end
      bias = (n / 500) % 2 ? 3 : 1;
      push = ($urandom % 4) < bias + 1;
      pop  = ($urandom % 4) < 3 - bias + 1;
      din  = 8'($urandom);
      @(posedge clk);
      begin
        int s;
        s = q.size();
        if (pop && s > 0) void'(q.pop_front());
        if (push && s < 16) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
