// tile_bf_control_tb: writes every register class of the tile beamformer
// control port over AXI4-Lite and checks that each write produces exactly one
// strobe to the right table with the right address and data, that the
// number of regions and the combine bit read back, and that every response
// is OKAY.
module tile_bf_control_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NR = 8, NA = 8, FW = 9;

  axil_req_t ctl_req;
  axil_rsp_t ctl_rsp;
  logic [3:0] n_regions;
  logic combine, rstart_we, rlen_we, delay_we, taper_we;
  logic [2:0] region_waddr;
  logic [FW-1:0] rstart_wdata;
  logic [FW:0] rlen_wdata;
  logic [5:0] ant_waddr;
  logic [15:0] ant_wdata;

  tile_bf_control #(.N_REGIONS(NR), .N_ANT(NA), .FREQ_W(FW)) dut (.*);

  `include "axil_tasks.svh"

  // strobe log: {kind, addr, data}
  typedef struct { int kind; int addr; int data; } ev_t;
  ev_t evq[$];
  always @(posedge clk) if (!rst) begin
    if (rstart_we) evq.push_back('{1, int'(region_waddr), int'(rstart_wdata)});
    if (rlen_we)   evq.push_back('{2, int'(region_waddr), int'(rlen_wdata)});
    if (delay_we)  evq.push_back('{3, int'(ant_waddr), int'(ant_wdata)});
    if (taper_we)  evq.push_back('{4, int'(ant_waddr), int'(ant_wdata)});
  end

  task automatic check_write(input logic [15:0] a, input int d, input int kind, input int idx, input int val);
    logic [1:0] resp;
    axil_write(a, 32'(d), resp);
    repeat (2) @(posedge clk);
    checks++;
    if (resp != 2'b00) begin failures++; $display("bad bresp %h", a); end
    checks++;
    if (kind == 0) begin
      if (evq.size() != 0) begin failures++; $display("unexpected strobe for %h", a); end
    end else if (evq.size() != 1 || evq[0].kind != kind || evq[0].addr != idx || evq[0].data != val) begin
      failures++;
      $display("write %h: %0d strobes, kind %0d addr %0d data %0d", a, evq.size(),
               evq.size() ? evq[0].kind : -1, evq.size() ? evq[0].addr : -1, evq.size() ? evq[0].data : -1);
    end
    evq.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic [1:0] resp;
    ctl_req = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < NR; r++) begin
      int s, l;
      s = $urandom % 512; l = 1 + $urandom % 512;
      check_write(16'h0100 + 16'(4*r), s, 1, r, s);
      check_write(16'h0200 + 16'(4*r), l, 2, r, l);
    end
    for (int i = 0; i < NR*NA; i += 5) begin
      int d, t;
      d = $urandom % 65536; t = $urandom % 65536;
      check_write(16'h0400 + 16'(4*i), d, 3, i, d);
      check_write(16'h0800 + 16'(4*i), t, 4, i, t);
    end
    check_write(16'h0000, 5, 0, 0, 0);
    check_write(16'h0004, 1, 0, 0, 0);
    checks++;
    if (n_regions != 4'd5 || combine != 1'b1) begin failures++; $display("regs %0d %b", n_regions, combine); end
    axil_read(16'h0000, rd, resp);
    checks++;
    if (rd != 32'd5 || resp != 2'b00) begin failures++; $display("read n_regions %0d", rd); end
    axil_read(16'h0004, rd, resp);
    checks++;
    if (rd != 32'd1) begin failures++; $display("read combine %0d", rd); end
    check_write(16'h0004, 0, 0, 0, 0);
    checks++;
    if (combine != 1'b0) begin failures++; $display("combine not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
