// AXI4-Lite master tasks shared by the testbenches. Included inside a
// testbench module that declares clk, ctl_req (axil_req_t) and ctl_rsp
// (axil_rsp_t). Signals change on the falling edge; each task waits for the
// handshakes on the rising edge and returns the response.
task automatic axil_write(input logic [15:0] addr, input logic [31:0] data, output logic [1:0] resp);
  @(negedge clk);
  ctl_req.awvalid = 1; ctl_req.awaddr = addr; ctl_req.wvalid = 1; ctl_req.wdata = data; ctl_req.bready = 1;
  do @(posedge clk); while (!(ctl_rsp.awready && ctl_rsp.wready));
  @(negedge clk);
  ctl_req.awvalid = 0; ctl_req.wvalid = 0;
  while (!ctl_rsp.bvalid) @(negedge clk);
  resp = ctl_rsp.bresp;
  @(posedge clk);
  @(negedge clk);
  ctl_req.bready = 0;
endtask

task automatic axil_read(input logic [15:0] addr, output logic [31:0] data, output logic [1:0] resp);
  @(negedge clk);
  ctl_req.arvalid = 1; ctl_req.araddr = addr; ctl_req.rready = 1;
  do @(posedge clk); while (!ctl_rsp.arready);
  @(negedge clk);
  ctl_req.arvalid = 0;
  while (!ctl_rsp.rvalid) @(negedge clk);
  data = ctl_rsp.rdata;
  resp = ctl_rsp.rresp;
  @(posedge clk);
  @(negedge clk);
  ctl_req.rready = 0;
endtask
