// sb_axi4_if_tb: reads every station beamformer register after reset and
// checks the reset values (first tile, int_block_len 815, csp_frame_size 7,
// inner_chan_loop 0, max_out_chan 0x2F), then writes random values and checks
// both the decoded control outputs and the read-back, and that the status
// register shows the status inputs.
module sb_axi4_if_tb;
  import ska_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_req_t ctl_req;
  axil_rsp_t ctl_rsp;
  logic [7:0] status;
  sb_ctl_t decoded_ctl;

  sb_axi4_if dut (.*);

  `include "axil_tasks.svh"

  task automatic expect_read(input logic [15:0] a, input logic [31:0] e);
    logic [31:0] d;
    logic [1:0] r;
    axil_read(a, d, r);
    checks++;
    if (d !== e || r !== 2'b00) begin failures++; $display("read %h: %h exp %h", a, d, e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r;
    ctl_req = '0; status = 8'h5a;
    repeat (3) @(posedge clk);
    rst <= 0;
    expect_read(16'h00, 32'h1);
    expect_read(16'h04, 32'd815);
    expect_read(16'h08, 32'd7);
    expect_read(16'h0C, 32'd0);
    expect_read(16'h10, 32'h2F);
    expect_read(16'h14, 32'd0);
    expect_read(16'h18, 32'h5a);
    for (int n = 0; n < 10; n++) begin
      logic [31:0] v [6];
      v[0] = $urandom % 4; v[1] = $urandom % 4096; v[2] = $urandom % 16; v[3] = $urandom % 4;
      v[4] = $urandom % 256; v[5] = $urandom % 65536;
      for (int i = 0; i < 6; i++) begin
        axil_write(16'(4*i), v[i], r);
        checks++;
        if (r !== 2'b00) begin failures++; $display("bresp %b", r); end
      end
      checks++;
      if (decoded_ctl.first_tile !== v[0][0] || decoded_ctl.last_tile !== v[0][1] ||
          decoded_ctl.int_block_len !== v[1][11:0] || decoded_ctl.csp_frame_size !== v[2][3:0] ||
          decoded_ctl.inner_chan_loop !== v[3][1:0] || decoded_ctl.max_out_chan !== v[4][7:0] ||
          decoded_ctl.tile_id !== v[5][15:0]) begin
        failures++; $display("decoded controls differ in round %0d", n);
      end
      for (int i = 0; i < 6; i++) expect_read(16'(4*i), v[i]);
      status = 8'($urandom);
      expect_read(16'h18, 32'(status));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
