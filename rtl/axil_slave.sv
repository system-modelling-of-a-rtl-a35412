// axil_slave: AXI4-Lite slave front end shared by the register interfaces.
// A write is accepted when the address and data channels are both valid and
// no write response is pending; it appears for one cycle on reg_we/reg_waddr/
// reg_wdata and is answered with an OKAY response. A read is accepted when no
// read response is pending; reg_raddr is presented and reg_rdata is returned
// in the next cycle. Single outstanding transaction per direction. The
// register file behind it belongs to the block that instantiates it.
module axil_slave
  import ska_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  axil_req_t         req,
  output axil_rsp_t         rsp,
  output logic              reg_we,
  output logic [AXI_AW-1:0] reg_waddr,
  output logic [AXI_DW-1:0] reg_wdata,
  output logic [AXI_AW-1:0] reg_raddr,
  input  logic [AXI_DW-1:0] reg_rdata
);
  logic bvalid, rvalid, rpend;
  wire  wr_acc = req.awvalid && req.wvalid && !bvalid;
  wire  rd_acc = req.arvalid && !rvalid && !rpend;

  always_ff @(posedge clk) begin
    if (rst) begin
      bvalid <= 1'b0; rvalid <= 1'b0; rpend <= 1'b0; reg_raddr <= '0;
      rsp.rdata <= '0;
    end else begin
      if (wr_acc) bvalid <= 1'b1;
      else if (req.bready) bvalid <= 1'b0;
      if (rd_acc) begin
        rpend     <= 1'b1;
        reg_raddr <= req.araddr;
      end
      if (rpend) begin
        rpend     <= 1'b0;
        rvalid    <= 1'b1;
        rsp.rdata <= reg_rdata;
      end else if (rvalid && req.rready) rvalid <= 1'b0;
    end
  end

  assign reg_we    = wr_acc;
  assign reg_waddr = req.awaddr;
  assign reg_wdata = req.wdata;

  assign rsp.awready = wr_acc;
  assign rsp.wready  = wr_acc;
  assign rsp.bvalid  = bvalid;
  assign rsp.bresp   = 2'b00;
  assign rsp.arready = rd_acc;
  assign rsp.rvalid  = rvalid;
  assign rsp.rresp   = 2'b00;

  // a response is held until it is taken
  property p_bhold; @(posedge clk) disable iff (rst) bvalid && !req.bready |=> bvalid; endproperty
  property p_rhold; @(posedge clk) disable iff (rst) rvalid && !req.rready |=> rvalid; endproperty
  a_bhold: assert property (p_bhold);
  a_rhold: assert property (p_rhold);
endmodule
