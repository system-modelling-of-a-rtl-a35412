// axi4_interconnect: the interconnect of the TPM's AXI4 control. One
// AXI4-Lite master (reaching the FPGA through the chip-to-chip link) is
// decoded to N_SLAVES register interfaces by address bits [15:14]: slave 0
// at 0x0000 (tile beamformer), slave 1 at 0x4000 (station beamformer). The
// slave sees the address with those bits cleared. One write and one read may
// be outstanding; the next is held until the response has been taken, so
// responses cannot collide. An access to an unmapped slot gets a DECERR
// response. The document names the interconnect; the address map is this
// design's.
module axi4_interconnect
  import ska_pkg::*;
#(
  parameter int unsigned N_SLAVES = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  m_req,
  output axil_rsp_t  m_rsp,
  output axil_req_t  s_req [N_SLAVES],
  input  axil_rsp_t  s_rsp [N_SLAVES]
);
  logic       wbusy, rbusy;
  logic [1:0] wsel, rsel;
  logic       werr_b, rerr_r;

  wire [1:0] awslot = m_req.awaddr[15:14];
  wire [1:0] arslot = m_req.araddr[15:14];

  always_comb begin
    for (int s = 0; s < N_SLAVES; s++) begin
      s_req[s] = m_req;
      s_req[s].awaddr = {2'b00, m_req.awaddr[13:0]};
      s_req[s].araddr = {2'b00, m_req.araddr[13:0]};
      s_req[s].awvalid = m_req.awvalid && !wbusy && awslot == 2'(s);
      s_req[s].wvalid  = m_req.wvalid  && !wbusy && awslot == 2'(s);
      s_req[s].bready  = m_req.bready  && wbusy && wsel == 2'(s);
      s_req[s].arvalid = m_req.arvalid && !rbusy && arslot == 2'(s);
      s_req[s].rready  = m_req.rready  && rbusy && rsel == 2'(s);
    end
    m_rsp = '0;
    if (!wbusy && int'(awslot) < N_SLAVES) begin
      m_rsp.awready = s_rsp[awslot].awready;
      m_rsp.wready  = s_rsp[awslot].wready;
    end else if (!wbusy) begin
      m_rsp.awready = m_req.awvalid && m_req.wvalid;
      m_rsp.wready  = m_req.awvalid && m_req.wvalid;
    end
    if (wbusy && werr_b) begin
      m_rsp.bvalid = 1'b1;
      m_rsp.bresp  = 2'b11;
    end else if (wbusy) begin
      m_rsp.bvalid = s_rsp[wsel].bvalid;
      m_rsp.bresp  = s_rsp[wsel].bresp;
    end
    if (!rbusy && int'(arslot) < N_SLAVES) m_rsp.arready = s_rsp[arslot].arready;
    else if (!rbusy) m_rsp.arready = m_req.arvalid;
    if (rbusy && rerr_r) begin
      m_rsp.rvalid = 1'b1;
      m_rsp.rresp  = 2'b11;
    end else if (rbusy) begin
      m_rsp.rvalid = s_rsp[rsel].rvalid;
      m_rsp.rdata  = s_rsp[rsel].rdata;
      m_rsp.rresp  = s_rsp[rsel].rresp;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wbusy <= 1'b0; rbusy <= 1'b0; wsel <= '0; rsel <= '0; werr_b <= 1'b0; rerr_r <= 1'b0;
    end else begin
      if (!wbusy && m_rsp.awready) begin
        wbusy <= 1'b1; wsel <= awslot; werr_b <= int'(awslot) >= N_SLAVES;
      end else if (wbusy && m_rsp.bvalid && m_req.bready) wbusy <= 1'b0;
      if (!rbusy && m_req.arvalid && m_rsp.arready) begin
        rbusy <= 1'b1; rsel <= arslot; rerr_r <= int'(arslot) >= N_SLAVES;
      end else if (rbusy && m_rsp.rvalid && m_req.rready) rbusy <= 1'b0;
    end
  end
endmodule
