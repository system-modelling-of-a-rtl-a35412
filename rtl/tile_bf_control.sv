// tile_bf_control: the Tile beamformer control. It is the register interface
// ("ctl") through which the control software loads the region data (the
// region address and region tables and the number of regions) and the
// antenna data (delay and tapering tables), and sets whether the partial beam
// of the other FPGA is added.
//
// Register map (byte addresses on the AXI4-Lite port):
//   0x0000          number of active regions (read/write)
//   0x0004          bit 0: combine with the other FPGA's partial beam (read/write)
//   0x0100 + 4*r    first channel of region r (write)
//   0x0200 + 4*r    number of channels of region r (write)
//   0x0400 + 4*i    antenna delay (phase per channel) for i = {region, antenna} (write)
//   0x0800 + 4*i    antenna taper, Q1.14, for i = {region, antenna} (write)
// Table writes leave as one-cycle strobes to the tables inside the region
// selector and the beamformer. The document names the block and its region
// data / antenna data connections; the register map is this design's.
module tile_bf_control
  import ska_pkg::*;
#(
  parameter int unsigned N_REGIONS = 8,
  parameter int unsigned N_ANT     = 8,
  parameter int unsigned FREQ_W    = 9
) (
  input  logic                               clk,
  input  logic                               rst,
  input  axil_req_t                          ctl_req,
  output axil_rsp_t                          ctl_rsp,
  output logic [$clog2(N_REGIONS):0]         n_regions,
  output logic                               combine,
  output logic                               rstart_we,
  output logic                               rlen_we,
  output logic [$clog2(N_REGIONS)-1:0]       region_waddr,
  output logic [FREQ_W-1:0]                  rstart_wdata,
  output logic [FREQ_W:0]                    rlen_wdata,
  output logic                               delay_we,
  output logic                               taper_we,
  output logic [$clog2(N_REGIONS*N_ANT)-1:0] ant_waddr,
  output logic [15:0]                        ant_wdata
);
  logic              we;
  logic [AXI_AW-1:0] waddr, raddr;
  logic [AXI_DW-1:0] wdata, rdata;

  axil_slave u_axil (.clk, .rst, .req(ctl_req), .rsp(ctl_rsp),
    .reg_we(we), .reg_waddr(waddr), .reg_wdata(wdata), .reg_raddr(raddr), .reg_rdata(rdata));

  always_ff @(posedge clk) begin
    if (rst) begin
      n_regions <= '0;
      combine   <= 1'b0;
    end else if (we) begin
      if (waddr == 16'h0000) n_regions <= wdata[$clog2(N_REGIONS):0];
      if (waddr == 16'h0004) combine   <= wdata[0];
    end
  end

  always_comb begin
    rdata = '0;
    if (raddr == 16'h0000) rdata = AXI_DW'(n_regions);
    if (raddr == 16'h0004) rdata = AXI_DW'(combine);
  end

  assign rstart_we    = we && waddr[15:8] == 8'h01;
  assign rlen_we      = we && waddr[15:8] == 8'h02;
  assign region_waddr = waddr[2 +: $clog2(N_REGIONS)];
  assign rstart_wdata = wdata[FREQ_W-1:0];
  assign rlen_wdata   = wdata[FREQ_W:0];
  assign delay_we     = we && waddr[15:10] == 6'b000001;
  assign taper_we     = we && waddr[15:10] == 6'b000010;
  assign ant_waddr    = waddr[2 +: $clog2(N_REGIONS*N_ANT)];
  assign ant_wdata    = wdata[15:0];
endmodule
