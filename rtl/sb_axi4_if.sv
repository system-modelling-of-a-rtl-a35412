// sb_axi4_if: the station beamformer's register interface
// (StationBeamformerAxi4If). An AXI4-Lite slave holds the controls of the
// corner turner, adder and formatter and hands them out decoded (decoded_ctl).
//
// Register map (byte addresses):
//   0x00  bit 0 first_tile, bit 1 last_tile             reset 0b01
//   0x04  int_block_len  (TPM frames per group - 1)     reset 815 (102*8-1)
//   0x08  csp_frame_size (TPM frames per CSP frame - 1) reset 7
//   0x0C  inner_chan_loop (log2 of inner-loop groups)   reset 0
//   0x10  max_out_chan   (last channel group sent)      reset 0x2F
//   0x14  tile_id                                       reset 0
//   0x18  status (read only): status input bits
// The reset values are the corner turner entity's port defaults; the map is
// this design's.
module sb_axi4_if
  import ska_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  ctl_req,
  output axil_rsp_t  ctl_rsp,
  input  logic [7:0] status,
  output sb_ctl_t    decoded_ctl
);
  logic              we;
  logic [AXI_AW-1:0] waddr, raddr;
  logic [AXI_DW-1:0] wdata, rdata;

  axil_slave u_axil (.clk, .rst, .req(ctl_req), .rsp(ctl_rsp),
    .reg_we(we), .reg_waddr(waddr), .reg_wdata(wdata), .reg_raddr(raddr), .reg_rdata(rdata));

  always_ff @(posedge clk) begin
    if (rst) begin
      decoded_ctl <= '{first_tile: 1'b1, last_tile: 1'b0, int_block_len: 12'(102*8-1),
                       csp_frame_size: 4'd7, inner_chan_loop: 2'd0, max_out_chan: 8'h2F,
                       tile_id: 16'd0};
    end else if (we) begin
      unique case (waddr[7:0])
        8'h00: begin
          decoded_ctl.first_tile <= wdata[0];
          decoded_ctl.last_tile  <= wdata[1];
        end
        8'h04: decoded_ctl.int_block_len   <= wdata[11:0];
        8'h08: decoded_ctl.csp_frame_size  <= wdata[3:0];
        8'h0C: decoded_ctl.inner_chan_loop <= wdata[1:0];
        8'h10: decoded_ctl.max_out_chan    <= wdata[7:0];
        8'h14: decoded_ctl.tile_id         <= wdata[15:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (raddr[7:0])
      8'h00: rdata = {30'd0, decoded_ctl.last_tile, decoded_ctl.first_tile};
      8'h04: rdata = 32'(decoded_ctl.int_block_len);
      8'h08: rdata = 32'(decoded_ctl.csp_frame_size);
      8'h0C: rdata = 32'(decoded_ctl.inner_chan_loop);
      8'h10: rdata = 32'(decoded_ctl.max_out_chan);
      8'h14: rdata = 32'(decoded_ctl.tile_id);
      8'h18: rdata = 32'(status);
      default: rdata = '0;
    endcase
  end
endmodule
