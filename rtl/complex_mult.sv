// complex_mult: the Tile Beamformer complex multiplier. It multiplies both
// polarisations of a channelised antenna sample by one complex coefficient,
//   (a + jb)(c + jd) = (ac - bd) + j(ad + bc),
// with full-precision signed results. It uses four products per polarisation
// and is pipelined over two cycles: products registered, then sums
// registered, so the result follows the inputs by LATENCY = 2 cycles. The
// valid bit and a user tag travel with the data. The document names the
// block; the pipelining and widths are this design's choice.
module complex_mult
  import ska_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  ant_sample_t       in_x,
  input  coef_t             in_c,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output wsample_t          out_y,
  output logic [TAG_W-1:0]  out_tag
);
  localparam int unsigned MW = ANT_W + COEF_W;
  logic signed [MW-1:0] p_xrr, p_xii, p_xri, p_xir, p_yrr, p_yii, p_yri, p_yir;
  logic                 v1;
  logic [TAG_W-1:0]     t1;

  always_ff @(posedge clk) begin
    p_xrr <= in_x.x_re * in_c.re;
    p_xii <= in_x.x_im * in_c.im;
    p_xri <= in_x.x_re * in_c.im;
    p_xir <= in_x.x_im * in_c.re;
    p_yrr <= in_x.y_re * in_c.re;
    p_yii <= in_x.y_im * in_c.im;
    p_yri <= in_x.y_re * in_c.im;
    p_yir <= in_x.y_im * in_c.re;
    t1    <= in_tag;
    out_y.x_re <= PROD_W'(p_xrr) - PROD_W'(p_xii);
    out_y.x_im <= PROD_W'(p_xri) + PROD_W'(p_xir);
    out_y.y_re <= PROD_W'(p_yrr) - PROD_W'(p_yii);
    out_y.y_im <= PROD_W'(p_yri) + PROD_W'(p_yir);
    out_tag    <= t1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end
  end
endmodule
