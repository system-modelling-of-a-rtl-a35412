// beam_adder: the Tile Beamformer Beam adder ("Sum Antenna Samples"). The
// frequency domain beamformer delivers the weighted samples of one channel as
// N_ANT consecutive words (antenna 0 first). The adder sums them into the
// local partial beam of that channel. A TPM carries two FPGAs that each serve
// half of the tile's antennas, so the partial beam is also sent to the other
// FPGA (f2f_out) and, when combine is set, the partial beam received from the
// other FPGA (f2f_in) is added before the result is scaled to the 12-bit
// beam sample.
//
// How it works: local sums and received partial sums are queued in two FIFOs
// (both carry the same channel order); a beam sample is produced when both
// queues hold an entry (combine = 1) or when the local queue does (combine =
// 0). The sum is shifted right by COEF_FRAC with rounding and saturated to
// BEAM_W bits per value. out_sop/out_eop mark the first and last channel of a
// time sample. No back-pressure is applied; ovf is a sticky flag set if a
// FIFO ever overflows.
// The block, its summation and its FPGA interchange follow the document; the
// queueing, rounding and the interchange format are this design's choice.
module beam_adder
  import ska_pkg::*;
#(
  parameter int unsigned N_ANT  = 8,
  parameter int unsigned QDEPTH = 256,
  parameter int unsigned SUM_W  = PROD_W + $clog2(N_ANT) + 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      combine,      // add the other FPGA's partial beam
  input  logic                      in_valid,
  input  wsample_t                  in_sample,
  input  logic [$clog2(N_ANT)-1:0]  in_ant,
  input  logic                      in_sop,
  input  logic                      in_eop,
  // FPGA interchange
  output logic                      f2f_out_valid,
  output logic [4*SUM_W-1:0]        f2f_out_data,
  input  logic                      f2f_in_valid,
  input  logic [4*SUM_W-1:0]        f2f_in_data,
  // tile beam
  output logic                      out_valid,
  output beam_sample_t              out_sample,
  output logic                      out_sop,
  output logic                      out_eop,
  output logic                      ovf
);
  localparam int unsigned AW = $clog2(N_ANT);
  typedef logic signed [SUM_W-1:0] sum_t;

  sum_t acc [4];
  logic first_ch;

  // ---- accumulate the antennas of one channel ----
  logic [3:0][SUM_W-1:0] nxt;
  always_comb begin
    nxt[0] = ((in_ant == '0) ? sum_t'(0) : acc[0]) + sum_t'(in_sample.x_re);
    nxt[1] = ((in_ant == '0) ? sum_t'(0) : acc[1]) + sum_t'(in_sample.x_im);
    nxt[2] = ((in_ant == '0) ? sum_t'(0) : acc[2]) + sum_t'(in_sample.y_re);
    nxt[3] = ((in_ant == '0) ? sum_t'(0) : acc[3]) + sum_t'(in_sample.y_im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) acc[i] <= '0;
      first_ch <= 1'b0;
      f2f_out_valid <= 1'b0;
      f2f_out_data  <= '0;
    end else begin
      f2f_out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < 4; i++) acc[i] <= nxt[i];
        if (in_ant == '0) begin
          first_ch <= in_sop;
        end
        if (in_ant == AW'(N_ANT-1)) begin
          f2f_out_valid <= 1'b1;
          f2f_out_data  <= nxt;
        end
      end
    end
  end

  // markers of the channel just completed
  logic mk_sop, mk_eop;
  always_ff @(posedge clk) begin
    if (rst) begin
      mk_sop <= 1'b0; mk_eop <= 1'b0;
    end else if (in_valid && in_ant == AW'(N_ANT-1)) begin
      mk_sop <= (in_ant == '0) ? in_sop : first_ch;
      mk_eop <= in_eop;
    end
  end

  // ---- queues: local partial beam and the other FPGA's partial beam ----
  logic [4*SUM_W+1:0] lq_dout;
  logic [4*SUM_W-1:0] rq_dout;
  logic lq_empty, lq_full, rq_empty, rq_full, pop;
  logic [$clog2(QDEPTH):0] lq_cnt, rq_cnt;

  sync_fifo #(.WIDTH(4*SUM_W+2), .DEPTH(QDEPTH)) u_local_q (
    .clk, .rst, .push(f2f_out_valid), .din({mk_sop, mk_eop, f2f_out_data}),
    .pop, .dout(lq_dout), .empty(lq_empty), .full(lq_full), .count(lq_cnt));
  sync_fifo #(.WIDTH(4*SUM_W), .DEPTH(QDEPTH)) u_remote_q (
    .clk, .rst, .push(f2f_in_valid && combine), .din(f2f_in_data),
    .pop(pop && combine), .dout(rq_dout), .empty(rq_empty), .full(rq_full), .count(rq_cnt));

  assign pop = !lq_empty && (!combine || !rq_empty);

  // ---- combine, round and saturate ----
  function automatic logic signed [BEAM_W-1:0] scale(input sum_t a, input sum_t b);
    logic signed [SUM_W:0] s;
    s = (SUM_W+1)'(a) + (SUM_W+1)'(b) + (SUM_W+1)'(1 << (COEF_FRAC-1));
    s = s >>> COEF_FRAC;
    return sat_beam(32'(s));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_sop <= 1'b0; out_eop <= 1'b0; ovf <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= pop;
      if ((f2f_out_valid && lq_full) || (f2f_in_valid && combine && rq_full)) ovf <= 1'b1;
      if (pop) begin
        out_sop <= lq_dout[4*SUM_W+1];
        out_eop <= lq_dout[4*SUM_W];
        out_sample.x_re <= scale(lq_dout[0*SUM_W +: SUM_W], combine ? rq_dout[0*SUM_W +: SUM_W] : '0);
        out_sample.x_im <= scale(lq_dout[1*SUM_W +: SUM_W], combine ? rq_dout[1*SUM_W +: SUM_W] : '0);
        out_sample.y_re <= scale(lq_dout[2*SUM_W +: SUM_W], combine ? rq_dout[2*SUM_W +: SUM_W] : '0);
        out_sample.y_im <= scale(lq_dout[3*SUM_W +: SUM_W], combine ? rq_dout[3*SUM_W +: SUM_W] : '0);
      end else begin
        out_sop <= 1'b0;
        out_eop <= 1'b0;
      end
    end
  end
endmodule
