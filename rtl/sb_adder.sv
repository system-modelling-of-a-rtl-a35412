// sb_adder: the Station beamformerAdder ("Add station beam"). Tiles form a
// chain; each adds its own tile beam to the partial station beam of the tiles
// before it.
//
// First tile: it takes the TPM frames that its corner turner produces in its
// own order and adds a zero frame (the dummy SPEAD frame).
// Other tiles: a partial-beam packet arrives on spead_in (header beat, then
// payload beats). Its frame ID, taken from the header, is sent to the corner
// turner as a request (casc_frame_stb/casc_frame_id, "Request DDR frame")
// while the payload is buffered (speadInFifo). The requested local frame
// comes back from the corner turner into ddrFifo, and the two are summed beat
// by beat.
// The sum saturates each 12-bit value (four values per 48-bit sample, one
// sample per 64-bit word, eight words per beat). The result goes out on
// out_* with its frame ID; the formatter decides whether it is sent on as a
// partial beam or packed into station-beam (CSP) frames.
// The flow follows the document's activity and parts; FIFO depths, the
// header parsing and saturation are this design's.
module sb_adder
  import ska_pkg::*;
#(
  parameter int unsigned SPEAD_FIFO = 256,   // beats, at least one TPM frame
  parameter int unsigned DDR_FIFO   = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              first_tile,
  // tile frames from the corner turner
  input  beat_t             tile_beat,
  input  logic              tile_valid,
  output logic              tile_ready,
  input  frame_id_t         tile_id,
  // frame requests to the corner turner
  output logic              casc_frame_stb,
  output frame_id_t         casc_frame_id,
  input  logic              casc_frame_rdy,
  // partial beam from the previous tile
  input  beat_t             spead_in,
  input  logic              spead_in_valid,
  output logic              spead_in_ready,
  // summed frames
  output beat_t             out_beat,
  output logic              out_valid,
  input  logic              out_ready,
  output frame_id_t         out_id,
  output logic              hdr_error     // sticky: spead_in header without the expected magic
);
  // ---------------- speadInFifo and request queue ----------------
  logic       in_hdr;          // next spead_in beat is a header
  logic       first_pl;        // next spead_in beat is the first payload beat
  logic       pop_sum;         // one summed beat is produced
  logic       sq_full, sq_empty, rq_full, rq_empty;
  beat_t      sq_dout;
  frame_id_t  rq_dout;
  logic [$clog2(SPEAD_FIFO):0] sq_cnt;
  logic [4:0] rq_cnt;

  wire spead_hdr_word_ok = spead_in.data[63:56] == 8'h53;
  assign spead_in_ready = !first_tile && (in_hdr ? !rq_full : !sq_full);
  wire  sp_take = spead_in_valid && spead_in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_hdr <= 1'b1; first_pl <= 1'b0; hdr_error <= 1'b0;
    end else if (sp_take) begin
      first_pl <= in_hdr;
      if (in_hdr) begin
        in_hdr <= 1'b0;
        if (!spead_hdr_word_ok) hdr_error <= 1'b1;
      end else if (spead_in.eop) in_hdr <= 1'b1;
    end
  end

  sync_fifo #(.WIDTH($bits(beat_t)), .DEPTH(SPEAD_FIFO)) speadInFifo (
    .clk, .rst, .push(sp_take && !in_hdr),
    .din({first_pl, spead_in.eop, spead_in.data}), .pop(pop_sum && !first_tile),
    .dout(sq_dout), .empty(sq_empty), .full(sq_full), .count(sq_cnt));

  sync_fifo #(.WIDTH(48), .DEPTH(16)) u_req_q (
    .clk, .rst, .push(sp_take && in_hdr), .din(spead_in.data[64 +: 48]), .pop(casc_frame_stb && casc_frame_rdy),
    .dout(rq_dout), .empty(rq_empty), .full(rq_full), .count(rq_cnt));

  assign casc_frame_stb = !first_tile && !rq_empty;
  assign casc_frame_id  = rq_dout;

  // ---------------- ddrFifo ----------------
  logic       dq_full, dq_empty;
  logic [$bits(beat_t)+47:0] dq_dout;
  logic [$clog2(DDR_FIFO):0] dq_cnt;

  assign tile_ready = !dq_full;
  sync_fifo #(.WIDTH($bits(beat_t)+48), .DEPTH(DDR_FIFO)) ddrFifo (
    .clk, .rst, .push(tile_valid && tile_ready), .din({tile_id, tile_beat}), .pop(pop_sum),
    .dout(dq_dout), .empty(dq_empty), .full(dq_full), .count(dq_cnt));

  beat_t     d_beat;
  frame_id_t d_id;
  assign d_beat = dq_dout[$bits(beat_t)-1:0];
  assign d_id   = dq_dout[$bits(beat_t) +: 48];

  // ---------------- adder ----------------
  wire both    = !dq_empty && (first_tile || !sq_empty);
  assign pop_sum = both && (!out_valid || out_ready);

  function automatic logic [BEAT_W-1:0] add_beats(input logic [BEAT_W-1:0] a, input logic [BEAT_W-1:0] b);
    logic [BEAT_W-1:0] r;
    r = '0;
    for (int w = 0; w < 8; w++)
      for (int v = 0; v < 4; v++)
        r[w*64 + v*12 +: 12] = sat_beam(32'(signed'(a[w*64 + v*12 +: 12])) + 32'(signed'(b[w*64 + v*12 +: 12])));
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_beat <= '0; out_id <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (pop_sum) begin
        out_valid     <= 1'b1;
        out_beat.sop  <= d_beat.sop;
        out_beat.eop  <= d_beat.eop;
        out_beat.data <= add_beats(d_beat.data, first_tile ? '0 : sq_dout.data);
        out_id        <= d_id;
      end
    end
  end

  // the partial beam and the local frame must be aligned on frame boundaries
  a_aligned: assert property (@(posedge clk) disable iff (rst)
    pop_sum && !first_tile |-> sq_dout.sop == d_beat.sop && sq_dout.eop == d_beat.eop);
endmodule
