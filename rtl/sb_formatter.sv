// sb_formatter: the station beamformer formatter (SB_Formatter). It turns the
// summed TPM frames into packets on spead_out.
//
// Not the last tile: every TPM frame is sent on to the next tile as one
// partial-beam packet, a header beat (hdrGenerator) followed by the frame.
// Last tile: TPM frames are packed into station-beam (CSP) frames of
// csp_frame_size + 1 TPM frames of the same channel group. Because the frame
// order interleaves 2^inner_chan_loop channel groups, each of them collects
// in its own CSP FIFO (cspFifo[j], j = group mod 2^inner_chan_loop); once a
// FIFO holds a whole CSP frame it is sent as one packet, header first.
// The select logic chooses the packet to send; tpmFifo decouples the input.
// Each CSP FIFO holds CSP_FIFO_BEATS beats, enough for csp_frame_size + 1 <=
// CSP_FIFO_BEATS / beats-per-TPM-frame frames; a TPM frame waits in tpmFifo
// while its CSP FIFO is full.
// The parts and the two behaviours follow the document; packet layout,
// FIFO sizes and the send order are this design's.
module sb_formatter
  import ska_pkg::*;
#(
  parameter int unsigned N_CSP          = 4,     // CSP FIFOs (inner-loop channel groups)
  parameter int unsigned CSP_FIFO_BEATS = 1024,
  parameter int unsigned TPM_FIFO_BEATS = 16,
  parameter int unsigned FRAME_BEATS    = 128,   // beats per TPM frame
  parameter int unsigned TPM_NOF_CHANS  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        last_tile,
  input  logic [3:0]  csp_frame_size,
  input  logic [1:0]  inner_chan_loop,
  input  logic [15:0] tile_id,
  input  beat_t       in_beat,
  input  logic        in_valid,
  output logic        in_ready,
  input  frame_id_t   in_id,
  output beat_t       spead_out,
  output logic        spead_out_valid,
  input  logic        spead_out_ready,
  output logic        csp_sent,       // pulses at the end of each CSP frame
  output logic        partial_sent    // pulses at the end of each partial-beam packet
);
  localparam int unsigned JW = (N_CSP > 1) ? $clog2(N_CSP) : 1;

  // ---------------- tpmFifo ----------------
  logic [$bits(beat_t)+47:0] tq_dout;
  logic tq_empty, tq_full, tq_pop;
  logic [$clog2(TPM_FIFO_BEATS):0] tq_cnt;
  sync_fifo #(.WIDTH($bits(beat_t)+48), .DEPTH(TPM_FIFO_BEATS)) tpmFifo (
    .clk, .rst, .push(in_valid && in_ready), .din({in_id, in_beat}), .pop(tq_pop),
    .dout(tq_dout), .empty(tq_empty), .full(tq_full), .count(tq_cnt));
  assign in_ready = !tq_full;

  beat_t     t_beat;
  frame_id_t t_id;
  assign t_beat = tq_dout[$bits(beat_t)-1:0];
  assign t_id   = tq_dout[$bits(beat_t) +: 48];

  // ---------------- header generator ----------------
  frame_id_t  h_id;
  logic       h_kind;
  logic [4:0] h_nframes;
  logic [BEAT_W-1:0] hdr;
  spead_hdr_gen #(.TPM_NOF_CHANS(TPM_NOF_CHANS)) hdrGenerator (
    .id(h_id), .kind(h_kind), .nframes(h_nframes), .tile_id,
    .payload_bytes(32'(h_nframes) * 32'(FRAME_BEATS * BEAT_W / 8)), .hdr);

  // ---------------- cspFifo[j] ----------------
  logic [N_CSP-1:0] cf_push, cf_pop, cf_empty, cf_full, idq_pop;
  beat_t            cf_dout [N_CSP];
  frame_id_t        idq_dout [N_CSP];
  logic [4:0]       frames [N_CSP];    // complete TPM frames stored
  wire  [4:0]       csp_frames = 5'(csp_frame_size) + 5'd1;

  wire [JW-1:0] j_in = JW'(t_id.group & ((8'd1 << inner_chan_loop) - 8'd1));

  for (genvar j = 0; j < N_CSP; j++) begin : g_csp
    logic [$clog2(CSP_FIFO_BEATS):0] cnt;
    logic [4:0] icnt;
    logic       idq_empty, idq_full;
    sync_fifo #(.WIDTH($bits(beat_t)), .DEPTH(CSP_FIFO_BEATS)) cspFifo (
      .clk, .rst, .push(cf_push[j]), .din(t_beat), .pop(cf_pop[j]),
      .dout(cf_dout[j]), .empty(cf_empty[j]), .full(cf_full[j]), .count(cnt));
    // frame IDs of the stored TPM frames
    sync_fifo #(.WIDTH(48), .DEPTH(16)) u_idq (
      .clk, .rst, .push(cf_push[j] && t_beat.sop), .din(t_id), .pop(idq_pop[j]),
      .dout(idq_dout[j]), .empty(idq_empty), .full(idq_full), .count(icnt));
  end

  // ---------------- select / output sequencer ----------------
  typedef enum logic [1:0] {O_IDLE, O_HDR, O_PART, O_CSP} ostate_t;
  ostate_t       ost;
  logic [JW-1:0] sel;
  logic [4:0]    sent;          // TPM frames sent in the current CSP frame

  logic          out_free;
  assign out_free = !spead_out_valid || spead_out_ready;

  // routing of tpmFifo beats into the CSP FIFOs (last tile)
  always_comb begin
    cf_push = '0;
    tq_pop  = 1'b0;
    if (!tq_empty) begin
      if (last_tile) begin
        if (!cf_full[j_in]) begin
          cf_push[j_in] = 1'b1;
          tq_pop        = 1'b1;
        end
      end else if (ost == O_PART && out_free) begin
        tq_pop = 1'b1;
      end
    end
  end

  // which CSP FIFO holds a complete CSP frame
  logic [N_CSP-1:0] ready_j;
  logic [JW-1:0]    first_ready;
  always_comb begin
    first_ready = '0;
    for (int j = N_CSP-1; j >= 0; j--) begin
      ready_j[j] = frames[j] >= csp_frames;
      if (ready_j[j]) first_ready = JW'(j);
    end
  end

  always_comb begin
    cf_pop  = '0;
    idq_pop = '0;
    if (ost == O_CSP && out_free) begin
      cf_pop[sel] = 1'b1;
      if (cf_dout[sel].eop) idq_pop[sel] = 1'b1;
    end
  end

  always_comb begin
    // the header is built in O_IDLE, for the frame or CSP FIFO about to be sent
    h_id      = last_tile ? idq_dout[first_ready] : t_id;
    h_kind    = last_tile;
    h_nframes = last_tile ? csp_frames : 5'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ost <= O_IDLE; sel <= '0; sent <= '0;
      spead_out_valid <= 1'b0; spead_out <= '0;
      csp_sent <= 1'b0; partial_sent <= 1'b0;
      for (int j = 0; j < N_CSP; j++) frames[j] <= '0;
    end else begin
      csp_sent <= 1'b0; partial_sent <= 1'b0;
      if (spead_out_valid && spead_out_ready) spead_out_valid <= 1'b0;
      // count complete frames entering each CSP FIFO
      for (int j = 0; j < N_CSP; j++)
        if (cf_push[j] && t_beat.eop) frames[j] <= frames[j] + 1'b1;
      unique case (ost)
        O_IDLE: if (out_free) begin
          if (!last_tile && !tq_empty && t_beat.sop) begin
            spead_out_valid <= 1'b1;
            spead_out       <= '{sop: 1'b1, eop: 1'b0, data: hdr};
            ost             <= O_PART;
          end else if (last_tile && |ready_j) begin
            sel             <= first_ready;
            sent            <= '0;
            spead_out_valid <= 1'b1;
            spead_out       <= '{sop: 1'b1, eop: 1'b0, data: hdr};
            ost             <= O_HDR;
          end
        end
        O_HDR: ost <= O_CSP;   // header of CSP FIFO sel has been loaded
        O_PART: if (tq_pop) begin
          spead_out_valid <= 1'b1;
          spead_out       <= '{sop: 1'b0, eop: t_beat.eop, data: t_beat.data};
          if (t_beat.eop) begin
            ost <= O_IDLE;
            partial_sent <= 1'b1;
          end
        end
        O_CSP: if (out_free) begin
          spead_out_valid <= 1'b1;
          spead_out.sop   <= 1'b0;
          spead_out.data  <= cf_dout[sel].data;
          spead_out.eop   <= 1'b0;
          if (cf_dout[sel].eop) begin
            sent <= sent + 1'b1;
            if (sent + 1'b1 == csp_frames) begin
              spead_out.eop <= 1'b1;
              ost           <= O_IDLE;
              csp_sent      <= 1'b1;
            end
          end
        end
        default: ost <= O_IDLE;
      endcase
      // frames leaving a CSP FIFO
      if (ost == O_CSP && out_free && cf_dout[sel].eop)
        frames[sel] <= frames[sel] - 1'b1 + ((cf_push[sel] && t_beat.eop) ? 5'd1 : 5'd0);
    end
  end
endmodule
