// cornerturner_control: corner turner control and frame sequencer
// (i_control_ct / seq_gen). It keeps track of the two memory halves and
// decides which TPM frames are read.
//
// A half becomes full when the write address generator reports that a whole
// integration block has been written into it (block_done); it is free again
// when the last TPM frame of that block has been issued for reading. The
// writer may only enter a free half (buf_free).
//
// Frame order. The first tile of the chain generates the order itself:
//   for each outer channel block cb = 0 .. NGo/2^icl - 1
//     for each time interval ti = 0 .. int_block_len
//       for each inner channel group j = 0 .. 2^icl - 1
//         frame (block, group = cb*2^icl + j, interval = ti)
// with NGo = max_out_chan + 1 channel groups and icl = inner_chan_loop.
// Every other tile reads the frame that the previous tile announced
// (casc_frame_stb/casc_frame_id), so that the partial beams it adds refer to
// the same channels and times; casc_frame_rdy is high when the request can be
// taken, which is when the read address generator is idle and that block is
// fully stored.
// The order and the cascade ports follow the corner turner description; the
// buffer bookkeeping is this design's.
module cornerturner_control
  import ska_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        first_tile,
  input  logic [11:0] int_block_len,
  input  logic [1:0]  inner_chan_loop,
  input  logic [7:0]  max_out_chan,
  // write side
  input  logic        block_done,
  input  logic [23:0] block_num,        // block now being written (done block + 1)
  output logic [1:0]  buf_free,
  // cascade from the previous tile
  input  logic        casc_frame_stb,
  input  frame_id_t   casc_frame_id,
  output logic        casc_frame_rdy,
  // frame requests to the read address generator
  output logic        req_valid,
  input  logic        req_ready,
  output frame_id_t   req_id,
  input  logic        frame_issued
);
  logic [1:0]  full;
  logic [23:0] stored [2];
  logic [23:0] rd_block;                // next block to be read (first tile)
  logic        last_pending;            // the last frame of a block is being issued
  logic        last_half;

  // sequence counters (first tile)
  logic [7:0]  cb, j;
  logic [15:0] ti;
  logic        gen_active;

  wire [7:0] n_inner   = 8'd1 << inner_chan_loop;
  wire [7:0] n_outer   = 8'((9'(max_out_chan) + 9'd1) >> inner_chan_loop);
  wire [7:0] last_grp  = max_out_chan;

  function automatic logic is_last(input frame_id_t id);
    return id.group == last_grp && id.interval == 16'(int_block_len);
  endfunction

  assign buf_free = ~full;

  wire casc_ok = !first_tile && req_ready && !req_valid && !last_pending
                 && full[casc_frame_id.block[0]] && stored[casc_frame_id.block[0]] == casc_frame_id.block;
  assign casc_frame_rdy = casc_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= '0; stored[0] <= '0; stored[1] <= '0;
      rd_block <= '0; cb <= '0; j <= '0; ti <= '0; gen_active <= 1'b0;
      req_valid <= 1'b0; req_id <= '0; last_pending <= 1'b0; last_half <= 1'b0;
    end else begin
      if (block_done) begin
        full[block_num[0] ^ 1'b1]   <= 1'b1;
        stored[block_num[0] ^ 1'b1] <= block_num - 1'b1;
      end
      if (req_valid && req_ready) begin
        req_valid <= 1'b0;
        if (is_last(req_id)) begin
          last_pending <= 1'b1;
          last_half    <= req_id.block[0];
        end
      end
      if (frame_issued && last_pending) begin
        last_pending    <= 1'b0;
        full[last_half] <= 1'b0;
      end

      if (first_tile) begin
        // generate the frame sequence of block rd_block
        if (!gen_active && full[rd_block[0]] && stored[rd_block[0]] == rd_block && !last_pending) begin
          gen_active <= 1'b1;
          cb <= '0; j <= '0; ti <= '0;
        end else if (gen_active && !req_valid && !last_pending && req_ready) begin
          req_valid <= 1'b1;
          req_id    <= '{block: rd_block, group: (cb << inner_chan_loop) | j, interval: ti};
          if (j == n_inner - 1'b1) begin
            j <= '0;
            if (ti == 16'(int_block_len)) begin
              ti <= '0;
              if (cb == n_outer - 1'b1) begin
                cb         <= '0;
                gen_active <= 1'b0;
                rd_block   <= rd_block + 1'b1;
              end else cb <= cb + 1'b1;
            end else ti <= ti + 1'b1;
          end else j <= j + 1'b1;
        end
      end else if (casc_frame_stb && casc_ok) begin
        req_valid <= 1'b1;
        req_id    <= casc_frame_id;
      end
    end
  end
endmodule
