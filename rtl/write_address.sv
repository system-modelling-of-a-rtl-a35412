// write_address: the corner turner's write address generator (i_wr_addr).
// It turns the (channel group, beat) tag of each memory-frame beat from the
// input corner turner into a memory word address, and keeps the position of
// the integration block being written.
//
// Memory layout (word addresses): the memory holds two integration blocks
// (halves), selected by bit 0 of the block counter. Inside a half, each
// channel group owns a contiguous region of T * TPM_NOF_CHANS words, where
// T = (int_block_len + 1) * TPM_FRAME_LEN time samples; inside it the samples
// are time-major (time t, channel c at t*TPM_NOF_CHANS + c). So a TPM frame of
// one group is one contiguous stretch that is read in whole bursts.
//   addr = half*BUF_WORDS + group*T*NC + mframe*NOF_FRAMES*NC + beat*DDR_TMF
// mframe counts the memory frames written in the current block. When the last
// beat of a block is written, block_done pulses with the block number, the
// block counter advances and the other half is used. A half may only be
// written while buf_free says so (wr_allow).
// The layout follows the corner turner description (time-contiguous
// samples of a few channels); the exact formula and the absence of bank
// interleaving are this design's choice.
module write_address #(
  parameter int unsigned ADDR_W        = 29,
  parameter int unsigned DDR_TMF       = 8,
  parameter int unsigned IN_FRAME_LEN  = 192,
  parameter int unsigned NOF_FRAMES    = 8,
  parameter int unsigned TPM_NOF_CHANS = 4,
  parameter int unsigned TPM_FRAME_LEN = 256
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [11:0]                int_block_len,
  input  logic [1:0]                 buf_free,
  output logic                       wr_allow,
  // beat being written
  input  logic                       addr_valid,   // beat accepted by the memory
  input  logic [$clog2(IN_FRAME_LEN/TPM_NOF_CHANS)-1:0] addr_in_group,
  input  logic [$clog2(NOF_FRAMES*TPM_NOF_CHANS/DDR_TMF+1)-1:0] addr_in_beat,
  output logic [ADDR_W-1:0]          addr_wr_out,
  // block bookkeeping
  output logic                       block_done,
  output logic [23:0]                block_num,    // block being written
  output logic [ADDR_W-1:0]          buf_words,
  output logic [ADDR_W-1:0]          group_words
);
  localparam int unsigned NC  = TPM_NOF_CHANS;
  localparam int unsigned NG  = IN_FRAME_LEN / NC;
  localparam int unsigned WPF = NOF_FRAMES * NC;            // words per memory frame
  localparam int unsigned BPF = WPF / DDR_TMF;
  localparam int unsigned MPT = TPM_FRAME_LEN / NOF_FRAMES; // memory frames per TPM frame length

  logic [ADDR_W-1:0] mframe;       // memory frame index inside the block
  logic [ADDR_W-1:0] mframes_per_block;

  always_ff @(posedge clk) begin
    group_words       <= ADDR_W'((int_block_len + 1) * TPM_FRAME_LEN * NC);
    buf_words         <= ADDR_W'(group_words * NG);
    mframes_per_block <= ADDR_W'((int_block_len + 1) * MPT);
  end

  assign wr_allow = buf_free[block_num[0]];
  assign addr_wr_out = (block_num[0] ? buf_words : '0)
                     + ADDR_W'(addr_in_group) * group_words
                     + mframe * ADDR_W'(WPF)
                     + ADDR_W'(addr_in_beat) * ADDR_W'(DDR_TMF);

  always_ff @(posedge clk) begin
    if (rst) begin
      mframe <= '0; block_num <= '0; block_done <= 1'b0;
    end else begin
      block_done <= 1'b0;
      if (addr_valid && addr_in_group == ($bits(addr_in_group))'(NG-1)
                     && addr_in_beat == ($bits(addr_in_beat))'(BPF-1)) begin
        if (mframe == mframes_per_block - 1'b1) begin
          mframe     <= '0;
          block_done <= 1'b1;
          block_num  <= block_num + 1'b1;
        end else mframe <= mframe + 1'b1;
      end
    end
  end
endmodule
