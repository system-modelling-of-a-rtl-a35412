// sync_fifo: single-clock first-in first-out buffer, used for the SPEAD input
// and memory-frame buffers of the station adder and the TPM/CSP buffers of the
// formatter. The storage is a memory array with registered pointers; a word is
// readable on dout in the cycle after it was written (first-word fall-through
// from the array, no output register). push is ignored when full, pop when
// empty. count gives the occupancy. Depth is a power of two. The document names
// these FIFOs; their depth and width are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
