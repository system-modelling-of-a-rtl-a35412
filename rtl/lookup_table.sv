// lookup_table: one of the Tile Beamformer lookup tables (region address
// table, region table, antenna delay table, antenna tapering table). It is a
// memory written one entry at a time from the control interface (wr_en,
// wr_addr, wr_data) and read by the datapath with one cycle of latency
// (rd_addr in cycle n, rd_data valid in cycle n+1). Entries are cleared by
// nothing: the control software loads them before use. The table contents
// and sizes are set by the user; the register-file form is this design's.
module lookup_table #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
