// read_address: the corner turner's read address generator (i_rd_addr). For a
// requested TPM frame, identified by its frame ID (block, channel group, time
// interval), it issues the memory read commands that fetch the frame: the
// TPM_FRAME_LEN x TPM_NOF_CHANS samples of that group and interval, which the
// write layout keeps contiguous, one command per DDR_TMF-word beat, grouped in
// bursts of BURST_LEN words.
//   start = half*BUF_WORDS + group*T*NC + interval*TPM_FRAME_LEN*NC
// Each command carries sop/eop (first/last beat of the frame), a burst-start
// flag and the frame ID. frame_issued pulses when the last command of a frame
// has been accepted. One request is taken at a time (req_ready).
// The frame ID input and the address output follow the corner turner figure;
// the command format is this design's.
module read_address
  import ska_pkg::*;
#(
  parameter int unsigned ADDR_W        = 29,
  parameter int unsigned DDR_TMF       = 8,
  parameter int unsigned BURST_LEN     = 64,
  parameter int unsigned TPM_NOF_CHANS = 4,
  parameter int unsigned TPM_FRAME_LEN = 256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [ADDR_W-1:0]  buf_words,
  input  logic [ADDR_W-1:0]  group_words,
  // frame request
  input  logic               req_valid,
  output logic               req_ready,
  input  frame_id_t          req_id,
  // read commands
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output logic [ADDR_W-1:0]  addr_rd_out,
  output logic               cmd_sop,
  output logic               cmd_eop,
  output logic               cmd_burst_start,
  output frame_id_t          cmd_id,
  output logic               frame_issued
);
  localparam int unsigned NC  = TPM_NOF_CHANS;
  localparam int unsigned FW  = TPM_FRAME_LEN * NC;        // words per TPM frame
  localparam int unsigned BPF = FW / DDR_TMF;              // beats per TPM frame
  localparam int unsigned BPB = BURST_LEN / DDR_TMF;       // beats per burst
  localparam int unsigned BW  = $clog2(BPF);

  logic          active;
  logic [BW-1:0] beat;
  logic [ADDR_W-1:0] base;

  assign req_ready       = !active;
  assign cmd_valid       = active;
  assign addr_rd_out     = base + ADDR_W'(beat) * ADDR_W'(DDR_TMF);
  assign cmd_sop         = (beat == '0);
  assign cmd_eop         = (beat == BW'(BPF-1));
  assign cmd_burst_start = (beat % BW'(BPB)) == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; beat <= '0; base <= '0; cmd_id <= '0; frame_issued <= 1'b0;
    end else begin
      frame_issued <= 1'b0;
      if (!active && req_valid) begin
        active <= 1'b1;
        beat   <= '0;
        cmd_id <= req_id;
        base   <= (req_id.block[0] ? buf_words : '0)
                + ADDR_W'(req_id.group) * group_words
                + ADDR_W'(req_id.interval) * ADDR_W'(FW);
      end else if (active && cmd_ready) begin
        if (beat == BW'(BPF-1)) begin
          active       <= 1'b0;
          frame_issued <= 1'b1;
        end
        beat <= beat + 1'b1;
      end
    end
  end
endmodule
