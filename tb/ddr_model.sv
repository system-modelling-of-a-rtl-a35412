// ddr_model: behavioural model of the external DDR memory behind its
// controller's user port, for simulation only. Commands are accepted when
// app_rdy is high; app_rdy drops at random (about 1 cycle in RDY_GAP) to
// imitate refresh and page misses. Writes store a beat at app_addr; reads
// return the stored beat (zero if never written) LATENCY cycles later, in
// order. While rst is high, commands are ignored and reads in flight are
// dropped, as a controller held in reset would. Storage is sparse (associative array), so the full address space
// can be modelled. The user-port signal set is a common memory-controller
// interface chosen for this design; the timing behaviour is the model's own.
module ddr_model #(
  parameter int unsigned ADDR_W   = 29,
  parameter int unsigned BEAT     = 512,
  parameter int unsigned LATENCY  = 12,
  parameter int unsigned RDY_GAP  = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              app_en,
  input  logic              app_we,
  input  logic [ADDR_W-1:0] app_addr,
  input  logic [BEAT-1:0]   app_wdata,
  output logic              app_rdy,
  output logic              app_rd_valid,
  output logic [BEAT-1:0]   app_rd_data
);
  logic [BEAT-1:0] mem [logic [ADDR_W-1:0]];
  logic [BEAT-1:0] pipe_d [LATENCY];
  logic            pipe_v [LATENCY];
  int unsigned     n_wr = 0, n_rd = 0;

  initial begin
    app_rdy = 1'b1;
    for (int i = 0; i < LATENCY; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  always @(posedge clk) begin
    logic [BEAT-1:0] rd;
    rd = '0;
    if (app_en && app_rdy && !rst) begin
      if (app_we) begin
        mem[app_addr] = app_wdata;   // after the read of this cycle's command
        n_wr <= n_wr + 1;
      end else begin
        if (mem.exists(app_addr)) rd = mem[app_addr];
        n_rd <= n_rd + 1;
      end
    end
    pipe_v[0] <= app_en && app_rdy && !app_we && !rst;
    pipe_d[0] <= rd;
    for (int i = 1; i < LATENCY; i++) begin
      pipe_v[i] <= pipe_v[i-1] && !rst;
      pipe_d[i] <= pipe_d[i-1];
    end
    app_rdy <= ($urandom % RDY_GAP) != 0;
  end
  assign app_rd_valid = pipe_v[LATENCY-1];
  assign app_rd_data  = pipe_d[LATENCY-1];
endmodule
