// coef_gen: Tile Beamformer coefficient generation. For antenna k of region r
// at frequency channel f it produces the complex weight
//     w = taper(r,k) * exp(i * tau(r,k) * f)
// which is the factor of the tile beam sum out(f) = sum_k exp(i tau(k) f) x(k,f).
//
// How it works: the antenna delay table holds tau as a phase slope (phase
// units of 2*pi/2^16 per channel), the tapering table an amplitude in Q1.14.
// The phase tau*f is taken modulo 2^16 (one turn). The complex exponential is
// made by a pipelined CORDIC in rotation mode: the start vector is
// (taper * K, 0), kept with GB extra fractional bits, with K = prod 1/sqrt(1+2^-2i) = 0.607253 folded in so that
// the rotated vector has length taper, and it is rotated by the phase in
// CORDIC_N micro-rotations after a half-turn pre-rotation that brings the
// angle into [-pi/2, pi/2].
//
// Interface: in_valid/in_region/in_ant/in_freq enter each cycle; out_valid/
// out_coef follow LATENCY cycles later. The two tables are written through
// the *_we/_waddr/_wdata ports, addressed by {region, antenna}.
// The formula, the tables and their names follow the document; the phase
// format, the CORDIC and all widths are this design's choice.
module coef_gen
  import ska_pkg::*;
#(
  parameter int unsigned N_REGIONS = 8,
  parameter int unsigned N_ANT     = 8,
  parameter int unsigned FREQ_W    = 9,
  parameter int unsigned CORDIC_N  = 14
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic                                   in_valid,
  input  logic [$clog2(N_REGIONS)-1:0]           in_region,
  input  logic [$clog2(N_ANT)-1:0]               in_ant,
  input  logic [FREQ_W-1:0]                      in_freq,
  input  logic                                   delay_we,
  input  logic [$clog2(N_REGIONS*N_ANT)-1:0]     delay_waddr,
  input  logic [PHASE_W-1:0]                     delay_wdata,
  input  logic                                   taper_we,
  input  logic [$clog2(N_REGIONS*N_ANT)-1:0]     taper_waddr,
  input  logic [COEF_W-1:0]                      taper_wdata,
  output logic                                   out_valid,
  output coef_t                                  out_coef
);
  localparam int unsigned TA = $clog2(N_REGIONS*N_ANT);
  localparam int unsigned LATENCY = CORDIC_N + 4;
  localparam int unsigned GB = 4;            // fractional guard bits in the CORDIC
  localparam int unsigned IW = COEF_W + 3 + GB;   // CORDIC datapath width

  // atan(2^-i) in units of 2*pi/2^20 (four guard bits below the phase LSB),
  // i = 0..15: round(atan(2^-i) * 2^20 / (2*pi))
  localparam logic [19:0] ATAN [16] = '{20'd131072, 20'd77376, 20'd40884, 20'd20753,
                                        20'd10417,  20'd5213,  20'd2607,  20'd1304,
                                        20'd652,    20'd326,   20'd163,   20'd81,
                                        20'd41,     20'd20,    20'd10,    20'd5};
  // CORDIC gain compensation, 0.607253 in Q0.16
  localparam logic [16:0] KINV = 17'd39797;

  // ---- stage 0: table lookup ----
  logic [PHASE_W-1:0] tau;
  logic [COEF_W-1:0]  taper;
  logic [FREQ_W-1:0]  freq_d;


  lookup_table #(.WIDTH(PHASE_W), .DEPTH(N_REGIONS*N_ANT)) u_delay_tab (
    .clk, .wr_en(delay_we), .wr_addr(delay_waddr), .wr_data(delay_wdata),
    .rd_addr(TA'({in_region, in_ant})), .rd_data(tau));
  lookup_table #(.WIDTH(COEF_W), .DEPTH(N_REGIONS*N_ANT)) u_taper_tab (
    .clk, .wr_en(taper_we), .wr_addr(taper_waddr), .wr_data(taper_wdata),
    .rd_addr(TA'({in_region, in_ant})), .rd_data(taper));

  always_ff @(posedge clk) freq_d <= in_freq;

  // ---- stage 1: phase = tau * f mod 2^16, start amplitude = taper * K ----
  logic [PHASE_W-1:0]   phase1;
  logic signed [IW-1:0] amp1;
  logic [PHASE_W+FREQ_W-1:0] prod_tf;
  logic [COEF_W+16:0]        prod_ak;
  always_comb begin
    prod_tf = tau * freq_d;
    prod_ak = taper * KINV;
  end
  always_ff @(posedge clk) begin
    phase1 <= prod_tf[PHASE_W-1:0];
    amp1   <= IW'(prod_ak[COEF_W+16:16-GB]);
  end

  // ---- stage 2: half-turn pre-rotation ----
  logic signed [IW-1:0] xs [CORDIC_N+1];
  logic signed [IW-1:0] ys [CORDIC_N+1];
  logic signed [20:0]   zs [CORDIC_N+1];   // angle, 2*pi/2^20 units
  always_ff @(posedge clk) begin
    ys[0] <= '0;
    if (phase1[15] != phase1[14]) begin
      // angle in the left half plane: rotate by pi
      xs[0] <= -amp1;
      zs[0] <= 21'(signed'({phase1 ^ 16'h8000, 4'h0}));
    end else begin
      xs[0] <= amp1;
      zs[0] <= 21'(signed'({phase1, 4'h0}));
    end
  end

  // ---- stages 3 .. CORDIC_N+2: micro-rotations ----
  for (genvar i = 0; i < CORDIC_N; i++) begin : g_cordic
    always_ff @(posedge clk) begin
      if (!zs[i][20]) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - 21'(ATAN[i]);
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + 21'(ATAN[i]);
      end
    end
  end

  // ---- output stage: saturate to the coefficient width ----
  // round away the guard bits, then saturate
  function automatic logic signed [COEF_W-1:0] sat_c(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] r;
    r = (v + IW'(1 << (GB-1))) >>> GB;
    if (r > IW'(32767)) return 16'sd32767;
    else if (r < -IW'(32768)) return -16'sd32768;
    else return r[COEF_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    out_coef.re <= sat_c(xs[CORDIC_N]);
    out_coef.im <= sat_c(ys[CORDIC_N]);
  end

  // valid pipeline
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];
endmodule
