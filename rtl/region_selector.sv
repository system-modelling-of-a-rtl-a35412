// region_selector: the Tile Beamformer Region selector ("Select Channel
// Blocks"). The channeliser delivers, for every time sample, all N_CHAN_IN
// frequency channels of all N_ANT antennas, one antenna sample per cycle in
// the order channel-major, antenna-minor (in_sop marks channel 0, antenna 0).
// Only some blocks of contiguous channels ("regions") are beamformed.
//
// How it works: a ping-pong memory buffer stores a whole time sample while
// the previous one is read out. The region address generation walks the
// regions 0..n_regions-1; the region address table gives each region's first
// channel and the region table its number of channels. For every selected
// channel it reads the N_ANT antenna samples in order, so the output is the
// selected channels, region by region, each with its antennas (this read
// order is also the input reorder). Each output word carries its region
// index and channel number for the beamformer. out_sop/out_eop mark the first
// and last word of a time sample.
//
// Timing: reading starts when a time sample has been completely written; the
// output rate is one word per cycle, with a three-cycle gap per region for the
// table reads. The read of one sample must end before the next sample is
// complete: the regions together may hold at most N_CHAN_IN channels minus
// 3*N_REGIONS/N_ANT words of gap, which the tables must respect.
// The block's parts follow the document; the data order, table contents and
// the ping-pong buffer are this design's choice.
module region_selector
  import ska_pkg::*;
#(
  parameter int unsigned N_CHAN_IN = 512,
  parameter int unsigned N_ANT     = 8,
  parameter int unsigned N_REGIONS = 8,
  parameter int unsigned FREQ_W    = $clog2(N_CHAN_IN)
) (
  input  logic                           clk,
  input  logic                           rst,
  // station input (channelised antenna samples)
  input  logic                           in_valid,
  input  logic                           in_sop,
  input  ant_sample_t                    in_sample,
  // table programming
  input  logic [$clog2(N_REGIONS):0]     n_regions,
  input  logic                           rstart_we,
  input  logic [$clog2(N_REGIONS)-1:0]   rstart_waddr,
  input  logic [FREQ_W-1:0]              rstart_wdata,
  input  logic                           rlen_we,
  input  logic [$clog2(N_REGIONS)-1:0]   rlen_waddr,
  input  logic [FREQ_W:0]                rlen_wdata,
  // selected channels
  output logic                           out_valid,
  output logic                           out_sop,
  output logic                           out_eop,
  output ant_sample_t                    out_sample,
  output logic [$clog2(N_REGIONS)-1:0]   out_region,
  output logic [$clog2(N_ANT)-1:0]       out_ant,
  output logic [FREQ_W-1:0]              out_freq,
  output logic                           overrun      // sticky: new sample done while reading
);
  localparam int unsigned AW   = $clog2(N_ANT);
  localparam int unsigned RW   = $clog2(N_REGIONS);
  localparam int unsigned WPS  = N_CHAN_IN * N_ANT;       // words per time sample
  localparam int unsigned MA   = $clog2(WPS);

  // ---------------- memory buffer (ping-pong) ----------------
  ant_sample_t mem [2*WPS];
  logic [MA-1:0] wr_idx;
  logic          wr_half;
  logic          wr_active;
  logic          sample_done;       // a complete sample was written
  logic          done_half;

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wr_half, (in_sop ? MA'(0) : wr_idx)}] <= in_sample;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx <= '0; wr_half <= 1'b0; wr_active <= 1'b0;
      sample_done <= 1'b0; done_half <= 1'b0;
    end else begin
      sample_done <= 1'b0;
      if (in_valid && (in_sop || wr_active)) begin
        if ((in_sop ? MA'(0) : wr_idx) == MA'(WPS-1)) begin
          wr_idx      <= '0;
          wr_active   <= 1'b0;
          wr_half     <= ~wr_half;
          sample_done <= 1'b1;
          done_half   <= wr_half;
        end else begin
          wr_idx    <= (in_sop ? MA'(0) : wr_idx) + 1'b1;
          wr_active <= 1'b1;
        end
      end
    end
  end

  // ---------------- region tables ----------------
  logic [RW-1:0]     r;
  logic [FREQ_W-1:0] tab_start;
  logic [FREQ_W:0]   tab_len;
  lookup_table #(.WIDTH(FREQ_W), .DEPTH(N_REGIONS)) u_region_addr_tab (
    .clk, .wr_en(rstart_we), .wr_addr(rstart_waddr), .wr_data(rstart_wdata),
    .rd_addr(r), .rd_data(tab_start));
  lookup_table #(.WIDTH(FREQ_W+1), .DEPTH(N_REGIONS)) u_region_tab (
    .clk, .wr_en(rlen_we), .wr_addr(rlen_waddr), .wr_data(rlen_wdata),
    .rd_addr(r), .rd_data(tab_len));

  // ---------------- region address generation ----------------
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_LOAD2, S_RUN} state_t;
  state_t            state;
  logic              rd_half;
  logic [FREQ_W-1:0] chan, chan_end;
  logic [AW-1:0]     ant;
  logic              first_word;

  wire last_ant    = (ant == AW'(N_ANT-1));
  wire last_chan   = (chan == chan_end);
  wire last_region = ({1'b0, r} == n_regions - 1'b1);

  // read-side registered outputs (memory read has one cycle of latency)
  logic              rv, rsop, reop;
  logic [RW-1:0]     rr;
  logic [AW-1:0]     ra;
  logic [FREQ_W-1:0] rc;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; r <= '0; chan <= '0; chan_end <= '0; ant <= '0;
      rd_half <= 1'b0; first_word <= 1'b0; rv <= 1'b0; overrun <= 1'b0;
      rsop <= 1'b0; reop <= 1'b0; rr <= '0; ra <= '0; rc <= '0;
    end else begin
      rv <= 1'b0;
      if (sample_done && state != S_IDLE) overrun <= 1'b1;
      unique case (state)
        S_IDLE: if (sample_done && n_regions != 0) begin
          rd_half    <= done_half;
          r          <= '0;
          first_word <= 1'b1;
          state      <= S_LOAD;
        end
        S_LOAD:  state <= S_LOAD2;  // table read address r is applied
        S_LOAD2: state <= S_RUN;   // table data for region r is on tab_start/tab_len
        S_RUN: begin
          rv   <= 1'b1;
          rsop <= first_word;
          rr   <= r;
          ra   <= ant;
          rc   <= chan;
          first_word <= 1'b0;
          reop <= last_ant && last_chan && last_region;
          if (last_ant) begin
            ant <= '0;
            if (last_chan) begin
              if (last_region) state <= S_IDLE;
              else begin
                r     <= r + 1'b1;
                state <= S_LOAD;
              end
            end else chan <= chan + 1'b1;
          end else ant <= ant + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      // take region r's first channel and length
      if (state == S_LOAD2) begin
        chan     <= tab_start;
        chan_end <= tab_start + FREQ_W'(tab_len - 1'b1);
        ant      <= '0;
      end
    end
  end

  // memory read
  ant_sample_t rd_word;
  always_ff @(posedge clk) rd_word <= mem[{rd_half, MA'(chan) * MA'(N_ANT) + MA'(ant)}];

  assign out_valid  = rv;
  assign out_sop    = rv && rsop;
  assign out_eop    = rv && reop;
  assign out_sample = rd_word;
  assign out_region = rr;
  assign out_ant    = ra;
  assign out_freq   = rc;
endmodule
