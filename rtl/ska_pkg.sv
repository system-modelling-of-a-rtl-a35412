// ska_pkg: types and constants shared by the tile beamformer and the station
// beamformer of one Tile Processing Module (TPM) FPGA.
//
// Sample formats. A channelised antenna sample carries two polarisations, each
// a complex number (ANT_W bits per real/imaginary part). A beam sample carries
// the same four values at BEAM_W bits: four 12-bit values make the 48-bit
// sample that the corner turner stores, one per 64-bit memory word, with the
// upper 16 bits zero. The 48-bit sample and 64-bit word follow the corner
// turner's design values; ANT_W, COEF_W and the struct layouts are this
// design's choice.
//
// Buses. Frame streams between the corner turner, the station adder and the
// formatter are 512-bit beats (eight memory words) with sop/eop markers and a
// valid/ready handshake. Control registers are reached over AXI4-Lite,
// carried here as a request struct and a response struct.
package ska_pkg;

  // ---------------- sample widths ----------------
  localparam int unsigned ANT_W   = 8;   // bits per real/imag part, channelised antenna data
  localparam int unsigned BEAM_W  = 12;  // bits per real/imag part, beam data (48-bit sample)
  localparam int unsigned COEF_W  = 16;  // beamforming coefficient, signed Q1.14
  localparam int unsigned COEF_FRAC = 14;
  localparam int unsigned PHASE_W = 16;  // phase in units of 2*pi/2^16

  // antenna sample: polarisation X and Y, complex
  typedef struct packed {
    logic signed [ANT_W-1:0] y_im;
    logic signed [ANT_W-1:0] y_re;
    logic signed [ANT_W-1:0] x_im;
    logic signed [ANT_W-1:0] x_re;
  } ant_sample_t;

  // weighted antenna sample (full precision before summation)
  localparam int unsigned PROD_W = ANT_W + COEF_W + 1;
  typedef struct packed {
    logic signed [PROD_W-1:0] y_im;
    logic signed [PROD_W-1:0] y_re;
    logic signed [PROD_W-1:0] x_im;
    logic signed [PROD_W-1:0] x_re;
  } wsample_t;

  // beam sample: 4 x 12 bits = 48 bits, the corner turner sample
  typedef struct packed {
    logic signed [BEAM_W-1:0] y_im;
    logic signed [BEAM_W-1:0] y_re;
    logic signed [BEAM_W-1:0] x_im;
    logic signed [BEAM_W-1:0] x_re;
  } beam_sample_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] im;
    logic signed [COEF_W-1:0] re;
  } coef_t;

  // ---------------- frame identifier ----------------
  // 48-bit TPM frame identifier, passed from tile to tile so that every tile
  // reads the same frame from its own memory.
  typedef struct packed {
    logic [23:0] block;     // integration block counter (bit 0 selects the memory half)
    logic [7:0]  group;     // channel group (g_tpm_nof_chans channels each)
    logic [15:0] interval;  // time interval inside the integration block
  } frame_id_t;

  // ---------------- 512-bit frame stream ----------------
  localparam int unsigned BEAT_W = 512;
  typedef struct packed {
    logic              sop;
    logic              eop;
    logic [BEAT_W-1:0] data;
  } beat_t;

  // 16-bit SPEAD-style header constants
  localparam logic [63:0] SPEAD_MAGIC = 64'h5304_0206_0000_0000;
  localparam logic [15:0] ITEM_HEAP_CNT = 16'h8001;
  localparam logic [15:0] ITEM_HEAP_LEN = 16'h8004;
  localparam logic [15:0] ITEM_CHAN     = 16'h9011;
  localparam logic [15:0] ITEM_KIND     = 16'h9012;

  // ---------------- AXI4-Lite ----------------
  localparam int unsigned AXI_AW = 16;
  localparam int unsigned AXI_DW = 32;
  typedef struct packed {
    logic              awvalid;
    logic [AXI_AW-1:0] awaddr;
    logic              wvalid;
    logic [AXI_DW-1:0] wdata;
    logic              bready;
    logic              arvalid;
    logic [AXI_AW-1:0] araddr;
    logic              rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic              bvalid;
    logic [1:0]        bresp;
    logic              arready;
    logic              rvalid;
    logic [AXI_DW-1:0] rdata;
    logic [1:0]        rresp;
  } axil_rsp_t;

  // decoded station beamformer controls
  typedef struct packed {
    logic        first_tile;
    logic        last_tile;
    logic [11:0] int_block_len;    // TPM frames per channel group, minus 1
    logic [3:0]  csp_frame_size;   // TPM frames per CSP frame, minus 1
    logic [1:0]  inner_chan_loop;  // log2 of channel groups in the inner loop
    logic [7:0]  max_out_chan;     // last transmitted channel group
    logic [15:0] tile_id;
  } sb_ctl_t;

  // saturate a wide signed value to BEAM_W bits
  function automatic logic signed [BEAM_W-1:0] sat_beam(input logic signed [31:0] v);
    if (v > 32'sd2047) return 12'sd2047;
    else if (v < -32'sd2048) return -12'sd2048;
    else return v[BEAM_W-1:0];
  endfunction

endpackage
