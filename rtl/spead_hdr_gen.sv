// spead_hdr_gen: the formatter's header generator (hdrGenerator). It builds
// the first 512-bit beat of an outgoing packet in the SPEAD style: a 64-bit
// header word (magic 0x53, version 4, 16-bit item identifiers, 48-bit item
// values, number of items) followed by 64-bit item words, each a 16-bit
// identifier and a 48-bit immediate value:
//   word 1  heap counter  = TPM frame ID of the first frame in the packet
//   word 2  heap length   = payload length in bytes
//   word 3  channel       = first frequency channel (group * TPM_NOF_CHANS)
//   word 4  kind/tile     = {packet kind (0 partial beam, 1 station beam), frames, tile id}
// Words 5-7 are zero. The same layout is parsed by the station adder on
// spead_in. Purely combinational. The document names the generator; the
// packet layout is this design's assumption (the field set of the real SPEAD
// packets is not given).
module spead_hdr_gen
  import ska_pkg::*;
#(
  parameter int unsigned TPM_NOF_CHANS = 4
) (
  input  frame_id_t          id,
  input  logic               kind,       // 0: partial beam, 1: station (CSP) beam
  input  logic [4:0]         nframes,    // TPM frames in the packet
  input  logic [15:0]        tile_id,
  input  logic [31:0]        payload_bytes,
  output logic [BEAT_W-1:0]  hdr
);
  always_comb begin
    hdr = '0;
    hdr[0*64 +: 64] = SPEAD_MAGIC | 64'd4;
    hdr[1*64 +: 64] = {ITEM_HEAP_CNT, 48'(id)};
    hdr[2*64 +: 64] = {ITEM_HEAP_LEN, 48'(payload_bytes)};
    hdr[3*64 +: 64] = {ITEM_CHAN, 48'(id.group) * 48'(TPM_NOF_CHANS)};
    hdr[4*64 +: 64] = {ITEM_KIND, 8'(kind), 8'(nframes), 16'd0, tile_id};
  end
endmodule
