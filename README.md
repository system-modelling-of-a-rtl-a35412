# Beamforming firmware for one FPGA of the SKA-Low Tile Processing Module

A low-frequency aperture-array station combines 256 antennas into beams. The
antennas are served in groups of 16 ("tiles"), each tile by a Tile Processing
Module (TPM) with two FPGAs, so each FPGA handles 8 antennas. Beamforming is
done in two stages:

1. **Tile beam.** Each FPGA weights the channelised signal of its antennas
   with a per-antenna phase ramp and amplitude taper, sums them, and adds the
   partial sum of the other FPGA on the same board.
2. **Station beam.** The tiles form a chain. Each tile stores its tile beam
   in external DDR memory, reads it back in a different order ("corner
   turning"), adds it to the partial station beam that arrives from the
   previous tile, and passes the result on. The last tile sends finished
   station-beam frames to the correlator (CSP).

This repository holds synthesizable SystemVerilog for that chain inside one
FPGA (`tpm_fpga`), with self-checking testbenches. The ADC interface,
channeliser, Ethernet MAC and DDR controller/PHY are not included: they
appear as ports.

```
 channelised samples                  FPGA interchange (other FPGA on the TPM)
 (8 antennas x 512 ch)                          ^      |
        |                                       |      v
 +------v---------+   +-----------------+   +---+------+--+
 | region_selector|-->| freq_beamformer |-->| beam_adder  |--> tile beam, 48-bit samples
 +----------------+   | (coef_gen,      |   +-------------+        |
                      |  complex_mult)  |                          v
                      +-----------------+        +-------------------------------+
                                                  | cornerturner  <->  DDR (app_*) |
 partial beam from previous tile (spead_in) ---+  +---------------+---------------+
                                               |                  | TPM frames
                                               v                  v
                                            +-----------------------+   +--------------+
                                            | sb_adder              |-->| sb_formatter |--> spead_out
                                            +-----------------------+   +--------------+   (next tile or CSP)
 control: AXI4-Lite --> axi4_interconnect --> tile_bf_control, sb_axi4_if
```

Everything runs on one clock. All streams use a valid/ready handshake
except the tile beamformer, which runs at the input rate and cannot stall.

## Data formats

| Item | Format |
|---|---|
| Antenna sample | X and Y polarisation, complex, 8 bits per part (`ant_sample_t`, 32 bits) |
| Beam sample | X and Y, complex, 12 bits per part (`beam_sample_t`, 48 bits) |
| Memory word | 64 bits, one beam sample in the low 48 bits, upper bits zero |
| Beat | 512 bits = 8 memory words, with `sop`/`eop` (`beat_t`) |
| Frame identifier | 48 bits `{block[23:0], group[7:0], interval[15:0]}` (`frame_id_t`) |

A **channel group** is 4 adjacent beamformed channels. A **TPM frame** is
one channel group over 256 consecutive time samples: 1024 words = 128
beats. Inside a TPM frame, words are time-major: word `4*t + c` is time `t`,
channel `c`.

## Tile beamformer

**Region selection (`region_selector`).** The channeliser delivers every
time sample as 512 channels x 8 antennas, one antenna sample per clock
(channel-major). Only some channel ranges ("regions") are beamformed. Each of
up to 8 regions is a start channel and a length, held in two small tables.
A ping-pong buffer stores a complete time sample while the previous one is
read out region by region. Output words carry their region index and channel
number. Three idle cycles separate regions. The regions together must fit in
one time sample's worth of cycles. If they do not, the sticky flag `overrun`
is set.

**Weights (`coef_gen`).** For antenna *k* of region *r* at channel *f*, the
weight is `taper(r,k) * exp(i * tau(r,k) * f)`. `tau` is a phase slope in units of
2π/2¹⁶ per channel, and `taper` is a Q1.14 amplitude. The phase `tau*f` is
wrapped to one turn. A 14-stage pipelined CORDIC turns it into a complex number,
with its gain folded into the starting amplitude. The latency is 18 cycles.

**Weighting and summing (`freq_beamformer`, `beam_adder`).**
`complex_mult` multiplies each antenna sample by its weight at full
precision. `beam_adder` sums the 8 antennas of a channel. The resulting
partial beam is sent to the other FPGA (`f2f_out_*`). When `combine` is set,
the partial beam received from the other FPGA (`f2f_in_*`) is added. The sum
is rounded by 14 bits and saturated to 12 bits per part. The two partial
beams are matched by order through two queues, so the link may have any
fixed delay up to the queue depth.

## Corner turner

This is the most involved part. The tile beam arrives as "all 192
channels of one time sample". The station adder needs "4 channels over 256
time samples". The corner turner does the conversion through DDR.

**Input corner turning (`input_cornerturner`).** It collects 8 consecutive
beam frames (time samples) in a ping-pong buffer. It then emits one *memory
frame* per channel group: 8 times x 4 channels = 32 words = 4 beats,
time-major. Input is accepted at one sample per clock with no gaps required.
`rdy_in` falls only when both buffer halves are waiting. `lost` records any
sample that was offered while not ready.

**Memory layout (`write_address`).** The memory holds two integration
blocks, in halves selected by bit 0 of the block number. Inside a half, each
channel group owns a contiguous stretch of `T*4` words, where
`T = (int_block_len+1) * 256` time samples. So each TPM frame is contiguous
in memory, and is read as 16 bursts of 64 words. The word address is

    half*BUF_WORDS + group*T*4 + memory_frame*32 + beat*8

A half becomes *full* when its last memory frame is written. It becomes
*free* again once the last TPM frame of its block has been issued for
reading. The writer never enters a half that is not free.

**Frame order (`cornerturner_control`).** The first tile of the chain
generates the order in which TPM frames are read:

    for cb in 0 .. (max_out_chan+1)/2^icl - 1          -- outer channel blocks
      for ti in 0 .. int_block_len                     -- time intervals
        for j in 0 .. 2^icl - 1                        -- inner channel groups
          frame(block, group = cb*2^icl + j, interval = ti)

Here `icl` is `inner_chan_loop`. Every later tile does not generate an order.
It reads exactly the frame that the previous tile's packet announced
(`casc_frame_stb/casc_frame_id`), once that block is stored locally. This
keeps all tiles in step on the same channels and times.

**Memory port (`ddr_mem`, `read_address`).** Writes (memory frames of 4
beats) and reads (bursts of 8 beats) share the controller's user port:
`app_en`, `app_we`, `app_addr`, 512-bit `app_wdata`, `app_rdy`, and in-order
`app_rd_valid/app_rd_data`. Transfers are never split. Writes win a tie, so
the input never backs up behind reads. A read burst starts only if the
64-beat output queue can take all data already requested plus the burst.
Returning data therefore never needs to be refused, and the output side may
apply back-pressure freely.

## Station adder and formatter

**`sb_adder`.** The incoming packet from the previous tile is a header beat
plus the 128 beats of one TPM frame. The frame identifier in the header is
passed to the local corner turner as the cascade request. The local frame
read from memory is then added value by value (12-bit saturating) to the
received partial beam. On the first tile, the local frame passes through
unchanged.

**`sb_formatter` and `spead_hdr_gen`.** A tile that is not last sends each
summed TPM frame as a *partial-beam packet*: a header beat plus 128 beats.
The last tile gathers `csp_frame_size+1` TPM frames of the same channel
group into one *CSP frame*, with up to four groups in assembly at once
(matching `inner_chan_loop <= 2`). It sends the CSP frame as a single
packet. The header beat has five 64-bit items:

| Word | Contents |
|---|---|
| 0 | magic `0x5304_0206_0000_0004` |
| 1 | `{0x8001, frame id}` |
| 2 | `{0x8004, payload bytes}` |
| 3 | `{0x9011, first channel}` |
| 4 | `{0x9012, kind, nframes, 0, tile_id}` |

`kind` is 1 for CSP and 0 for partial.

## Control registers

One AXI4-Lite port. Address bits [15:14] select the block
(`axi4_interconnect`). Unmapped slots answer DECERR.

| Address | Register |
|---|---|
| 0x0000 | number of regions in use |
| 0x0004 | bit 0: combine with the other FPGA |
| 0x0100 + 4r | region r start channel |
| 0x0200 + 4r | region r length |
| 0x0400 + 4(8r+k) | antenna delay `tau` (phase slope) |
| 0x0800 + 4(8r+k) | antenna taper (Q1.14) |
| 0x4000 | bit 0 first tile, bit 1 last tile |
| 0x4004 | int_block_len (TPM frames per group and block, minus 1; reset 815) |
| 0x4008 | csp_frame_size (TPM frames per CSP frame, minus 1; reset 7) |
| 0x400C | inner_chan_loop (log2 of inner groups; reset 0) |
| 0x4010 | max_out_chan (last channel group; reset 0x2F = 48 groups) |
| 0x4014 | tile_id |
| 0x4018 | status flags (read only) |

## Parameters and sizes

The top's defaults are:

| Parameter | Default | Meaning |
|---|---|---|
| `N_ANT` | 8 | antennas per FPGA |
| `N_CHAN_IN` | 512 | input channels |
| `N_REGIONS` | 8 | beamformed regions |
| `IN_FRAME_LEN` | 192 | beamformed channels per time sample |
| `NOF_FRAMES` | 8 | time samples per memory frame |
| `TPM_NOF_CHANS` | 4 | channels per group |
| `TPM_FRAME_LEN` | 256 | time samples per TPM frame |
| `BURST_LEN` | 64 | words per read burst |
| `ADDR_W` | 29 | memory word address bits |

At the reset value of `int_block_len`, the two memory halves need 80.2 M
words. The memory space is 2²⁷ = 134 M words.

## Where this design departs from the reference design

- **Tile beamformer throughput.** The datapath is single-lane: one antenna
  sample per clock. Real-time operation at 8 antennas x 512 channels x
  ~0.78 MHz needs about 3.2 G samples/s, which is 16 lanes at 200 MHz. The
  corner turner and the station chain do run at the reference rates.
- **Memory banks.** Channel groups are stored contiguously. They are not
  spread over the DDR banks. Row, column and bank widths are kept only as
  parameters (with a check that they fit the address).
- **DDR interface.** The memory controller's user port replaces the DDR PHY
  pins, and there is one clock instead of separate signal-processing and DDR
  clock domains.
- **Own choices.** The SPEAD-like header layout, the register map, the
  frame-identifier fields, the arithmetic widths (8-bit input, Q1.14
  weights, 12-bit beams), the CORDIC, and the FPGA-interchange format are
  this design's own. The reference gives only names or functions for these
  parts.
- **Partial-beam packets.** Each partial-beam packet carries exactly one TPM
  frame.

## Simulating

Everything builds with plain Verilator 5 (`--binary --timing`). Run from the
repository root. The package must come first:

    verilator --binary --timing --assert -Irtl -Itb rtl/ska_pkg.sv tb/tpm_fpga_tb.sv \
        --top-module tpm_fpga_tb -Mdir obj_tpm -o sim
    ./obj_tpm/sim +verilator+rand+reset+2

Every testbench ends with `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

- **Unit testbenches.** One per block: `complex_mult_tb`, `lookup_table_tb`,
  `sync_fifo_tb`, `coef_gen_tb`, `freq_beamformer_tb`, `region_selector_tb`,
  `beam_adder_tb`, `tile_bf_control_tb`, `tile_beamformer_tb`,
  `cornerturner_tb`, `sb_adder_tb`, `sb_formatter_tb`, `sb_axi4_if_tb`,
  `station_beamformer_tb`. Each compares against an independent model:
  floating-point for the arithmetic, exact for data movement.
- **`tpm_fpga_tb`.** End to end with three FPGAs at reduced sizes:
  - Two FPGAs of one TPM are combined through the interchange.
  - The first of them is chained as the first tile to a second tile, which
    is last and emits CSP frames.
  - Memory stalls and random output back-pressure are applied.
  - It counts 13 mechanisms and fails if any never occurs: region selection,
    interchange combining, combine off, frame sequencing, cascade requests,
    memory read/write contention, memory stalls, output back-pressure, CSP
    frames, partial-beam packets, inner channel loop, memory half switch,
    and a DECERR response.
- **`tpm_fpga_full_tb`.** The top at its default parameters, with no
  overrides. It runs one complete integration block: 256 time samples of
  512 channels x 8 antennas, about 1.05 M clocks. The block goes through
  beamforming, DDR and CSP packets, and the testbench checks every beam
  sample and every packet word. It takes a few seconds.
- **`cornerturner_rate_tb`.** The corner turner at its default sizes, with
  input frames sent back to back. Every 192-sample frame must be taken in
  192 consecutive cycles while the memory stalls at random. The testbench
  then checks all the corner-turned output.
- **Memory model.** `tb/ddr_model.sv` is a behavioural model of the memory
  behind its controller, with random `app_rdy` gaps and a fixed read latency.

## Not included

The JESD ADC interface, the test signal generator, the polyphase
channeliser and its calibration, the diagnostics (total power,
cross-spectrometer, sample capture), the 10/40 GbE MAC and UDP framing, the
chip-to-chip link to the board controller, and the DDR controller and PHY.
The reference design only names these blocks or takes them from vendors.
