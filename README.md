# Linearized track fitter and associative-memory emulator

This is synthesizable SystemVerilog for the FPGA part of a hardware track trigger. Pattern
matching picks coarse "roads" out of the detector hits of an event. For each road the fitter
tries every combination of hits as a track candidate. For each candidate it computes a
goodness-of-fit χ² and, for candidates that pass a cut, five helix parameters. Both are linear
functions of the hit coordinates:

    p_i  = C_i · x + q_i                  i = 0..4   (helix parameters)
    χ²   = Σ_j (S_j · x + h_j)²           j = 0..2   (goodness of fit)

`x` holds the eight layer coordinates of the track. The constants `C, q, S, h` depend on the
detector *sector* the road lies in. They live in an external high-bandwidth memory, so every
fit must first fetch them. Most of this design deals with that fetch: issuing the requests,
waiting for answers of unknown latency, pairing answers with tracks, and recovering when
constants are lost.

A second, independent design sits next to the fitter: an emulator of the associative-memory
(AM) pattern matcher that produces the roads.

The target is 250 MHz, with one road accepted every 3.125 cycles (80 MHz) and a fit latency
under 1 µs (250 cycles). The original implementation measured a mean latency of about 169
cycles.

## Data flow through the fitter

```
road ─► Track Distributor ─┬─► Track Buffer I ─► Aligner I ─► χ² unit ─┐   (×4 channels)
                           │        │ request        ▲                 │
                           │        ▼                │                 ▼
                           │    HBM interface ─► Constant Buffer I   Track Multiplexer
                           │     ▲     │                               │ request  │
                           │     │     └────────► Constant Buffer II ◄─┘          ▼
                           │     │                        │               Track Buffer II
                           │     │                        ▼                       │
                           │     │                   Aligner II ◄─────────────────┘
                           │     │                        │
        external memory ◄──┴─────┘                        ▼
                                                 Parameter calculator ─► fit result
```

- **Track Distributor** (`track_distributor`). Hands roads to four channels in strict rotation.
  Each channel has a decoder (`road_decoder`) that enumerates every cluster combination of its
  road, one track per cycle. The first layer steps fastest, like an odometer. A layer with no
  cluster contributes coordinate 0. A road with three clusters in all eight layers gives
  3⁸ = 6561 tracks. Each track is marked `first` and `last` within its road.
- **Track Buffer I** (`track_buffer`, `REQUEST=1`). A FIFO per channel. When the first track of
  a road enters, the buffer sends a χ²-constant request for that road's `{road, sector}` tag.
  The first track is only accepted in a cycle where the request is accepted too, so exactly
  one request goes out per road.
- **HBM interface** (`hbm_interface`). A round-robin arbiter over five requesters (four χ²
  channels and the parameter path) feeding one memory request port. Each request carries a
  destination field. An answer FIFO takes the returning sets and routes each one to the
  constant buffer named by its destination.
- **Constant Buffer I / II** (`constant_buffer`). FIFOs of constant sets with their tags.
  **There is no back-pressure toward the memory.** A set that arrives at a full buffer is
  thrown away (`lost` pulse, `lost_count`), just as in the original.
- **Track Constant Aligner I / II** (`track_constant_aligner`). Pairs the head track with the
  head constant set. This is where lost constants are dealt with; see the next section.
- **χ² unit** (`chi2_unit`). One per channel, fully parallel, one track per cycle, latency 4.
  A track that fails the cut is dropped (`reject` pulse). A track that passes goes on with its
  χ² attached.
- **Track Multiplexer** (`track_multiplexer`). A round-robin merge of the four channels. For
  every passing track it sends a parameter-constant request at the same moment as it writes the
  track into **Track Buffer II** (`track_buffer`, `REQUEST=0`). Roughly one candidate in five is
  expected to pass. That is why the χ² test comes first: only one parameter path is needed,
  not four.
- **Parameter calculator** (`parameter_calculator`). Five 8-term dot products plus offsets,
  pipelined over 3 cycles. Each result is rounded and saturated to 16 bits.

All links use a valid/ready handshake, so any stage can stall the one before it. The only
places where data can be discarded on purpose are the χ² cut, a full constant buffer and the
aligner's drop rule.

## Matching constants to tracks, and surviving their loss

This is the subtle part of the design.

**Ordering.** The memory must answer in request order and echo the tag. (Any memory with
in-order answers fits; the interface does not reorder.) Each channel's requests leave in road
order, and so its answers come back in road order. The head of Constant Buffer I is therefore
always the set for the oldest road whose constants are still on their way or waiting. The
same holds for the parameter path, with one set per track.

**Loss.** If a constant buffer is full when a set arrives, the set is gone. Nothing is
re-requested. Without further care, the track waiting for that set would sit at the head of
its track buffer forever. The buffer would fill, no new road could enter the channel, and so
no new request would be made. The channel would be deadlocked.

**The rule.** Each constant buffer counts its outstanding requests. The count goes up when a
request for it is accepted and down when a set arrives for it, whether the set is stored or
lost. The buffer reports `pending` while the count is not zero. The aligner then decides for
the head track:

| head constant set | outstanding requests | action |
|---|---|---|
| present, tag matches | – | emit track + constants; pop the set with the road's last track (Aligner I) or with every track (Aligner II) |
| present, tag differs | – | drop the track: its set was lost and a later one is already here |
| absent | some | wait; the set may still come (there is no timeout) |
| absent | none | drop the track: its set was lost and nothing more is coming |

Because answers are in order, a mismatching head set can only belong to a *later* road, so
dropping the track is always right. Every drop pulses `dropped` and counts in `drop_count`.
The fitter brings these out as `align1_drop[c]` and `align2_drop`. Loss shows up on
`cb1_lost[c]` and `cb2_lost`.

The aligner's output is registered. One track leaves per cycle while the consumer is ready.

## Number format

The original computes in single-precision float and rounds the outputs to 16-bit fixed point.
This design uses fixed point throughout, with intermediate sums at full width, so nothing is
lost before the final rounding:

| quantity | format |
|---|---|
| hit coordinate `x` | signed 16-bit integer (detector units) |
| slopes `C`, `S` | signed 16-bit, 8 fraction bits |
| offsets `q`, `h` | signed 32-bit, 8 fraction bits |
| `p_i`, `χ²` outputs, χ² threshold | signed 16-bit, 8 fraction bits, saturated |

The χ² cut is made on the full-precision sum, with the threshold shifted to match, so it is
exact and does not suffer from output saturation. A track passes when `χ² ≤ threshold`. Change
`chi2_threshold` only while no track is inside a χ² unit.

A χ² constant set holds 3 × 8 slopes and 3 offsets (480 bits). A parameter set holds
5 × 8 slopes and 5 offsets (800 bits). Both travel over one 800-bit memory word; χ² sets use
its low bits.

Three χ² rows (eight coordinates minus five parameters) and one coordinate per layer are this
design's reading. The original quotes about 5 kbit of constants per fit, which suggests more
coordinates or wider words than are described. `NDOF`, the widths and the fraction bits are
all localparams in `tf_pkg`.

## Constant memory interface

The memory is not part of the RTL. The fitter talks to it through one request and one answer
channel, both valid/ready:

- `hbm_req` = `{dest[2:0], road[15:0], sector[15:0]}`. `dest` is 0..3 for the χ² constants
  of that channel, and 4 for parameter constants.
- `hbm_rsp` = `{dest, road, sector, data[799:0]}`. Answers come back in request order with the
  request's `dest` and tag. Latency is arbitrary.

`tb/hbm_model.sv` is a behavioural model. It answers in order after a random latency
(parameters `LAT_MIN` and `LAT_MAX`, 60 to 90 cycles in the tests) and can randomly refuse
requests. The data are a hash of the sector number, so the testbenches can recompute them.

## Associative-memory emulator

`am_emulator` reproduces the pattern matcher on the FPGA. It holds `NPAT` patterns (default
256), each with one super-strip ID (SSID, default 16 bits) per layer (default 8), written
through a direct load port. An event has three phases, each a command on `cmd`:

1. `INIT` (0) clears every pattern's per-layer match flags.
2. `HIT` (1) carries one SSID per layer and a `layer_valid` mask. Every pattern whose SSID
   equals a present SSID sets that layer's flag. All patterns are compared in the same cycle.
3. `END` (2) marks every pattern with at least `threshold` flagged layers as matched. The
   readout then returns the matched pattern IDs on `out_id`, lowest first, one per cycle
   under `out_ready`. `done` pulses after the last one. Commands are refused during readout.

The testbench replays the original worked example: 6 layers, 4 patterns and three hit words.
Patterns 0 and 2 come out at threshold six. It also runs random events on a default-size
instance.

## Top level

`prm_fpga` places the AM emulator and the fitter side by side. In the full system a data
organizer sits between them. It turns matched pattern IDs back into roads of full-resolution
clusters, and it is not part of this RTL. So the AM outputs (`am_*`) and the fitter's road
input are separate ports, and the memory ports leave the chip as well.

Default parameters: 4 channels; depths 64 for Track Buffer I, 16 for Constant Buffer I, 64
for Track Buffer II, 64 for Constant Buffer II and 16 for the answer FIFO; 256 AM patterns.
Yosys synthesizes the top to about 17 k generic cells (before technology mapping, so each
multiplier is one cell). About 14.6 k of them are in the AM emulator, which compares all
256 × 8 stored SSIDs with the hit word in parallel. The fitter's arithmetic is 4 × 24 + 40
multipliers of 16 × 16 bits.

## Throughput and latency

- **Road rate.** A road enters when its channel's decoder is idle. Single-track roads can
  therefore enter every cycle. The end-to-end test feeds a road every 3 cycles (83 MHz at
  250 MHz) without being held up.
- **Latency.** The pipeline adds about 20 cycles to two memory round trips. With the 60–90
  cycle memory model, the measured mean is about 181 cycles, and every fit is checked to be
  at most 250 cycles (1 µs at 250 MHz).

## Departures from the original description

- Fixed point instead of float (see above). Output fraction bits: 8.
- The number of χ² rows, all widths, buffer depths, handshakes, tags and the `dest` field are
  this design's own choices.
- The outstanding-request counter and the aligner's drop rule are additions. The original only
  says that constants arriving at a full buffer are lost and that there is no timeout.
- The sector ID reaches the memory interface through the Track Buffer I request. A separate
  path from the data organizer to the interface is not built.
- Not built: the data organizer, cluster-to-SSID encoder, input and output buffers, sorting,
  synchronisation, output formatting, the ASIC interface with its power optimizer, control
  and monitoring, the AM ASICs and the memory itself. The original only names them or leaves
  them outside the FPGA.

## Files

| file | contents |
|---|---|
| `rtl/tf_pkg.sv` | widths, structs (`road_t`, `track_t`, constant sets, memory words, `fit_result_t`), saturation |
| `rtl/prm_fpga.sv` | top: AM emulator + fitter |
| `rtl/track_fitter.sv` | fitter top, wiring of the blocks above |
| `rtl/track_distributor.sv`, `rtl/road_decoder.sv` | road rotation and track enumeration |
| `rtl/track_buffer.sv`, `rtl/sync_fifo.sv` | track FIFOs with request generation; generic FIFO |
| `rtl/constant_buffer.sv`, `rtl/track_constant_aligner.sv` | constant FIFOs with loss and pending; pairing and drop rule |
| `rtl/hbm_interface.sv` | request arbiter and answer routing |
| `rtl/chi2_unit.sv`, `rtl/track_multiplexer.sv`, `rtl/parameter_calculator.sv` | arithmetic and merge |
| `rtl/am_emulator.sv` | pattern matcher |
| `tb/tf_ref_pkg.sv` | reference model: constant generator and exact χ² / parameter arithmetic |
| `tb/hbm_model.sv` | behavioural constant memory |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_track_fitter` and `tb_prm_fpga` end to end |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_prm_fpga -y rtl -y tb +libext+.sv \
    rtl/tf_pkg.sv tb/tf_ref_pkg.sv tb/tb_prm_fpga.sv -o sim
./obj_dir/sim
```

Put any other testbench name in place of `tb_prm_fpga`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_track_fitter` runs the fitter at reduced depths. It checks every output against the
  reference model, including the latency bound at the 80 MHz road rate. It forces
  back-pressure and constant loss, decodes a full 3⁸ road, and fails if any of these never
  happened: reject, loss, drop, stall.
- `tb_prm_fpga` runs the top at default parameters. It covers the AM example, normal fitting,
  and an overload phase with a slow consumer that makes Constant Buffer I lose sets and
  Aligner I drop their tracks. It checks that every fit that never comes out is matched by
  exactly one reported drop.
- The unit testbenches check each block against an independent model. They cover fairness of
  the arbiters, ordering, full and empty corner cases, saturation and the exact pipeline
  latency.
