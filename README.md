# Artificial-retina track processor

This is a pattern-recognition processor that finds straight particle tracks in a silicon-strip
tracker. Each event is handled as it streams through, and nothing iterates over hits.
Its model is the first stage of biological vision. The space of possible tracks is cut into
cells, and every cell has its own small processing unit, called an *engine*. An engine
responds to every hit that lies near its "pattern track", and the response grows as the hit
gets closer. Real tracks then show up as local maxima of the response over the cell grid.
Because the response is continuous, neighbouring cells see the same track with graded
strength, so fewer patterns are needed than in a binary pattern-matching scheme.

The RTL describes one FPGA's worth of processing: 200 engines on a 10 x 20 grid, with six
parallel input lines. It is written in synthesizable SystemVerilog-2017.

## Detector model and track parameters

- The tracker has six single-coordinate layers and no magnetic field, so tracks are straight
  lines in 2D.
- A hit is a layer number (3 bits) and a strip coordinate (10 bits, 0..1023). The type is
  `ar_pkg::hit_t`.
- A track is described by `u`, its coordinate on layer 0, and `v`, its coordinate on
  layer 5.
- Layers are taken as equally spaced. The track (u, v) therefore crosses layer `l` at
  `u + (v-u)*l/5`, using integer division (`ar_pkg::expected_x`).
- Cell `(iu, iv)` has its centre at `u = 32 + 96*iu` and `v = 24 + 48*iv`. The
  `U_BASE/U_PITCH/V_BASE/V_PITCH` constants in `ar_pkg` set this placement.
- Cells are numbered `e = iu*NV + iv`. This index is used everywhere, including the bit
  order of the routing table.

## Weight function

An engine turns the distance `d = |x - x_expected|` of a hit on its own layer into a
weight:

    w(d) = (32*32 - d*d) / 4    for d < 32
    w(d) = 0                    otherwise

The weight is 256 at zero distance and falls to 0 at 32 strips. It is an integer stand-in
for a Gaussian kernel. The radius (`R_LOG2`) and the scale (`W_SHIFT`) are in `ar_pkg`. The
per-event sum saturates at 65535 (16 bits, `ACC_W`).

## Data path

```
 external lines ──┐
                  ├─ mux (src_sel) ─ credit gate ─ dispatcher ─┬─ engine[0]   ─┐
 hit_source ──────┘   (in_ready)                   (LUT)        ├─ engine[1]   ─┤
 (event RAM loop)                                                ...            ├─ local_max ─ track_output ─ centroid ─ trk_*
                                                                └─ engine[199] ─┘
```

| module | role |
|---|---|
| `hit_source` | Event RAM that replays test events in a loop, for running without an external source. |
| `dispatcher` | Switching network. For each hit, a preloaded table says which engines receive it. |
| `engine` | One cell. It computes a distance and a weight for each line, sums the lines and accumulates over the event. |
| `local_max` | Applies the threshold and finds local maxima over the 8-neighbourhood. |
| `track_output` | Buffers up to 16 events and sends out only the tracks, each with the 3 x 3 weights around it. |
| `centroid` | Interpolates each track's position inside its cell from those weights. |
| `retina_top` | Connects the blocks. It also holds the source mux and the credit flow control. |

### Input words and events

The input is one *word* per clock. A word carries up to `LINES` hits: `hvalid[l]` marks
which lines are used, and `hit[l]` holds each line's hit. An event is a run of words, and
its last word has `eoe` (end of event) set. Hits in that last word still belong to the
event.

The engines accept any layer on any line. The tests put layer `l` on line `l`, which is the
natural way to use six lines: weights for different layers are computed in parallel and
added up later in the pipeline. An event with `k` tracks then needs `k` words. Setting
`LINES = 1` gives a single serial hit stream.

### Switching network (`dispatcher`)

The table has 6 x 32 = 192 words, each `N_ENG` bits wide, with one enable bit per engine. It
is read at

    address = layer*32 + (x >> 5)

There is one read port per input line. Software must load the table before running, through
`lut_we/lut_addr/lut_data`. To give exactly the engine response defined above, enable
engine `e` in bin `b` of layer `l` when its window overlaps the bin:

    enable[e] = (xexp(e,l) + 31 >= 32*b) && (xexp(e,l) - 31 <= 32*b + 31)

The bit only gates delivery. An engine that receives a hit outside its window adds 0, so a
table that enables too many engines costs bandwidth but does not change results. A table
that enables too few drops weight.

### Engine pipeline

An engine has three register stages:

1. Per line, look up the expected coordinate for the hit's layer and register `|x - x_exp|`.
   Layer numbers 6 and 7 contribute nothing.
2. Compute the weight of each line and register their sum.
3. Accumulate. When the end-of-event mark arrives here, publish `acc + sum` on `res_weight`
   for one cycle and restart the accumulator from 0.

The expected coordinates are constants, computed at elaboration from the engine's `U_C/V_C`
parameters. The next event can start in the very next cycle.

### Local maxima (`local_max`)

A cell is reported as a track when both of these hold:

- Its weight is strictly greater than `threshold`.
- It is a local maximum among its up to 8 neighbours.

Ties are broken by index: a cell must be strictly greater than neighbours with a lower index
and at least equal to neighbours with a higher index. As a result, a flat top of equal
weights produces exactly one track.

### Track output and flow control

`track_output` stores a snapshot of the maxima map and all weights for each event in a FIFO
that holds 16 events. It sends one record per clock:

- `trk_track = 1`: the record carries a track, the cell `(trk_iu, trk_iv)` and its weight
  `trk_w`. Tracks come out in increasing cell index.
- `trk_eoe = 1`: this is the last record of the event. It also carries `trk_event` (a
  16-bit running count) and `trk_ntracks`.
- An event with no tracks gives a single record with `trk_track = 0` and `trk_eoe = 1`.

So an event with `k` tracks takes `max(k,1)` output cycles. With one line per layer, a
`k`-track event also needs about `k` input words, so the output normally keeps up. It falls
behind only when fake maxima outnumber the hits per line, for example with a very low
threshold or heavy noise. The output has no ready signal, and `retina_top` prevents loss
with credits:

- Each end-of-event accepted at the input takes one credit.
- Each last record of an event sent returns one.
- When all 16 credits are taken, `in_ready` goes low and the input stalls.
  - In memory-replay mode, `hit_source` holds its word.
  - External sources must hold theirs.

`overflow` is a sticky flag that can only rise if this scheme is bypassed. An assertion in
`retina_top` checks that it never does.

A credit returns about 8 cycles after its end-of-event entered, so the depth must cover
that round trip. With a depth of 4, one-track events could enter only every second cycle.
With 16 they enter every cycle.

### Sub-cell interpolation (`centroid`)

A track between two cell centres also lights up the neighbouring cells, because the engine
response is graded. For each track, `centroid` takes the 3 x 3 weights around the maximum
cell and computes the weighted-centroid offsets:

    du = 128 * (row(iu+1) - row(iu-1)) / total
    dv = 128 * (column(iv+1) - column(iv-1)) / total

Integer division truncates toward zero. The offsets are signed 8-bit values, in units of
1/128 of a cell pitch, and always lie in (-1, 1) cells. Cells outside the grid count as
zero. The estimated track parameters are:

    u = 32 + 96*(iu + du/128)
    v = 24 + 48*(iv + dv/128)

The block has two pipeline stages: the sums, then two dividers. A record without a track
gets offsets of 0.

## Timing

| path | cycles |
|---|---|
| input word → dispatcher output | 1 |
| dispatcher → engine result (`res_valid`) | 3 |
| engine result → maxima map | 1 |
| track_output record → `trk_*` (centroid) | 2 |
| end-of-event accepted (cycle t) → first record on `trk_*` | t+10 (idle output) |
| end-of-event accepted → last record of the event, k tracks | t+max(k,1)+9 (idle output) |
| input throughput | 1 word per clock while `in_ready` |

An event with up to 90 tracks therefore completes in under 100 clocks. For example, a
6-track event arriving on six lines occupies the input for 6 clocks and is finished 15
clocks after its last word. The clock frequency is not set by the RTL.

Sustained rate, measured by `tb_event_rate` with back-to-back events of straight tracks,
no noise and a threshold of 700:

| tracks per event | tracks per cell | 6 lines: cycles/event | at 160 MHz | 1 line: cycles/event | at 160 MHz |
|---|---|---|---|---|---|
| 1 | 0.5 % | 1.00 | 160 MHz | 6 | 26.7 MHz |
| 2 | 1.0 % | 2.00 | 80 MHz | 12 | 13.3 MHz |
| 3 | 1.5 % | 3.00 | 53 MHz | 18 | 8.9 MHz |
| 4 | 2.0 % | 4.10 | 39 MHz | 24 | 6.7 MHz |
| 5 | 2.5 % | 5.55 | 29 MHz | 30 | 5.3 MHz |
| 6 | 3.0 % | 7.35 | 22 MHz | 36 | 4.4 MHz |

With six lines the input limits the rate at low occupancy. From about four tracks per event,
crossing tracks start to produce extra ("ghost") maxima, and the one-record-per-cycle track
output becomes the limit. Ghosts are expected because only one coordinate is measured per
layer. With a single line, every hit takes its own cycle.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `LINES` | 6 | top, dispatcher, engine, hit_source | parallel input lines |
| `NU`, `NV` | 10, 20 | top, local_max, track_output | cell grid (200 engines) |
| `BIN_SHIFT` | 5 | top, dispatcher | table bin = 32 strips |
| `SRC_WORDS` | 1024 | top (`hit_source.WORDS`) | event-memory depth |
| `FIFO_DEPTH` | 16 | top (`track_output.DEPTH`) | buffered events / credits |
| `FRAC` | 7 | centroid | fraction bits of the offsets (fixed at 7 by the top's 8-bit ports) |
| `LAYERS`, `X_W`, `R_LOG2`, `W_SHIFT`, `ACC_W`, cell placement | 6, 10, 5, 2, 16, see above | `ar_pkg` | detector and kernel |

The top's port widths follow from these parameters: `trk_iu` is `$clog2(NU)` bits, the table
address is 8 bits, and so on.

## Where this design goes beyond its source

The overall approach is taken from a published prototype:

- six layers parametrised by (u, v);
- one engine per cell and about 200 engines per device;
- a dispatcher with a preloaded table indexed by layer and coordinate;
- several input lines whose weights are summed later;
- thresholded local maxima;
- an on-chip RAM replaying events in a loop;
- a target of under 100 cycles latency;
- the idea that the graded response allows interpolation between cells.

Everything below is this design's own choice:

- the kernel shape and all widths;
- the table layout and bin size;
- the event framing (`eoe`);
- the FIFO and the credit flow control;
- the external-input mux;
- the tie rule and the 8-neighbourhood;
- the output record format;
- the 3 x 3 weighted centroid used for interpolation;
- fixed (elaboration-time) engine geometry instead of loadable constants.

The following are not included:

- Splitting the processor across devices. A large cell space is meant to be cut into pieces
  of about 200 cells per device, with a full-mesh network between devices carrying the hits.
  Only the single-device dispatcher is here.
- The board and host interfaces.
- Geometries other than the six-layer toy tracker. For example, a tracker with more layers
  needs `LAYERS` and the table depth to change, and tens of thousands of cells need many
  instances.

## Verification

Each testbench in `tb/` checks its results and ends with a `TB_RESULT checks=N failures=M`
line:

| testbench | what it checks |
|---|---|
| `tb_engine` | 200 random events, including layers that do not exist, plus one that saturates the accumulator. Weights against an independent kernel model; result exactly 3 cycles after end-of-event. |
| `tb_dispatcher` | A random table and 3000 random hit words. Every enable bit is checked against the table; hits are forwarded after 1 cycle. |
| `tb_local_max` | 500 random maps on a 5 x 7 grid, half of them with many equal values, and random thresholds. Checked against a reference of the maxima rule. |
| `tb_track_output` | 300 events at random spacing, some without tracks. Record order, flags, weights, counts and event numbers; first record 3 cycles after the write when idle; overflow flag on deliberate overfill. |
| `tb_hit_source` | Replay order, wrap-around, holding while stalled, loop count, and one word per cycle without stalls. |
| `tb_centroid` | 3000 random records and weight patches, including all-zero patches and records without a track. Offsets against an integer reference; record passes through in 2 cycles. |
| `tb_retina_top` | End to end at the default size. Random 1–6-track events plus noise are checked track by track against a full reference model (cell weights, maxima, then offsets). |
| `tb_event_rate` | The table above: 6-line and 1-line processors side by side. Words per event, cycles equal to words plus stalls, and a gain of at least 3x. |

`tb_retina_top` also checks:

- the exact latency `max(k,1)+9`;
- at most 100 cycles per event;
- one word per cycle;
- that stalls, multi-line words, memory replay with wrap-around, source switching, threshold
  rejection, neighbour ties and non-zero sub-cell offsets each occur at least once.

Each of these runs in one to two minutes with Verilator. To run a testbench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/ar_pkg.sv \
          tb/<testbench>.sv --top-module <testbench>
./obj_dir/V<testbench>
```

`-y rtl` lets Verilator find every module the testbench uses, and the package is named
first because all modules import it. `-Wno-fatal` keeps lint-style warnings from stopping
the build. The warnings concern package constants a module does not use, the unused upper
quotient bits in `centroid`, and the reset net being used both by flip-flops and by the
assertions' `disable iff`. The testbenches reset
everything they read and use no X/Z values, so they also run on two-state simulators.
