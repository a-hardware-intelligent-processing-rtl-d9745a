# MRCoHOG + real-AdaBoost human detector for an FPGA robot accelerator

A domestic service robot that follows a person has to decide, many times a
second, whether a patch of its depth image shows a human. On a PC the feature
extraction and classification eat most of the CPU. This design moves that work
into FPGA logic next to an embedded CPU. The CPU cuts the depth image into
64x32-pixel regions of interest (ROIs) and writes them into a FIFO. The logic
returns one word per ROI that says "human" or "not human", with the score.

The detector uses multi-resolution co-occurrence histograms of oriented
gradients (MRCoHOG) as features and a real-AdaBoost classifier. The hardware
version avoids multipliers and dividers. Gradients use only differences and
comparisons. The classifier is a table look-up plus an adder.

## Data path

```
 CPU --> input FIFO 32b x 512 --> roi_scaler --+--> line_buffer3 64x32 --> gradient_unit --+
                                               +--> line_buffer3 32x16 --> gradient_unit --+--> cooc_histogram
                                               +--> line_buffer3 16x8  --> gradient_unit --+        |
                                                                                         vote counts (500)
 CPU <-- output FIFO 32b x 512 <-- result word <-- adaboost_classifier (LUT 500 x 32) <------------+
                     accel_ctrl sequences: load -> flush -> vote -> classify -> write
```

| Module | Role |
|---|---|
| `mrcohog_pkg` | Shared sizes, stream structs, the feature-index and result-word formats |
| `sync_fifo` | First-word-fall-through FIFO, 32 bits x 512 (one for input, one for output) |
| `roi_scaler` | Unpacks 4 pixels per word. Streams 1 pixel/cycle and flags half/quarter pixels |
| `line_buffer3` | Two row memories plus a 3x3 window register, one per resolution |
| `gradient_unit` | fx, fy from the 4-neighbours. L1 magnitude threshold. 8-sector direction |
| `cooc_histogram` | Direction maps of the 3 resolutions. Scans them and counts co-occurrence votes |
| `adaboost_classifier` | Bins each vote count, looks up the weak output, sums, takes the sign |
| `accel_ctrl` | Five-phase sequencer, one ROI at a time |
| `comta_accel_top` | Wires everything together. CPU-side FIFO ports and table-loading port |

### One ROI, cycle by cycle

| Phase | Cycles | What happens |
|---|---|---|
| load | 2048 | One pixel per cycle from the FIFO head, raster order. An empty FIFO stalls it |
| flush | 4 | The last line-buffer windows and gradients reach the direction maps |
| vote | 2688 + 3 | Scans res 0 (2048 px), res 1 (512 px), res 2 (128 px), one pixel per cycle |
| classify | 500 + 3 | One weak classifier per cycle |
| write | 1 | The result word goes into the output FIFO. It waits while the FIFO is full |

Without stalls, 5248 cycles pass from the controller starting an ROI to it
pushing the result. The three line buffers and gradient units work in parallel
during the load phase. The half and quarter images are sub-streams of the same
pixel stream, so they finish together with the full-resolution image.

## Images and gradients

- **Packing.** A 32-bit word holds four 8-bit pixels, with the leftmost pixel
  in bits 7:0. One ROI is therefore exactly 512 words, the depth of the FIFO.
- **Resolutions.** The three images are 64x32, 32x16 and 16x8 pixels. The
  smaller two are made by **decimation**, not averaging. The half image keeps
  pixels whose row and column are both even. The quarter image keeps those
  whose row and column are both multiples of 4.
- **Gradients.** For each pixel with all eight neighbours inside its image:
  `fx = right - left` and `fy = lower - upper`. Border pixels have no gradient.
- **Threshold.** A gradient counts only if `|fx| + |fy| >= 15`.
- **Direction.** Code `k` means the angle `atan2(fy, fx)` lies in
  `[45k, 45k+45)` degrees, measured from +x towards +y (down the image). The
  hardware gets it from the signs of fx and fy and one comparison of `|fx|`
  with `|fy|`. So the sectors start on the axes and the diagonals; they are not
  centred on them.

## Co-occurrence features: the core of the design

MRCoHOG counts how often pairs of gradient directions occur together at
nearby pixels, both within one resolution and across resolutions. Each
histogram dimension is one combination of:

- **block**: 6 bits. The 8x8-pixel block of the scanned pixel, in that
  pixel's own resolution. Res 0 has blocks 0-31 (8 rows x 4 columns), res 1
  has blocks 32-39 (4 x 2), and res 2 has blocks 40-41 (2 x 1).
- **pair type**: 3 bits. Which partner the pixel is paired with:
  - 0-3: the same-resolution neighbours at distance 1, in the order left,
    upper-left, upper, upper-right. Each unordered neighbour pair is counted
    exactly once.
  - 4: the co-located pixel one resolution coarser, `(x/2, y/2)`.
  - 5: for res 0 only, the co-located pixel of the quarter image, `(x/4, y/4)`.
- **own direction** and **partner direction**: 3 bits each.

A pair votes only when both pixels have a valid direction. The 15-bit feature
index is simply the concatenation `{block, type, dir_a, dir_b}`. The layout
has 32x6x64 + 8x5x64 + 2x4x64 = 15,360 used dimensions.

**Why there is no histogram memory.** A real-AdaBoost weak classifier reads
exactly one histogram dimension. Storing all 15,360 counters would waste
memory, so `cooc_histogram` keeps one 7-bit counter per weak classifier
instead, next to a table of the classifiers' feature indices. Every vote-scan
cycle, the up to six pairs of the scanned pixel are compared with all 500
indices. The six pairs have different pair types, so a counter can match at
most one of them and grows by at most 1 per cycle. A dimension collects at
most 64 votes (one per pixel of its block), so the counters never saturate
in practice.

The direction maps are written during the load phase and read during the
vote scan. The vote scan starts only after the whole ROI is in. This is
needed because a coarse-resolution direction becomes known only some rows
after the fine-resolution pixels it pairs with.

## Classifier

Weak classifier `t`:

1. Takes its vote count `c`.
2. Computes `bin = min(c >> 1, 31)`.
3. Reads the signed 8-bit output `h_t` at LUT address `{t, bin}`. The LUT has
   500 x 32 entries.

The strong classifier adds all 500 outputs. The ROI is "human" when the sum is
greater than 0; a sum of exactly 0 counts as "not human".

## CPU interface

- **ROI input.** Write 512 words per ROI with `in_wr_en` while `in_full` is
  low. The pixel stream starts as soon as the first word arrives. It stalls
  whenever the FIFO runs empty, so the CPU may write at any pace.
- **Results.** Read with `out_rd_en` while `out_empty` is low. `out_rd_data`
  shows the head word (first-word fall-through).
- **Result word.** Bit 20 = human. Bits 19:0 = signed score. Bits 31:21 are
  zero.
- **Tables.** Load them through the `cfg_*` port while `busy` is low:
  - `cfg_sel = 0` writes the feature index `cfg_data[14:0]` of classifier
    `cfg_addr[8:0]`.
  - `cfg_sel = 1` writes `h = cfg_data[7:0]` (signed) at LUT address
    `cfg_addr = {classifier[8:0], bin[4:0]}`.

  The tables are not initialised. Trained values from offline training must
  be loaded before the first ROI. 16,500 writes load everything.

All logic runs on a single clock `clk` with an active-low synchronous reset
`rst_n`.

## What follows the reference and what does not

**Taken from the reference design:**
- the block structure (FIFO, three three-line buffers at 1/1, 1/2 and 1/4
  resolution, 3x3 kernel, histogram, strong classifier with a weak-classifier
  LUT, FIFO);
- the 32-bit x 512 FIFOs;
- the 64x32 / 32x16 / 16x8 image sizes and the 8x8 block;
- offset distance 1, 8 directions and the gradient threshold of 15;
- 32 bins, 500 weak classifiers, integer weak outputs;
- the sign-of-sum decision and gradients from the up/down/left/right
  neighbours.

**This design's own choices.** Each is a reasonable filler for a detail the
reference leaves open:
- pixel packing;
- decimation as the resize method;
- the border rule;
- the L1 magnitude and the axis-aligned sector boundaries;
- the pair set and the feature-index layout;
- one counter per weak classifier;
- the binning rule `c >> 1`;
- 8-bit weak outputs;
- the FIFO handshakes, the cfg port, the result-word format and the
  sequencer.

**Known departures:**
- **Dimension count.** The reference histogram has 16,296 dimensions, and its
  layout is not known. This layout has 15,360, so classifier tables trained
  for the original feature set cannot be loaded without re-mapping them.
- **Number of weak classifiers.** The reference also lists 250 AdaBoost
  training rounds alongside the 500-classifier LUT. The hardware follows 500
  (`NUM_WEAK`). Loading a table whose unused entries are zero gives a
  250-classifier result.
- **Frame rate.** A frame of six windows takes 31,496 cycles, measured
  from the first word written to the last result. The 30 fps camera rate
  therefore needs a clock of only about 0.94 MHz.
- **Latency.** The reference reports 0.257-0.565 ms per ROI without giving a
  clock. This design takes a fixed 5248 cycles: 52 µs at 100 MHz.
- **Throughput.** ROIs are processed one after another, without overlap.
  Loading the next ROI while the current one votes would nearly halve the
  time per ROI.
- **Memory mapping.** The reference circuit reports no block RAM and no DSP
  slices. This design also uses no multipliers. Its LUT, FIFOs and line
  buffers, however, are plain arrays, and an FPGA tool may map them to block
  RAM.
- **Synthesis.** About 3,950 flip-flop bits after coarse synthesis. The
  memories are the two FIFOs (2 x 16 Kbit), the 128 Kbit LUT, the direction
  maps and the line buffers.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference model
`tb/mrcohog_ref_pkg.sv` is written independently of the RTL:
- directions from `$atan2` in real arithmetic;
- blocks and indices from multiplications;
- the full histogram in an associative array.

| Testbench | What it checks |
|---|---|
| `tb_sync_fifo` | Random traffic against a queue. Fill past full, drain past empty |
| `tb_roi_scaler` | Every pixel, its coordinates and keep flags. 512 pops. 2048 cycles per ROI without gaps |
| `tb_line_buffer3` | Every 3x3 window of two random images (one with input gaps). 62x30 windows |
| `tb_gradient_unit` | Random, near-threshold and exact-boundary gradients. All 8 codes seen |
| `tb_cooc_histogram` | All 500 counts against the full reference histogram. Scan latency 2691. Clearing |
| `tb_adaboost_classifier` | Score, decision (positive, negative, zero sums) and latency NW+3 |
| `tb_accel_ctrl` | Pulse order, flush length, stall while the output FIFO is full |
| `tb_comta_accel_top` | 8 ROIs end to end with 4-deep FIFOs; see below |
| `tb_comta_accel_full` | Default sizes, 3 ROIs, full table load, exact result words and 5248-cycle latency |
| `tb_tracking_workload` | Tracking use case: 6 sliding windows over a 64x128 binary slice. Exact results. Best score at the centred person |

`tb_comta_accel_top` checks the result words of all 8 ROIs and the per-ROI
latency. It also counts each of these mechanisms and requires it to happen:
- input-FIFO back-pressure;
- a pixel stream that stalls on an empty FIFO;
- a result write that stalls on a full FIFO;
- rejected weak gradients;
- cross-resolution votes;
- both decisions.

The classifier tables in the testbenches are synthetic, not trained weights.
They favour dimensions that occur in the test silhouettes, so both decisions
occur. The tests check that the hardware computes the defined function
exactly. They say nothing about detection accuracy.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mrcohog_pkg.sv tb/mrcohog_ref_pkg.sv \
  rtl/sync_fifo.sv rtl/roi_scaler.sv rtl/line_buffer3.sv rtl/gradient_unit.sv \
  rtl/cooc_histogram.sv rtl/adaboost_classifier.sv rtl/accel_ctrl.sv \
  rtl/comta_accel_top.sv tb/tb_comta_accel_full.sv \
  --top-module tb_comta_accel_full -o sim && ./obj_dir/sim
```

For a single block, list the package(s), the module and its testbench, and
name the testbench as top module. Every test runs in well under a second.

## Changing the design

- Shared sizes live in `mrcohog_pkg`. `ROI_H`/`ROI_W` must stay a power of two
  and divisible by 32 (rows) and 16 (columns) for the block numbering in
  `block_id`; widen `X_W`/`Y_W` for a larger ROI.
- `NUM_WEAK` / the `NW` parameter sets the number of weak classifiers.
  Addresses are 9 bits, so at most 512.
- To add pair types, extend `pair_t` and `NEV` in `cooc_histogram`, then
  update `block_id`/`feat_index` and the reference model together.
