# Adaptive intra prediction and hierarchical motion estimation for H.265, with clock gating

An H.265 encoder spends much of its effort in two searches: choosing one of 35
intra prediction modes for every block, and finding where a block came from in a
reference frame. This RTL implements a small, low-power prediction core for 4x4
luma blocks built around two shortcuts:

* **Adaptive intra prediction.** Before predicting, the block is classified. A
  Sobel edge detector and a neighbour-difference energy measure decide whether it
  is smooth, has a mostly horizontal-gradient edge, a mostly vertical-gradient
  edge, or none of these. Only the matching family of modes is run: planar and
  DC for smooth blocks, angular modes 2..17 or 18..34 for the two edge classes,
  and all 35 otherwise. All predictors exist in parallel. Those that are not needed get
  constant inputs and do not switch. The winner is the enabled mode with the
  smallest sum of absolute differences (SAD) against the block.
* **Hierarchical motion estimation.** A 4x4 block is matched at all 25
  positions of an 8x8 reference window at full resolution. The block and the
  best region are then compared again at half (2x2) and quarter (1x1)
  resolution.
* **Clock gating.** Each engine sits behind a latch-based clock gate. It gets
  clock edges only while it has work, so during intra-only work the motion
  estimator is stopped, and the other way round.

The architecture follows the article "Low Power System on Chip Implementation of
Adaptive Intra Frame and Hierarchical Motion Estimation in H.265" (Naidu, Sekhar,
Boya, Journal of VLSI Circuits and Systems 6(2), 2024). Where that description
leaves something open, this RTL makes its own choice. The section "Where this
RTL departs from or adds to the published description" lists those choices.

## Structure

```
h265_pred_top
├── icg_cell u_icg_intra ──► intra_gclk
├── icg_cell u_icg_me    ──► me_gclk
├── adaptive_intra u_intra            (clocked by intra_gclk)
│   ├── edge_detect        Sobel gx/gy on the 4 interior pixels, threshold 128
│   ├── content_analysis   sum of squared right/bottom differences, <1000 / >5000
│   ├── mode_decision      flags -> mode family -> 35-bit enable mask
│   ├── 35 x intra_pred_4x4 (mode 0..34, constant per instance)
│   ├── 35 x sad4x4         prediction vs. current block
│   └── min-SAD selection + output register
└── hier_me u_me                      (clocked by me_gclk)
    └── sad4x4             one candidate position per clock
```

`h265_pkg` holds the shared types (`sad_t`, `mode_t`, `mode_group_e`), the
thresholds and the HEVC angle tables. There are no bus interfaces. A host
processor writes blocks and reads results through the top's plain ports.

## Data formats

* A 4x4 block is a 128-bit vector. Pixel (row y, column x) is at
  `[8*(4*y+x) +: 8]`, so row 0 is in the low 32 bits.
* The 8x8 motion search window is a 512-bit vector with pixel (y, x) at
  `[8*(8*y+x) +: 8]`.
* The intra reference is 16 pixels (128 bits). Bytes 0..7 hold `top[0..7]`: the
  row above the block plus four pixels above-right. Bytes 8..15 hold
  `left[0..7]`: the column to the left plus four pixels below-left. The
  above-left corner pixel is not carried. It is estimated as
  `(top[0] + left[0] + 1) >> 1`.

## Adaptive intra engine

### Classification

`edge_detect` skips the border pixels. At each of the four interior pixels it
applies the 3x3 Sobel kernels:

* `gx` is the right column minus the left column, weighted 1-2-1.
* `gy` is the bottom row minus the top row, weighted the same way.

`horizontal_edge` is set if any |gx| exceeds 128, and `vertical_edge` if any
|gy| does. The names describe the gradient: a large `gx` appears at a vertical
line in the picture, and it selects the horizontal-class angular modes 2..17.

`content_analysis` takes the nine pixels outside the last row and column. For
each it adds the squared difference to its right neighbour and to its bottom
neighbour. A sum below 1000 means *smooth*, and a sum above 5000 means *detailed*.

`mode_decision` applies these rules in order:

| condition                               | family      | modes run |
|-----------------------------------------|-------------|-----------|
| smooth                                  | `GRP_SMOOTH`| 0, 1      |
| horizontal_edge only                    | `GRP_HORIZ` | 2..17     |
| vertical_edge only                      | `GRP_VERT`  | 18..34    |
| anything else (both edges, no edge, detailed) | `GRP_ALL` | 0..34 |

### The predictors

`intra_pred_4x4` computes one mode combinationally, following the HEVC rules for
a 4x4 luma block:

* **Planar (0):** `((3-x)*left[y] + (x+1)*top[4] + (3-y)*top[x] + (y+1)*left[4] + 4) >> 3`.
* **DC (1):** the rounded mean of `top[0..3]` and `left[0..3]`.
* **Angular (2..34):** each mode has a slope `intraPredAngle` in 1/32 pixel,
  from +32 through 0 to −32 and back to +32.
  * Modes 18..34 project onto the top row and modes 2..17 onto the left column.
  * For a negative slope, the main reference is first extended to negative
    indices. Those entries are taken from the other side through `invAngle`.
  * A pixel at distance `d` (1..4) from the reference lands at `d*angle/32`.
    Its value is the two-tap interpolation `((32-f)*ref[i+1] + f*ref[i+2] + 16) >> 5`,
    where `i` is the integer part and `f` the fractional part.

Reference smoothing and the DC / pure-horizontal / pure-vertical boundary filters
of HEVC are not applied. HEVC does not smooth 4x4 references in any case, but
its edge filters for DC, mode 10 and mode 26 are absent here. Predictions for
those three modes therefore differ from a conforming HEVC encoder on the first
row or column.

`adaptive_intra` has 35 instances, each with a constant mode number, so synthesis
reduces each one to its own mode. A disabled instance receives zero on its
reference and block inputs (operand isolation). The selection loop visits the
enabled modes in ascending order and keeps a strictly smaller SAD, so ties go to
the lower mode number.

### Timing

The engine is a single stage. Classification, prediction, SAD and selection are
combinational from `cur_i`/`ref_i`, and the result is registered. `valid_o` and
the results appear on the clock edge after the one that sampled `valid_i`. One
block can be accepted every clock.

## Hierarchical motion estimator

`hier_me` is a five-state machine: IDLE, FULL, HALF, QUARTER, DONE.

1. **FULL (25 clocks):** SAD of the 4x4 block at every position x, y = 0..4 of
   the 8x8 window, scanned row by row. A strictly smaller SAD replaces the best
   position, so among equal minima the first in scan order wins. On reset and on
   each start, the best position is 0,0 and `min_sad` is all ones.
2. **HALF (1 clock):** the current block and the best 4x4 region are both
   averaged to 2x2 (each group of four pixels, summed and shifted right by 2).
   Their SAD is `sad_half_o`. It replaces `min_sad_o` if smaller.
3. **QUARTER (1 clock):** both 2x2 blocks are averaged to one pixel. Their
   absolute difference is `sad_quarter_o`, and it replaces `min_sad_o` if
   smaller.
4. **DONE (1 clock):** `done_o` is high and the state machine returns to IDLE.

**The coarse stages never move the position.** A 2x2 block compared inside a
2x2 region, or 1x1 inside 1x1, has only one possible placement. The coarse
stages therefore confirm the full-resolution winner and only lower the reported
minimum. Note that `min_sad_o` then mixes SADs of different scales. Use
`sad_full_o` for a cost that is comparable between blocks.

Timing: `start_i` is sampled while idle. `busy_o` is high from the next clock.
`done_o` is a one-clock pulse 27 clocks after the sampling edge. The block and
window inputs are not registered, so they must stay stable while `busy_o` is high.

## Clock gating

`icg_cell` is the usual gate. A latch that is transparent while `clk` is low
captures `en_i | test_en_i`, and the gated clock is `clk` AND the latched
enable. The gated clock can only start or stop at a rising edge and never
produces a short pulse. The latch in this cell is intended, and it is the only
latch in the design.

`h265_pred_top` derives the enables from activity:

* intra clock enable = `intra_valid_i | intra_valid_o`. The clock runs for each
  block and for one more edge, which clears `valid_o`.
* motion estimation clock enable = `me_start_i | me_busy_o`.

`test_en_i` forces both clocks on. Both engines reset asynchronously (`rst_n`,
active low), so they reset even while their clock is stopped. Both can work at
the same time.

## Where this RTL departs from or adds to the published description

* **Angular prediction:** the source gives a worked example (mode 7) that
  copies the nearest left reference pixel. It uses `(y*angle + x*32) / 32` as the
  index, with an angle that does not match its own formula. It also states that
  HEVC interpolates linearly between two reference pixels. This RTL implements
  the standard HEVC interpolating rule with the standard angle table. The
  published example values and predicted-pixel tables are therefore not
  reproduced.
* **Reference port:** the 128-bit reference port is kept. Because it has no
  room for the corner pixel, the corner is estimated.
* **Intra register stage:** the published intra model is purely combinational.
  One output register was added, so the clock gate has something to gate and the
  result has a defined timing.
* **What is classified:** the current block is classified, not the reference
  pixels.
* **Fallback family:** when neither the smooth flag nor a single edge direction
  decides, all 35 modes run. The source names only the three families.
* **Motion estimator interface:** it adds a start/busy/done handshake and exposes
  the per-stage SADs. The published motion estimator has only clock, reset and
  the best coordinates as I/O.
* **Clock enables:** how idleness is detected, and the `test_en_i` override, are
  choices made here.
* **Not part of this RTL:** the host processor that feeds the core, and the
  rest of an H.265 encoder (transform, quantisation, entropy coding, loop
  filters, rate control).
* **Not reproduced:** the FPGA resource and power figures reported for the
  original design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models are in
`tb/tb_models_pkg.sv`. They are written independently of the RTL, on unpacked
arrays: Sobel by kernel multiplication, HEVC prediction after the standard's
text, and a software full search plus coarse stages. `tb/tb_blockgen_pkg.sv`
generates smooth, step-edge and random blocks, and reference pixels that resemble
the block's surroundings.

| testbench | what it checks |
|-----------|----------------|
| `tb_edge_detect` | hand-built blocks with gradients at 128 (not an edge) and 132 (edge), and 3000 random blocks |
| `tb_content_analysis` | energies 968/1058 around 1000, 5000/5202 around 5000, the checkerboard maximum, random blocks |
| `tb_sad4x4` | extremes and 5000 random pairs |
| `tb_mode_decision` | all 16 flag combinations and the full enable mask |
| `tb_intra_pred_4x4` | hand-worked vertical, horizontal, three diagonals, DC and planar values; the 00..0F ramp reference in all 35 modes; 200 random references in all 35 modes |
| `tb_adaptive_intra` | 400 blocks of all four classes, one at a time and back to back, with the 1-clock latency |
| `tb_hier_me` | exact match at (4,4), the all-ties case (must return 0,0), planted and random searches, the 27-clock latency |
| `tb_icg_cell` | one gated edge per enabled cycle, no high phase while `clk` is low, enable changes during the high phase ignored, test override |
| `tb_eval_workloads` | the two evaluation experiments: the 00..0F reference swept through modes 0..34 (predictions printed) and through the core with one block of each class; a motion search whose match is at (4,4) |
| `tb_h265_pred_top` | the whole core at its default configuration, described below |

`tb_h265_pred_top` runs intra-only, ME-only, overlapping and test-mode phases. It
checks every result against the models. It also checks that the idle engine got
no clock edges, and it counts each mechanism: the four mode families, gated-off
clocks, a coarse stage lowering the minimum, overlap, and the test override.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/h265_pkg.sv tb/tb_models_pkg.sv tb/tb_blockgen_pkg.sv tb/tb_h265_pred_top.sv \
    --top-module tb_h265_pred_top -o sim
./obj_dir/sim
```

To run another testbench, replace the testbench name. Every testbench finishes
in well under a second.

Parameters that are easy to change are the thresholds: `EDGE_THRESHOLD`,
`SMOOTH_THRESHOLD` and `DETAILED_THRESHOLD` in `h265_pkg`, also exposed as
module parameters of `edge_detect` and `content_analysis`. The block size (4x4)
and window size (8x8) are built into the port widths and loops.
