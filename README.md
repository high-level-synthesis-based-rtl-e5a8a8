# H.264/AVC luma sub-pixel interpolator for 8x8 blocks

Motion-compensated prediction in H.264/AVC lets a motion vector point
between pixels, in steps of a quarter sample. The predicted block then has
to be interpolated from the reference picture. Half-sample positions come
from a 6-tap FIR filter with kernel (1, -5, 20, 20, -5, 1). Quarter-sample
positions are the rounded average of the two nearest integer or half
samples. This is among the most compute-heavy steps of a video codec.

This RTL does that interpolation for one 8x8 luma block at a time. The
input is the 13x13 window of integer pixels around the block: two pixels
before it and three after it in each direction. The other input is the
fractional part of the motion vector, `frac_x` and `frac_y`, each 0..3.
The output is the 8x8 prediction at that position, bit-exact to the
standard. A larger partition (16x16, 16x8, ...) is fed as its 8x8 parts,
each with its own window. A second mode, for fractional motion
estimation, produces the block at all 16 positions, one after another.

The structure follows a published HLS (high-level synthesis) design for a
Xilinx 7-series FPGA. That design has three arrays of eight filters with
register buffers between them, and a fixed phase order. Everything that
description leaves open was decided here, and is listed under
"Departures and own choices".

## Sample positions

Inside a block, write `G` for the integer pixel at (x, y). Write `H` for its
right neighbour and `M` for the one below it. The half samples are:

* `b`: the horizontal half sample, between G and H. It is the row filter
  sum `b1`, then `(b1 + 16) >> 5`.
* `h`: the vertical half sample, between G and M. It is the column sum
  `h1`, then `(h1 + 16) >> 5`.
* `j`: the centre half sample. It is made by running the same 6-tap kernel
  down a column of unrounded `b1` sums, then `(sum + 512) >> 10`.

Write `s` for the `b` one row down and `m` for the `h` one column right.
Every half sample is saturated to 0..255. The sixteen positions are then:

| frac_y \ frac_x | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| 0 | G | a = avg(G,b) | b | c = avg(b,H) |
| 1 | d = avg(G,h) | e = avg(b,h) | f = avg(b,j) | g = avg(b,m) |
| 2 | h | i = avg(h,j) | j | k = avg(j,m) |
| 3 | n = avg(M,h) | p = avg(h,s) | q = avg(j,s) | r = avg(m,s) |

Here `avg(u,v) = (u + v + 1) >> 1`.

## Datapath

```
 in_row (13 px) --+--> int_pixel_buffer 13x13 ---------------------------+
                  |        |  (columns, during HJ)                        |
                  v        v                                              |
            [ 8 x hpi1_filter ] -- b', b --> half_pixel_buffer (b 13x8) --+
                  |                         (h, m 8x8) -------------------+
                  +------- h / m --------------^                          |
                               b' columns --> [ 8 x hpi2_filter ] --> j_pixel_buffer 8x8
                                                                          |
                            qpel_select_encoder  <------------------------+
                                   | p, q, avg (per column)
                            [ 8 x qpi_filter ] --> qpel_out_buffer 8x8 --> out_row / out_blk
```

* `hpi1_filter` is the first-stage 6-tap filter on 8-bit pixels. It gives
  the unrounded 15-bit sum (b' or h') and the rounded, saturated sample.
  There are eight of them. They make `b` while the window is loaded, and
  then `h`.
* `hpi2_filter` is the second-stage filter on the 15-bit b' sums. It gives
  `j`. There are eight.
* `qpel_select_encoder` picks, for each of the 8 columns of the current
  row, the two operands of the table above. It also says whether to
  average them or pass the first one through.
* `qpi_filter` is the rounded average, or pass-through. There are eight.
* All buffers are plain registers, with every entry readable at once.
  About 5,900 flip-flops hold the window, b' and b (13x8 each), h, m, j
  and the output block. This follows the original design, which split its
  arrays into individual registers so that all the filters could read in
  parallel.

## Schedule

`luma_interp_ctrl` runs three overlapping phases for each block:

1. **LOAD, 13 accepted rows.** One window row enters per cycle in which
   `in_valid && in_ready`. The window row is stored. The eight hpi1 filters
   work along the row, and its eight `b` values are stored both unrounded
   (b') and rounded.
2. **HJ, 8 cycles.** The hpi1 filters are re-indexed to run down stored
   window columns, and make one row of `h` per cycle. In the same cycle the
   hpi2 filters run down the stored b' columns and make one row of `j`.
   `in_ready` is low in this phase.
3. **QPI, 8 cycles, one cycle behind HJ.** The encoder and the qpi filters
   make output row `y` from the stored `G`, `b`, `h` and `j`.

The next block's LOAD starts in the cycle after the last HJ cycle. It
overlaps the QPI stage's last row, so the position (`frac_x`, `frac_y`) is
carried down the pipeline with the block. Timing with rows arriving
without pauses, counted from the cycle the block's first row is accepted:

* output row y is on `out_row_*` 15 + y cycles later;
* `out_blk_valid` pulses 22 cycles later, and `out_blk` then holds the
  block for at least 13 cycles;
* a new block can start every 21 cycles.

A 3840x2160 picture has 129,600 blocks of 8x8. That is 2,721,600 cycles per
frame, or 37.5 frames/s at 102 MHz. The original HLS design reports 19
cycles per block, and 41 frames/s at 102 MHz. Its own description of the
datapath (13 loading cycles, then h and j from the same eight filters)
cannot take fewer than 21 cycles. This RTL follows that description, so
41 frames/s needs a clock of about 112 MHz here.

## Why eight h filters are enough

The positions g, k and r use `m`, the `h` one column to the right. With
eight filters only eight columns of `h` are made per row, but the sixteen
positions together need columns 0..8. A block in single-position mode
needs either columns 0..7 or columns 1..8, never both. For `frac_x = 3`,
the HJ phase indexes the window one column further right (`hj_ox`) and
writes the result to a separate `m` store. The encoder reads `m` in place
of `h` for every `frac_x = 3` position.

Neighbours one row down are handled the same way. For `frac_y = 3` the
encoder reads `b` and `G` one row lower, which gives `s` and `M`. For
`frac_x = 3` it reads `G` one column right, which gives `H`. All 13 rows
of `b` are kept, because `j` needs them.

## All-positions mode

Fractional motion estimation compares a block at all its sub-sample
positions. When `in_all_pos` is high with a block's first row, the
controller adds two phases after HJ:

* **HM, 8 cycles.** A second column pass with the shift. `h` (from HJ) and
  `m` are then both held.
* **QALL, 128 cycles.** The encoder and the qpi filters sweep the 16
  positions in the order (0,0), (0,1), (0,2), (0,3), (1,0), ... (3,3).
  Each position takes 8 rows.

Row y of position p = 4*frac_x + frac_y leaves 31 + 8p + y cycles after the
block's first row. Each row is tagged with its position on `out_frac_x`
and `out_frac_y`. `out_blk_valid` pulses after every position's row 7, and
`out_blk` then holds that position's block for that one cycle only. The
next block is accepted 157 cycles after the first row (13 + 8 + 8 + 128).
The two modes can be mixed freely from block to block.

## Arithmetic

* The first-stage sum lies in -2550..10710, which needs 15 bits signed.
  The second-stage sum lies in -214200..475320, which needs 20 bits signed.
* The factors 5x and 20x are built as `(v<<2)+v` and `(v<<4)+(v<<2)`, by
  default. Parameter `MULT_STYLE = MULT_DSP`, on the top or on each filter,
  uses constant multipliers instead. Both give identical results. In the
  original design's FPGA results the shift-and-add form was the smaller
  and faster one, so it is the default.
* `j` is made from unrounded b' sums. Filtering rounded `b` instead would
  give different, non-conforming values.

## Interface (`h264_luma_interp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control and valid flags only) |
| `in_valid` / `in_ready` | in / out | 1 | a window row is transferred when both are high |
| `in_row` | in | 13 x 8 | window row; row 0 is the line two above the block, element 0 the pixel two left of it |
| `in_frac_x`, `in_frac_y` | in | 2 each | quarter-sample phase; sampled with row 0 of each block |
| `in_all_pos` | in | 1 | sampled with row 0: produce all 16 positions of the block |
| `out_row_valid`, `out_row_idx`, `out_row` | out | 1, 3, 8 x 8 | one predicted row, valid for one cycle |
| `out_frac_x`, `out_frac_y` | out | 2 each | position of that row (and of `out_blk`) |
| `out_blk_valid`, `out_blk` | out | 1, 8 x 8 x 8 | pulse when the block is complete; the block itself |

Output has no back-pressure. A consumer must take each row when it is
offered, or read `out_blk` within 13 cycles of `out_blk_valid` (in
all-positions mode, in the pulse cycle itself). Pauses in
`in_valid` are allowed anywhere in LOAD. At a picture edge, the caller
builds the window by repeating the edge samples, as the standard does.

Types and fixed sizes are in `luma_interp_pkg`: 8-bit samples, an 8x8
block, a 13x13 window and 6 taps. They are set by the standard and by the
8x8 block size; changing them is not supported.

## Departures and own choices

* **Two modes.** The original text says all quarter samples are
  generated, but its block diagram has a selection encoder in front of
  eight quarter filters. Both readings are built. The default
  single-position mode follows the diagram. The all-positions mode
  follows the text, with a schedule (HM and QALL phases, 157 cycles) and
  an extra `m` store that are this design's own.
* **21 cycles per block, not 19** (see Schedule).
* **Saturation** of the half samples and of `j` to 0..255 is added. The
  original formulas omit it, but the standard requires it.
* **Own choices:** the valid/ready input handshake, the row stream with a
  block-complete pulse and position tag at the output, the reset, the column and row
  shifting of sources, the overlap of QPI with the next LOAD, and the
  pass-through mode of the quarter filters.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model (`tb/luma_ref_pkg.sv`)
computes every position from the standard's formulas with integer
multiplies. It makes `j` by the other route, filtering the vertical sums
h1 along a row, so it does not repeat the hardware's arithmetic.

* `tb_hpi1_filter`, `tb_hpi2_filter`: random and extreme inputs, both
  multiplication styles. `tb_qpi_filter`: all 2^17 input combinations.
* Buffers, encoder and controller are each checked against a shadow model.
  The controller test also checks the 21- and 157-cycle block intervals.
* `tb_h264_luma_interp` runs 400 blocks, about a tenth of them in
  all-positions mode, with mode switches both ways. Its windows are
  random, ramps, or 0/255 patterns (which push the filters past both ends
  of the sample range). It covers every one of the 16 positions,
  back-to-back blocks and random input pauses. It checks every output row,
  its position tag and every block. It checks the latencies of both modes
  and the 21- and 157-cycle intervals. It fails if any of these cases
  never occurs.
* `tb_qfhd_stripe`: a 3840x16 stripe of a synthetic picture, as 240 16x16
  partitions with random motion vectors and edge padding. It checks all
  61,440 samples and that 960 blocks take exactly 959 x 21 + 22 cycles.

Each test has also been run against a deliberately broken copy of its
module, and each one failed there. The design has not been run on an FPGA,
and no timing closure has been attempted. It uses no vendor primitives.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/luma_interp_pkg.sv tb/luma_ref_pkg.sv tb/tb_h264_luma_interp.sv \
  --top-module tb_h264_luma_interp -Mdir obj -o sim && obj/sim
```

To run another test, replace the testbench file and the top-module name.
`-y` lets Verilator find each module in the file of the same name.
`-Wno-fatal` keeps width warnings in the testbenches from stopping the
build. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/luma_interp_pkg.sv rtl/<module>.sv`.
