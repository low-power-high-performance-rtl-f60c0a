# Edge-oriented Bayer demosaicker with a four-line buffer

A single-sensor camera sees one colour per pixel through a Bayer colour filter
array (CFA). This engine rebuilds the two missing colours of every pixel in a
streaming pipeline: one 8-bit CFA sample in and one 24-bit RGB pixel out per
clock. It follows an edge-oriented demosaicking method (EODM) for low-cost VLSI:

* It works on **colour differences**, green minus red and green minus blue.
  These change slowly across an image even where the colours themselves change
  sharply, so they are good to interpolate.
* It measures how strongly those differences vary **horizontally and
  vertically**, classifies the local edge into one of five types, and blends the
  horizontal and vertical estimates to suit. So it interpolates along an edge,
  not across it.
* It needs only **adders, subtractors, shifts and comparators**, and only **four
  line buffers** (4 x 768 x 8 bits for a 768-pixel-wide image) to form its
  5 x 7 window.

The published architecture gives the pipeline structure, the window, the line
buffers, the colour-difference and weighting units, and the edge-type table. It
does not give the exact edge, candidate and interpolation formulas. This RTL
fills those gaps with the simplest formulas consistent with the method. The
section "What is taken from the architecture and what is not" lists them, so
the output is this implementation's image, not a bit-exact copy of the
published results.

## Data format and interface (`eodm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `in_pix` carries a sample this cycle |
| `in_sof` | in | 1 | this sample is pixel (0,0) of a new frame |
| `in_pix` | in | 8 | CFA sample, raster order |
| `out_valid` | out | 1 | `out_rgb` is a demosaiced pixel |
| `out_rgb` | out | 24 | `rgb_t` struct {r, g, b} |
| `out_x`, `out_y` | out | 10, 9 | position of that pixel in the frame |
| `out_type` | out | 3 | edge type used for it (see the table below) |

Parameters: `IMG_W = 768` and `IMG_H = 512`, the frame size the method was
evaluated on.

* **Bayer phase** is GRBG from the first pixel. Even rows read G R G R ... and
  odd rows read B G B G .... A sample is green when its row and column have the
  same parity.
* **Flow control.** There is none backwards. The source may pause (`in_valid`
  low) at any time, and the pipeline carries the empty slots. Frame position is
  counted internally. `in_sof` restarts the count, so a frame may be cut short.
* **Borders.** A pixel is output only when its whole 5 x 7 window lies inside
  the frame: rows 2 .. H-3 and columns 3 .. W-4. That is (H-4) x (W-6) pixels
  per frame (508 x 762 at the defaults), in raster order. Border pixels are
  dropped, not extrapolated.
* **Latency.** The window of pixel (i, j) is complete when sample (i+2, j+3)
  is accepted. `out_valid` for (i, j) is set by the fifth clock edge after the
  edge that accepted that sample. Throughput is one pixel per clock.

## Forming the window: rotating line buffers and register bank

`line_buffer` holds four complete image lines in four single-port SRAMs
(`line_sram`, 768 x 8 each, read-first). For every accepted sample, on one edge:

1. All four SRAMs are read at the sample's column.
2. The new sample is written into the SRAM that holds the oldest line, so it
   overwrites that line's word just after it was read.

The SRAM that receives row y is `y mod 4`. Lines are therefore never copied;
instead the roles of the buffers rotate. Four read multiplexers put the SRAM
outputs back in age order, and four write enables pick the SRAM to write.
Together with the incoming sample this gives a column of five vertically
adjacent samples (rows y-4 .. y) one clock later.

`register_bank` shifts these columns into five rows of seven registers.
`win[r][c]` is the sample at row i-2+r, column j-3+c, and `win[2][3]` is the
pixel being demosaiced.

## Colour differences (stage 2) — the core of the method

All differences in this design are **green minus chroma** (chroma meaning R or
B), whichever of the two is the sample itself. One sign convention therefore
serves all three reconstruction cases.

**Five-tap unit (`cdc`).** Along a row or column, take a sample `x0`, its
neighbours `x-1`, `x+1` (the other kind) and the samples `x-2`, `x+2` (same
colour as `x0`). It computes:

    A = (x-1 + x+1) / 2                 estimate of the neighbours' colour at x0
    B = (x-2 + 2*x0 + x+2) / 4          smoothed estimate of x0's own colour
    d = A - B   if x0 is R or B         (green from the neighbours minus chroma)
    d = B - A   if x0 is G

`B` is the mean of the half-way estimates (x-2 + x0)/2 and (x0 + x+2)/2. This
unit is built from the ripple-carry `add_n` adders, with the shifts as wiring.

**Three-tap unit (`cdc3`).** It computes `(x-1 + x+1)/2 - x0` (or the negation
when `x0` is green). It is used where the five-tap unit would need samples
outside the window.

**`wdcdc`** evaluates three sets of differences around the centre (i, j) and
registers them:

| set | positions | unit | used for |
|---|---|---|---|
| horizontal `d_h` | rows i-2, i, i+2 x columns j-1, j, j+1 | five-tap along the row | G at R/B, row chroma at G |
| vertical `d_v` | rows i-1, i, i+1 x columns j-2, j, j+2 | five-tap along the column at row i; three-tap at rows i+-1 (the five-tap form would need rows i+-3) | G at R/B, column chroma at G |
| diagonal `d_d` | (i+-1, j+-1) | mean of horizontal and vertical three-tap | the opposite chroma at R/B |

These positions make every difference in a set describe the same colour pair.
For example, around a red centre every horizontal and every vertical difference
is G - R, and the diagonal ones are G - B.

**Weighting (stage 3).** `wc` averages each 3 x 3 set with the kernel

    1 2 1
    2 4 2   / 16
    1 2 1

This gives `dh_hat` and `dv_hat`. `dd_hat` is the plain mean of the four
diagonal differences. Every division by a power of two in the signed datapath
is an arithmetic shift, i.e. it rounds towards minus infinity.

## Edge strength and edge type (stages 3 and 4)

The edge detectors `edd` (EDD_1 horizontal, EDD_2 vertical) run on the same
stage-2 differences. Each set is treated as three parallel lines along the
detection direction. Each line's edge strength is its total variation,
`|d0-d1| + |d1-d2|`. The centre line is weighted 2 and its neighbours 1, then
the sum is divided by 4. The results are `Eh` and `Ev` (at most 1020).

`ts` classifies the pair. The first rule that holds wins:

| type | code `c` | rule | difference used (`edc`) |
|---|---|---|---|
| normal horizontal edge | 000 | 4*Eh <= Ev | Dh |
| slight horizontal edge | 001 | 2*Eh <= Ev | (3*Dh + Dv)/4 |
| normal vertical edge | 010 | 4*Ev <= Eh | Dv |
| slight vertical edge | 011 | 2*Ev <= Eh | (Dh + 3*Dv)/4 |
| no edge | 100 | otherwise | (Dh + Dv)/2 |

A small horizontal variation means the structure runs horizontally, so the
horizontal estimate is trusted. `edc` forms all five candidates from `dh_hat`
and `dv_hat`, and its multiplexer passes the one chosen by `c` as `d_star`.

## Reconstruction (stage 5, `ci`)

| centre | missing colour | formula |
|---|---|---|
| R or B (CI_1) | G | `G = P + d_star` |
| R or B (CI_2) | B or R | `X = G - dd_hat` (G from CI_1) |
| G (CI_3) | chroma of its row (R on even rows, B on odd) | `P - dh_hat` |
| G (CI_3) | chroma of its column | `P - dv_hat` |

Each result is clipped to 0..255, and the known colour passes through unchanged.
At a green centre the horizontal and vertical differences describe different
chroma planes, so no edge selection applies there.

## Pipeline

| stage | registers | modules |
|---|---|---|
| (accept) | SRAM read data, incoming sample | `line_buffer` |
| 1 | 5 x 7 window | `register_bank` |
| 2 | 9 + 9 + 4 differences | `cdc`, `cdc3` in `wdcdc` |
| 3 | `dh_hat`, `dv_hat`, `dd_hat`, `Eh`, `Ev` | `wc` in `wdcdc`, `edd` x 2 |
| 4 | `c`, `d_star`, carried differences | `ts`, `edc` |
| 5 | `out_rgb`, `out_x`, `out_y`, `out_type` | `ci` |

A side-band struct (valid, position, centre sample) travels with the data. The
datapath registers run freely, and only the window waits for input. With the
default frame size, synthesis reports 24,576 memory bits, about 750 flip-flop
bits and about 4,300 word-level cells. Most of the cells are the bit-level
ripple adders.

## What is taken from the architecture and what is not

Taken from the published architecture:

* the five-stage pipeline and its split into RB, CDC/WC, EDD, TS/EDC/MUX and CI;
* the 5 x 7 window and four SRAM line buffers of 768 x 8 bits;
* the five-tap colour difference (equations for G - R at a red pixel) and its
  add / shift / subtract structure;
* the 4/2/1 weighting divided by 16;
* the two position sets of the weighting matrices;
* the five edge types with their 2-bit codes and their 2x / 4x thresholds;
* the three reconstruction cases;
* the frame size 768 x 512.

This implementation's own choices:

* GRBG phase and the stream interface with `in_sof`;
* dropping the border;
* the rotating use of the line buffers;
* read-first single-port SRAMs;
* green-minus-chroma at green positions;
* the three-tap unit for the off-centre vertical differences;
* the diagonal set and its mean (the published architecture names a third CDC
  and WC without a formula);
* the edge measure and its 1/2/1 weights;
* the blends for slight edges and for no edge;
* the reconstruction formulas and clipping;
* the 3-bit edge code with "no edge" = 100;
* rounding by arithmetic shift;
* asynchronous reset.

The published throughput, about 200 Msamples/s in a 0.18 um process, means a
200 MHz clock at one pixel per clock. Timing has not been analysed here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Reference values come from an independent
integer model, `tb/eodm_ref_pkg.sv`, which recomputes every intermediate value
from a frame held in memory.

* Unit benches (`tb_add_n`, `tb_cdc`, `tb_cdc3`, `tb_wc`, `tb_edd`, `tb_ts`,
  `tb_edc`, `tb_ci`) use random and extreme operands. `tb_ts` also tests every
  ratio boundary.
* `tb_line_buffer` (16 x 12 frame) checks every output column, the position and
  the one-clock delay. It runs with random pauses and a frame cut short by
  `in_sof`.
* `tb_register_bank` and `tb_wdcdc` compare the window and both stages of
  differences cycle by cycle.
* `tb_eodm_top` (48 x 20 frames) and `tb_eodm_full` (the default 768 x 512)
  stream synthetic scenes through the whole design. The scenes contain vertical
  and horizontal stripes, ramps, slanted edges and noise. Both benches use
  random input pauses and a frame cut short and restarted. For every output
  they compare the position, edge type and RGB, and they check the five-clock
  latency. They fail if any of these never occurred: an input pause, a restart,
  each of the five edge types, red, blue and green centres, clipping, or a
  write to each of the four line buffers.

The full-size run (about 0.85 million output pixels) takes a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/eodm_pkg.sv tb/eodm_ref_pkg.sv tb/tb_eodm_full.sv \
        --top-module tb_eodm_full -o sim
    ./obj_dir/sim

Replace `tb_eodm_full` by any other testbench name. The packages must come
first on the command line. A different frame size only needs `IMG_W` and
`IMG_H` on `eodm_top`. The line-buffer depth and counter widths follow from
them.

## Files

* `rtl/eodm_pkg.sv`: shared types (`pix_t`, `diff_t`, `edge_t`, `rgb_t`,
  `edge_type_e`), the Bayer phase function and clipping.
* `rtl/eodm_top.sv`: the pipeline.
* `rtl/line_buffer.sv`, `rtl/line_sram.sv`, `rtl/register_bank.sv`: the window.
* `rtl/add_n.sv`, `rtl/cdc.sv`, `rtl/cdc3.sv`, `rtl/wc.sv`, `rtl/wdcdc.sv`:
  colour differences.
* `rtl/edd.sv`, `rtl/ts.sv`, `rtl/edc.sv`: edges and selection.
* `rtl/ci.sv`: reconstruction.
* `tb/`: one testbench per module, the reference model package, and the
  end-to-end benches.
