# Multiplierless Gaussian smoothing for a streaming Canny edge detector

The first stage of Canny edge detection smooths the image with a 3x3 Gaussian
kernel. The integer kernel used here is

```
         | 21 31 21 |
1/256 *  | 31 48 31 |
         | 21 31 21 |
```

Written out naively this is nine constant multiplications and eight additions per
pixel. The kernel has only three distinct weights, though. Sum the pixels that
share a weight first:

```
a = A1 + A3 + A7 + A9      (corners, weight 21)
b = A2 + A4 + A6 + A8      (edges,   weight 31)
c = A5                     (centre,  weight 48)
Y = 21a + 31b + 48c        smoothed pixel = Y / 256
```

The job is now to multiply three values by three constants. This is a
constant-array-by-vector product. Each product is built from wired shifts and a
few adders and subtractors. The shifts cost nothing, so what counts is the number
of add/sub nodes and the longest chain of them (the logic depth).

This repository contains two adder graphs for this product, both from a
graph-based multiple-constant-multiplication (MCM) search. One is called
*exact* and the other *approximate*. The approximate graph trades search
optimality for a shorter critical path. **Both compute Y exactly.** "Approximate"
describes how the graph was found, not the result. Either graph can be used in a
complete streaming Canny pipeline: Gaussian smoothing, Sobel gradient,
non-maximum suppression and hysteresis thresholding.

## The two adder graphs

Both graphs use twelve add/sub nodes. They differ in how the nodes are chained.
In the tables, `<<` is a wired shift.

### Exact graph (`gauss_gb_exact`, depth 7, default)

| level | node  | computes                 | value          |
|-------|-------|--------------------------|----------------|
| 1     | Add1  | A1 + A3                  |                |
| 1     | Add2  | A7 + A9                  |                |
| 1     | Add3  | A2 + A4                  |                |
| 1     | Add4  | A6 + A8                  |                |
| 1     | Add5  | (c<<4) + (c<<5)          | 48c            |
| 2     | Add6  | Add1 + Add2              | a              |
| 2     | Add7  | Add3 + Add4              | b              |
| 3     | Add8  | (a<<2) + a               | 5a             |
| 4     | Add9  | Add8 + (b<<5)            | 5a + 32b       |
| 5     | sub   | Add9 - b                 | 5a + 31b       |
| 6     | Add10 | (a<<4) + sub             | 21a + 31b      |
| 7     | Add11 | Add10 + Add5             | Y              |

The graph reuses `a` three times (in Add8 twice and in Add10) and `b` twice
(in Add9 and sub). The price is a long serial chain.

### Approximate graph (`gauss_gb_approx`, depth 5)

| level | node     | computes               | value          |
|-------|----------|------------------------|----------------|
| 1     | AddSub   | A1 + A3                |                |
| 1     | AddSub1  | A7 + A9                |                |
| 1     | AddSub2  | A2 + A4                |                |
| 1     | AddSub3  | A6 + A8                |                |
| 1     | AddSub4  | (c<<6) - (c<<4)        | 48c            |
| 2     | AddSub5  | AddSub + AddSub1       | a              |
| 2     | AddSub6  | AddSub2 + AddSub3      | b              |
| 3     | AddSub7  | (a<<4) + (a<<2)        | 20a            |
| 3     | AddSub8  | a - b                  | a - b          |
| 3     | AddSub9  | (b<<5) + AddSub4       | 32b + 48c      |
| 4     | AddSub10 | AddSub7 + AddSub8      | 21a - b        |
| 5     | AddSub11 | AddSub10 + AddSub9     | Y              |

The trick is in AddSub8 and AddSub9. The `-b` needed for 31b = 32b - b is
folded into the `a` branch, and the 32b term is merged with 48c. Three
independent level-3 nodes then replace the serial 5a -> 5a+32b -> 5a+31b chain.
AddSub8 and AddSub10 can go negative. All arithmetic is unsigned modulo
2^(DW+8), and the final sum always lies in 0..255*256, so it comes out exact.

### Pipelining

In both modules, every adder level ends in a register. Operands that skip a level
(the 48c term, and `a`/`b` in the exact graph) are carried in delay registers.
As a result:

* one window is accepted every clock;
* the result appears LAT cycles later: 7 for the exact graph, 5 for the
  approximate one;
* `out_valid` is `in_valid` delayed by LAT.

The register placement is this design's own choice. The source paper gives
the graphs and their depths but no latency.

Interface, the same for both modules:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `in_valid`  | in  | 1     | window valid |
| `in_a[0:8]` | in  | 9 x DW | A1..A9, raster order (`in_a[4]` is the centre) |
| `out_valid` | out | 1     | result valid |
| `out_y`     | out | DW+8  | Y = 21a+31b+48c, not yet divided by 256 |

## The streaming Canny pipeline (`canny_top`)

```
in_pix ─► gauss_smooth ─► sobel_gradient ─► nms ─► hysteresis ─► out_edge
          (window+GB tree) (window+Sobel)   (window) (classify+window)
```

Each stage has its own 3x3 window generator (`window_3x3`) and its own position
counters. Between stages only a valid strobe and the data pass.

* **gauss_smooth**: the window goes to the graph selected by `ARCH`
  (`GB_EXACT` by default, or `GB_APPROX`). The sum is divided by 256 by dropping
  its 8 low bits, which truncates.
* **sobel_gradient** computes:
  - `Gx = (A3+2A6+A9) - (A1+2A4+A7)`;
  - `Gy = (A7+2A8+A9) - (A1+2A2+A3)` (y grows downwards);
  - the magnitude `|Gx|+|Gy|`, 11 bits, range 0..2040;
  - the direction, quantised to four sectors with integer slope tests:
    - `128|Gy| <= 53|Gx|` gives 0°;
    - `128|Gy| >= 309|Gx|` gives 90°;
    - otherwise 45° if Gx and Gy have the same sign, 135° if not.
* **nms** compares the centre magnitude with its two neighbours along the
  sector:
  - 0°: left and right;
  - 90°: up and down;
  - 45°: up-left and down-right;
  - 135°: up-right and down-left.

  The centre is kept if it is at least the neighbour earlier in raster order and
  strictly greater than the later one. This keeps exactly one pixel of a flat
  ridge. Border pixels are always suppressed.
* **hysteresis** classes each thinned magnitude:
  - STRONG if `>= th_high`;
  - WEAK if `>= th_low`;
  - NONE otherwise.

  It outputs an edge for STRONG pixels, and for WEAK pixels that have a STRONG
  pixel among their eight neighbours.

### Window generator and frame timing

`window_3x3` is the part that needs the most care when the design is reused:

* **Line buffers.** Two line buffers of W words hold rows r-1 and r-2. On each
  step the column {r-2, r-1, r} at the current column is read out and shifted
  into a 3-column register. Then the buffers rotate.
* **Output lag.** The window centred on (r-1, c-1) is complete when pixel (r, c)
  arrives, so the output lags the input by W+1 pixels.
* **Borders.** Windows are clamped to the edge: a missing row or column is
  replaced by the centre row or column. Every stage therefore emits exactly W*H
  results per frame.
* **End-of-frame flush.** After the last pixel of a frame, the last row of
  windows is still owed. The generator produces it by itself on the next W+1
  cycles on which `in_valid` is low.
* **Blanking between frames.** Because each stage flushes in turn, the input must
  stay idle for **at least 4*(W+1)+32 cycles between frames**. A pixel that
  arrives while a stage is still flushing is dropped. That stage then raises
  `overrun`, and an assertion reports it in simulation.
* **Idle cycles within a frame.** `in_valid` may drop at any time inside a
  frame. Those idle cycles are simply skipped.

There is no back-pressure anywhere. At full rate the pipeline takes one pixel per
clock.

### Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `th_low`, `th_high` | in | 11 | hysteresis thresholds on the \|Gx\|+\|Gy\| scale. Hold them stable during a frame, with `th_low <= th_high`. |
| `in_valid`, `in_pix` | in | 1, 8 | grey pixel stream, raster order |
| `out_valid`, `out_edge` | out | 1, 1 | one edge bit per pixel, raster order |
| `out_row`, `out_col` | out | clog2(H+2), clog2(W) | position of the output pixel |
| `out_first`, `out_last` | out | 1, 1 | first and last pixel of the frame |
| `overrun` | out | 1 | the blanking rule was violated |

Parameters:

* `W`, `H`: the image size, 512 x 512 by default;
* `ARCH`: the Gaussian adder graph, `GB_EXACT` by default.

Edge bit (r, c) comes out 4*(W+1) + LAT + 8 cycles after input pixel (r, c),
when the input runs at full rate.

At the default size, synthesis gives eight line-buffer memories of 512 words.
Together they hold 31,744 bits, plus about 1,100 flip-flops.

## Files

| file | contents |
|------|----------|
| `rtl/canny_pkg.sv` | shared types: `gb_arch_e`, `grad_dir_e`, `edge_class_e`, normalisation shift |
| `rtl/gauss_gb_exact.sv`, `rtl/gauss_gb_approx.sv` | the two pipelined adder graphs |
| `rtl/window_3x3.sv` | line buffers, 3x3 window, border clamp, end-of-frame flush |
| `rtl/pipe_delay.sv` | register chain for side-band signals |
| `rtl/gauss_smooth.sv`, `rtl/sobel_gradient.sv`, `rtl/nms.sv`, `rtl/hysteresis.sv` | the four stages |
| `rtl/canny_top.sv` | the complete detector |
| `tb/canny_ref_pkg.sv` | whole-image reference model of every stage, and a synthetic test scene |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two full-size runs |

## Verification

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`.

* **Adder graphs.** `tb_gauss_gb_exact` and `tb_gauss_gb_approx` check every
  output against the directly weighted sum. They also check that the latency is
  exactly 7 or 5 cycles.
* **Stages.** The stage testbenches compare each output pixel, its position and
  its frame flags with `canny_ref_pkg`. They use random frames, random idle
  cycles inside frames, and several frames in a row.
* **`tb_canny_top`** runs two detectors side by side, one per graph, on three
  24x16 frames. It counts these events and fails if any never occurs:
  - idle input cycles;
  - end-of-frame flushes;
  - clamped borders;
  - each gradient sector;
  - NMS suppressions;
  - strong edges;
  - weak pixels promoted;
  - weak pixels rejected.
* **Full size.** `tb_canny_full` (default parameters) and `tb_canny_full_approx`
  each run one 512x512 frame and compare all 262,144 edge bits.

The reference model is written from the stage formulas. It does not reproduce
the adder graphs, so it checks them. It does share this design's own choices:
clamped borders, the tie rule and the one-pass hysteresis. Those choices are
tested for consistency, not against an outside standard.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/canny_pkg.sv tb/canny_ref_pkg.sv rtl/*.sv tb/tb_canny_top.sv \
  --top-module tb_canny_top
./obj_dir/Vtb_canny_top
```

Each full-size run finishes in well under a second of wall-clock time.

## Relation to the source paper, and what is this design's own

Taken from the paper:

* the kernel and its folding into a, b and c;
* both adder graphs: their nodes, their connections, which node subtracts, and
  the depths 7 and 5;
* the order of the Canny stages;
* the 512x512 image size;
* the exact graph as the default, because the paper names it the best trade-off
  between speed and power.

Points to be aware of:

* **Node count of the exact graph.** The paper's prose puts the exact graph at
  eleven operations. Its drawing and comparison chart show twelve nodes, and
  twelve are built here.
* **Shift amounts of the approximate graph.** The drawing does not label them.
  They were chosen so that the graph yields 21a+31b+48c. For 48c this is
  (c<<6) - (c<<4).
* **Pipeline registers** are placed one per adder level, with delay matching
  (see above). The paper states no latency.

Everything below is this design's own choice. The paper only names these stages
or states their purpose:

* an 8-bit grey input;
* line buffers with border clamping, and the flush and blanking protocol;
* truncating division by 256;
* the |Gx|+|Gy| magnitude and the four-sector direction;
* the NMS tie rule and border suppression;
* run-time thresholds;
* a **single-pass** hysteresis that looks only at the 8 direct neighbours.

A weak pixel linked to a strong edge only through other weak pixels is therefore
dropped. Full edge tracking would need a frame store or several passes.

Not included:

* the common-subexpression-elimination (CSD) filter, which the paper uses only
  as a baseline for comparison;
* colour handling: a colour image has to be reduced to one channel, or run one
  channel at a time, before it enters `canny_top`;
* the image source, pre- and post-processing and display, which sit outside the
  hardware.

The paper's FPGA resource, timing and power figures come from its own
tool-generated netlists. They are not a prediction for this RTL.
