# Segmented, parallel iterative image restoration

This engine removes a known blur from a grey-scale image. It uses the classic iterative
(Van Cittert-style) restoration

    f(0)   = λ·g
    f(k+1) = f(k) + λ·g − λ·(b ∗ f(k))

where `g` is the degraded image and `b` is a 3×3 blur kernel. `λ` is a gain below one.
Each pixel's new value depends only on its eight nearest neighbours, so every pixel can
be updated at the same time by a processor of its own. An FPGA cannot hold one processor
per pixel of a real image. The engine therefore holds a small array of processors (8×8 by
default) and restores the image one *segment* at a time. Each segment is loaded from host
memory and iterated until it converges, and only its core is written back.

All multiplications are powers of two. The centre weight is 1/2 and the neighbour weight
1/16. That is the same as multiplying the centre by 8, adding the eight neighbours and
dividing by 16. The default gain is λ = 1/2. A processor therefore needs no multiplier:
two adders, one shifter and one subtractor, shared over a seven-cycle schedule.

## The processor and its seven steps

`rtl/restore_pe.sv` holds one pixel. It keeps three values:

* the current estimate `x`;
* the previous estimate `x_prev`, used by the residual test;
* the constant `λ·g`, formed by the shifter when the pixel is loaded and also used as
  `f(0)`.

Every processor receives the same step number from the schedule controller:

| step | Adder1 | Adder2 | Shifter | Subtractor |
|---|---|---|---|---|
| 1 | | W + C | | |
| 2 | W + E | (W + C) + E → row partial sum P | C << 3 | |
| 3 | (W + E) + P from S | (C << 3) + P from N | | |
| 4 | sum of both halves | | | |
| 5 | | | >> 4 (÷16) | |
| 6 | | C + λ·g | >> 1 (×λ) | |
| 7 | | | | (C + λ·g) − λ·(b∗f) → new C |

The main trick is in steps 2 and 3. A processor is wired only to its N, S, E and W
neighbours (`rtl/pe_array.sv`). In step 2 each processor forms its row sum
`P = W + C + E` and sends it up and down. In step 3 it adds the row sums of the rows above
and below, so the diagonal pixels arrive inside those sums. After step 4, Adder1 holds
`8·C + Σ neighbours`, the weighted 3×3 sum in units of 1/16. All processors run in
lockstep, so a neighbour's partial sum is ready exactly when it is needed.

At the edge of the array, links carry zero: a missing neighbour counts as a zero pixel.

Arithmetic: pixels are 16-bit signed fixed point with 4 fraction bits. Sums are 22 bits,
which holds `8·C + 8` neighbours of any value without overflow. Right shifts are
arithmetic (they round down). The new value is clamped to 16 bits. The engine receives
8-bit grey values and returns them rounded to nearest and clamped to 0…255.

## Segments, overlap and the boundary effect

A segment fills the whole array (ROWS × COLS = 8×8). It is a core of
(ROWS−OVL) × (COLS−OVL) = 6×6 pixels inside a border of OVL/2 = 1 pixel on each side.

* Cores tile the image without gaps, in raster order (`rtl/segment_walker.sv`).
* The border overlaps the neighbouring cores. It is loaded and iterated, and then thrown
  away.
* Pixels outside the image are never read from or written to memory. Their processors
  are marked as not live and hold zero through every iteration. A segment at the image
  edge therefore sees the same zero boundary as a restoration of the whole image.

The border exists because the zero boundary spreads into the segment by one pixel per
iteration. After k iterations, pixels up to k from the segment edge carry an error. An
overlap of k pixels per side would make the core exact, but that costs processors.
The default accepts a small error instead, because each step of the spread is scaled by
weights and gains below one.

`tb/tb_overlap_error.sv` measures this error. With a border at least as wide as the
number of iterations, the result matches an unpartitioned restoration pixel for pixel.
On a 30×24 test scene after 4 iterations, the default 1-pixel border leaves about half the
pixels off by up to 10 grey levels. A 4-pixel border (on a 12×12 array) is exact.

`off_x`/`off_y` shift the whole grid of cores by a few pixels, so that different
partitionings of the same image can be tried.

## Stopping rule and the residual unit

A segment stops iterating when

    Σ (x_k − x_{k−1})² / Σ x_{k−1}²  <  eps / 2^16

This sum runs over all processors of the segment, overlap included.
`rtl/residual_unit.sv` avoids the division: it tests
`Σd² · 2^16 < eps · Σx²`. It reads two array rows per cycle, so the test ends within four
cycles plus one cycle for the compare. A segment whose values did not change at all
(`Σd² = 0`) also counts as converged. As a guard, `max_iter` bounds the number of
iterations.

The test costs no extra cycles (`rtl/iter_ctrl.sv`). The residual of iterate k is
computed while iteration k+1 runs, because x_k and x_{k−1} do not change until the commit
at step 7. At step 7 the controller acts on the result:

* **converged**: suppress the commit and finish the segment with x_k (k iterations);
* **not converged**: commit x_{k+1}, and continue unless `max_iter` has been reached;
* **no result yet**: hold step 7 (a residual stall), counted in `residual_stalls`.

A stall happens only when the residual needs more than six cycles, which means a larger
array or a smaller `ROWS_PER_BEAT`. At the defaults, every iteration takes exactly seven
cycles. The iteration after the last committed one is cut short at step 7.

## System and host channel

`rtl/restore_top.sv` wires together these blocks:

* the segment walker;
* the segment controller (`rtl/segment_ctrl.sv`: load, start, write-back);
* the schedule controller;
* the processor array;
* the residual unit.

The image lives in host memory. The engine reaches it over three valid/ready channels.
A transfer happens on a cycle where valid and ready are both high.

| channel | signals | meaning |
|---|---|---|
| read request | `rd_req_valid/ready/addr` | address `y·img_w + x` |
| read response | `rd_rsp_valid/ready/data` | 8-bit pixel, in request order |
| write | `wr_valid/ready/addr/data` | restored pixel to `out_base + y·img_w + x` |

Read requests may run ahead of responses. `rd_rsp_ready` is low while the load position
is a zero-filled one. The result goes to its own area (`out_base`), so that the borders
of later segments still read the degraded input.

To restore an image:

1. Set `img_w`, `img_h` (up to 4095), `off_x`, `off_y`, `out_base`, `eps` and `max_iter`.
2. Pulse `start`.
3. Wait for `done`. After each segment, `seg_done` pulses with `seg_iters` (the
   iterations used), `seg_conv` (1 if the residual stopped it, 0 if the limit did) and the
   core position `seg_x/seg_y`. Iteration counts per region are the figure of merit for
   choosing a partitioning.

Cycle budget per segment with a host that answers every cycle:

* about ROWS·COLS = 64 cycles to load;
* 7 cycles per iteration, plus 7 for the final test iteration when the residual stops it;
* one cycle per core pixel (36) to write back.

## Parameters (`restore_top`)

| parameter | default | meaning |
|---|---|---|
| ROWS, COLS | 8, 8 | processor array = segment size |
| OVL | 2 | total overlap o; OVL/2 border pixels per side (even) |
| R0_SHIFT | 3 | centre weight = 2^R0_SHIFT × neighbour weight |
| NORM_SHIFT | 4 | common denominator 2^NORM_SHIFT |
| GAIN_SHIFT | 1 | λ = 2^−GAIN_SHIFT |
| ROWS_PER_BEAT | 2 | array rows the residual unit reads per cycle |
| CW | 12 | bits of an image dimension (host address is 2·CW bits) |
| ITER_W, EPS_W | 16, 16 | widths of `max_iter` and `eps` |

The array size, the 2-pixel overlap, the weights 1/2 and 1/16, the processor's four units
and the seven-step allocation follow the published design.

Chosen here, because the published design does not specify them:

* the gain value;
* all widths and the fixed-point format;
* the host channel and the separate output area;
* the raster order;
* splitting the overlap evenly over both sides;
* the division-free residual compare and its overlap with the next iteration;
* the iteration limit;
* the grid displacement port.

## Where this departs from, or goes beyond, the published design

* The published description says that each processor exchanges data with all eight
  neighbours. Its array drawing and its schedule use only the four edge-adjacent links,
  with the diagonals carried inside the row partial sums. This RTL follows the drawing
  and the schedule.
* The printed update equation is ambiguous about where λ applies. The schedule applies
  the gain shift to the weighted sum before the subtraction, and this RTL does the same.
* The subtraction uses its own subtractor, not one of the adders with an inverter
  (mentioned only as an alternative).
* Host transfer time, the speed-up over software and the statistical study of regional
  standard deviation are outside the hardware. The engine only reports each segment's
  iteration count.
* How many CLBs the engine needs on the Xilinx XC4000/Virtex parts is not known. A generic
  synthesis gives about 3600 word-level cells and 9100 flip-flop bits for the default
  engine, 8800 of those bits in the array.

## Files

| file | content |
|---|---|
| `rtl/restore_pkg.sv` | widths, `step_e` schedule steps, pixel conversion and clamping |
| `rtl/restore_pe.sv` | one processor |
| `rtl/pe_array.sv` | ROWS × COLS processors, neighbour links, addressed load |
| `rtl/residual_unit.sv` | convergence test |
| `rtl/iter_ctrl.sv` | seven-step schedule, stopping rule, residual stall |
| `rtl/segment_walker.sv` | core position over the image, grid displacement |
| `rtl/segment_ctrl.sv` | load with zero fill, write-back of the core, sequencing |
| `rtl/restore_top.sv` | the engine |
| `tb/host_mem_model.sv` | behavioural host memory with random stalls |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus system tests |

## Verification

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M`, and stops itself
through a watchdog if it hangs.

* Block tests compare against values worked out independently in the testbench:
  * the update equation, per processor and over a whole array (diagonals and zero edge
    included);
  * the residual as a real-valued ratio;
  * the schedule cycle counts, with a residual model of varying latency;
  * the tiling;
  * load and write-back positions, with a stalling host.
* `tb_restore_top` runs two engines on a blurred, noisy synthetic scene. One uses the
  defaults; the other reads one residual row per cycle and faces a stalling host. Both
  are compared pixel for pixel, and segment by segment, with a reference of the whole
  algorithm written in the testbench. The test requires each of these at least once:
  * stop by residual;
  * stop by iteration limit;
  * residual stall;
  * request, response and write stalls;
  * zero fill;
  * discarded overlap;
  * a displaced grid;
  * clamped output.

  It also checks that an iteration takes seven cycles at the defaults.
* `tb_restore_full` restores a whole 128×96 image (352 segments) with every parameter at
  its default and compares it with the reference.
* `tb_overlap_error` compares segmented restoration with an unpartitioned one. It checks
  that a border as wide as the iteration count gives an exact result, and reports the
  error of the default 1-pixel border.

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/restore_pkg.sv \
        tb/tb_restore_top.sv --top-module tb_restore_top -Mdir obj
    ./obj/Vtb_restore_top

The same works for any `tb_*` module; the package must come first. All tests finish in
seconds.
