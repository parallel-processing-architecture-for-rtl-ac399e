# Systolic revised-simplex engine for linear programming

This RTL solves linear programs in standard form,

    minimise c^T x   subject to   A x = b,  x >= 0,

with the revised simplex method. Almost all of the work of one simplex
iteration is matrix–vector products with the basis inverse B^-1 and with A.
Here those products run on linear systolic arrays built from three small
multiply-add cells. The scalar work around them is done by a little control
logic: choosing the entering column, the ratio test and forming the eta
vector.

Two engines are provided. They share one problem-load port in the top module
`lp_top`:

* **The three-starting-point engine.** The iteration is split over three
  hardware modules. Three controllers each follow their own simplex path, and
  a switching network rotates the controllers through the modules so that all
  three modules are busy at once. The size is fixed by parameters; the default
  is 3 constraints × 9 columns.
* **The multi-chip engine (`lp_chipset`).** The same arrays are cut into chips
  of fixed size (chip A, chip C) that are chained next to one sequencing chip
  (chip B). A larger problem needs more chips, not a new design. It follows a
  single simplex path.

## The iteration

With B^-1 (M×M), the current right-hand side b, the basic costs c_b and the
list of basic columns, one iteration is:

| step | work | where |
|---|---|---|
| 1 | w^T = c_b^T B^-1 | band array of 2M−1 unified cells (cell-0 mode) |
| 2 | r = c − (w^T A)^T | band array of M+N−1 cell 1s, fed with −w |
| 3 | q = first j with r_j < 0; none → OPTIMAL | comparator on the r stream |
| 4 | d = B^-1 A_q | the step-1 array in cell-2 mode |
| 5 | no d_i > 0 → UNBOUNDED | row scan |
| 6 | p = row with the largest d_i / b_i over d_i > 0 | row scan, cross-multiplied |
| 7 | eta*_i = −d_i/d_p (i ≠ p), eta*_p = 1/d_p − 1 | divider |
| 8 | B^-1 ← B^-1 + eta* (B^-1)_p,  b ← b + eta* b_p,  c_b,p ← c_q | band array of 2M−1 cell 3s + one cell 3 |

Step 6 looks for the *largest* d_i/b_i, which is the same row as the smallest
b_i/d_i. That avoids having to initialise a minimum search. Comparing
d_i·b_best > d_best·b_i needs no divider. Ties keep the lower row.

The engine starts from the slack basis, B = I on the last M columns. A
problem must therefore be given with an identity block in its last M columns
and b ≥ 0.

## Band arrays and their schedule

All three arrays use one space-time map. For a matrix product with an R×C
matrix the array has R+C−1 cells in a line:

* **Matrix elements.** Element (i, j) belongs to cell `i − j + C − 1` and is
  presented on that cell's top input in cycle `i + j + C − 1`. Each element is
  used exactly once.
* **Vectors.** The vector operands travel through the line in opposite
  directions, one element every second cycle. The stream entering the left
  end carries element k in cycle 2k; the stream entering the right end does
  the same at its end.
* **Results.** The accumulating stream leaves the far end with result k in
  cycle 2k + (number of cells).

`lp_pkg::band_ij()` inverts this map: given a cell and a cycle, it says which
element, if any, is due. Every array feeder uses it. The map corresponds to
the space-time transformation with time t = k + i + j and cell position
x = i − j. Adjacent cells are one register apart, so one cycle is one cell
step.

Per array:

* **Step 1 (pricing):** c_b_i enters the right end in cycle 2i, zeros enter
  the left end, and w_j leaves the right end in cycle 2j + 2M − 1.
* **Step 2:** c_j enters the left end in cycle 2j, −w_i enters the right end in
  cycle 2i + N − M, and r_j leaves the right end in cycle 2j + M + N − 1.
* **Step 4:** the same array as step 1 with the cells mirrored. A_q enters the
  left end, and d_i leaves the left end in cycle 2i + 2M − 1.
* **Step 8:** eta*_i enters the right end and (B^-1)_p,j the left end. Every
  cell 3 adds the product of the two to the B^-1 element on its top input, and
  the updated element leaves its bottom one cycle later.

Module latencies in cycles, start to done:

* module 0: (4M−1) + (3N+M−2), which is 38 at M=3, N=9;
* module 1: (4M−2) + M + 1, which is 14;
* module 2: 3M, which is 9.

## Cells

All cells register their inputs, so their outputs are stable for a whole
cycle. Reset is asynchronous and active low.

* `mac_cell` (cell 0 / cell 1): passes x on and computes y_out = y_in + a·x.
* `unified_cell`: a cell 0 and a cell 2 in one. Two 2:1 multiplexers choose
  the multiplier (c_b or A_q) and the addend (w or d), and a 1:2 decoder sends
  the sum out on the w side (`ctrl` = 0) or the d side (`ctrl` = 1). The other
  output is 0. The same B^-1 data stream therefore serves steps 1 and 4.
* `cell3`: OUT_3 = IN_1·IN_2 + IN_3, with IN_1 and IN_2 passed on to the
  neighbours.

## Number format

Numbers are W-bit two's complement with FRAC fraction bits. The default is
W = 8, FRAC = 0: 8-bit integers. A product is formed at full width, shifted
right by FRAC, and its low W bits go on. Sums wrap modulo 2^W, as they would
on an 8-bit data bus.

Integer arithmetic cannot hold fractional eta* values. In 8-bit mode a
problem therefore only solves exactly if its pivots divide evenly. The test
problems are chosen that way. With W = 16, FRAC = 8 the textbook
production-planning example (optimum −80) runs exactly. Division truncates
toward zero, and division by zero gives 0.

## Three starting points: controllers, switching network, slots

`lp_top` holds three `controller`s. Each one is a register file with one
simplex path in it: B^-1, b, c_b, the basic columns, q, p and d. The three
modules work on different controllers at the same time.

* **Switching pattern.** During pipeline slot s, module j is connected to
  controller (j − s) mod 3:
  * pattern 0: M0–C0, M1–C1, M2–C2;
  * pattern 1: M0–C2, M1–C0, M2–C1;
  * pattern 2: M0–C1, M1–C2, M2–C0.

  The pattern advances after every slot, so each path visits module 0, 1, 2,
  0, … in turn.
* **Joining the pipeline.** A controller joins the first time module 0 is
  connected to it: C0 in slot 0, C2 in slot 1, C1 in slot 2. From slot 2 on,
  all three modules are busy.
* **Different starting edges.** On its first pricing, controller k takes the
  k-th negative reduced cost, counting from 0, instead of the first. The three
  paths therefore leave the starting vertex along different edges. After that
  every path takes the first negative reduced cost.
* **A slot.** Every module whose controller is still running is started
  together. The slot ends when the slowest one finishes; module 0 always
  sets the pace. Every result goes back to its controller in one cycle
  through `switch_net`, which is purely combinational.
* **End of the run.** The run stops at the end of the first slot in which a
  controller has reached OPTIMAL; its solution is reported. A tie goes to the
  lowest-numbered controller. If no controller is optimal but one found the
  problem UNBOUNDED, that is reported instead.

The `main_memory` holds A, b and c for all of them.

Result ports:

* `winner`: the controller whose solution is reported;
* `x_col` / `x_val`: the basic columns and their values;
* `objective`: Σ c_b·b;
* `pivots`: the winning path's pivot count;
* `slots`: the number of slots used.

## The multi-chip engine

`lp_chipset` cuts the arrays into chips.

* **Chip A** (`chip_a`): S unified cells, S cell 3s, and a local memory with
  its share of B^-1. Its function is set by (Ctrl1, Ctrl2):
  * 00: step 1;
  * 01: step 4;
  * 1x: step 8.

  Per cell, a 1:2 decoder sends the memory word to the unified cell or to the
  cell 3. A step-8 result is written back into the word it came from, one
  cycle later.
* **Chip C** (`chip_c`): Q cell 1s and a local memory with its share of A. It
  runs step 2.
* **Chip B** (`chip_b`): everything else: steps 3, 5, 6 and 7, the cell 3 for
  b, the c_b update, and local copies of A, b, c_b and c. It also does all the
  sequencing.

**Where data lives.** The diagonal i − j of a matrix goes to chip
x = floor((i − j + floor(r/2)) / r) and cell (i − j + floor(r/2)) mod r, where
r is the chip's cell count (S or Q). Chip 0 thus holds the main diagonal in its
middle cell. The number of chips in a chain follows from the diagonal range:

* for B^-1, i − j runs from −(M−1) to M−1;
* for A, it runs from −(N−1) to M−1.

The chips are numbered upward from the one next to chip B. With the defaults
(M=3, N=9, S=5, Q=11) there is one chip A (chip 0) and two chip Cs (chips −1
and 0). Host writes of A are copied into the chip Cs' memories as they
happen. Start writes B^-1 = I into the chip As.

**Select and the far end.** A chain is one long band array whose near end
touches chip B. Some streams must enter at the far end, and some results come
out there. Every chip therefore passes two buses through combinationally:

* the far-end bus `fwd` carries c_b (step 1), zeros (step 4), eta* (step 8)
  or −w (step 2) out to the last chip;
* the return bus `ret` brings the w or r stream back to chip B.

The last chip, with Select = 1, feeds `fwd` into its right-hand array inputs
and turns its right-hand output onto `ret`. Chips with Select = 0 connect
their right-hand array ports to the next chip.

**Timing.** Suppose a chain has P cells and its band starts OFF cells from
chip B (both follow from the placement formulas). Chip B then runs each step
with a delay of P cycles:

* chip B broadcasts `sweep` = i + j of the elements due this cycle; every cell
  whose diagonal matches reads its local memory;
* near-end streams enter in cycle 2k + P − OFF;
* far-end streams enter in cycle 2k + OFF + L, where L is the band length;
* returning streams arrive in cycle 2k + 2P − OFF.

Chip B reads the pivot row (B^-1)_p before step 8, one word per cycle, over
a read chain that runs through the chip As.

## Using it

Both engines use the same load port and the same write sequence:

1. While the engine is idle, write A(row, col) with `mem_sel` = 0, b(row) with
   1, and c(col) with 2, one per cycle with `mem_we`.
2. Pulse `start` (three-starting-point engine) or `cs_start` (multi-chip
   engine).
3. Wait for `done` / `cs_done`.
4. Read the result. It holds until the next start.

Parameters of `lp_top`:

| parameter | default | meaning |
|---|---|---|
| `M`, `N` | 3, 9 | constraints and columns |
| `W`, `FRAC` | 8, 0 | number format |
| `S`, `Q` | 5, 11 | cells per chip A and per chip C |

`IW` and `PW` are index widths; they follow from N and M.

Simulate with Verilator from the repository root; every module lives in a file
of its own name:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
        rtl/lp_pkg.sv tb/tb_lp_top_full.sv --top-module tb_lp_top_full
    ./obj_dir/Vtb_lp_top_full

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>` and has
a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mac_cell`, `tb_unified_cell`, `tb_cell3` | cell function against directly computed values (including a few hand-worked operand pairs), latency, both unified-cell modes |
| `tb_module0`, `tb_module1`, `tb_module2` | each module against a reference computed in the testbench, plus its cycle count; module 2 runs a 2×2 pivot in Q8.8 that has a known exact result |
| `tb_controller`, `tb_switch_net`, `tb_main_memory` | storage, patterns, write decoding |
| `tb_lp_top` | M=2, N=4, Q8.8: the production-planning example (−80 at x2 = 40, x4 = 20) and an unbounded problem on both engines; counts switching patterns, 2- and 3-module overlap, OPTIMAL, UNBOUNDED and a win by a non-default starting point, and fails if any never occurs |
| `tb_lp_top_full` | the top with all defaults: two 3×9 problems (optima −44 and −72, found independently by enumerating every basis) on both engines, with A x = b checked |
| `tb_chip_a`, `tb_chip_c` | chains of three chip As and four chip Cs: placement of every element, read chain, steps 1, 4, 8 and 2 on random data |
| `tb_lp_chipset_large` | an 8×24 problem (exact optimum −41 after 5 pivots) on 13-cell chip As with 24-cell chip Cs, and on the default chips (3 A + 4 C), with A x = b checked |
| `tb_lp_timing` | one full iteration through modules 0, 1 and 2 at M=16, N=64 on random data, with the cycle count of each module against its closed form |
| `tb_lp_chipset` | two chip configurations (1 A + 2 C, and 3 A + 5 C) solving the same problems, END and UNBOUNDED, every step seen |

## How far to trust it, and where it departs from the method as published

* **Step-2 array size.** The array has M+N−1 cells; that is what a band array
  for an M×N matrix needs. The published cell count for this array is N−1.
* **Module latencies.** They differ from the published (3N+5M), 4M and 4M
  cycle counts: the arrays here run back to back and each has its own fill
  and drain.
* **Entering column.** Step 3 takes the first negative reduced cost, as in
  the published worked example. A variant of the published pseudo-code would
  keep the last one.
* **Stored state.** The controllers store d and the list of basic columns in
  addition to B^-1, b, c_b, p and q. The basic-column list exists only to
  report x.
* **Starting points.** How the three starting points differ (k-th negative
  reduced cost on the first pricing) and the end-of-run rule are this
  design's choice.
* **Multi-chip details.** In the multi-chip engine, the far-end and return
  buses, the `sweep` broadcast, the pivot-row read chain and all chip-B
  sequencing are this design's own. The published description gives the chip
  contents, the Ctrl1/Ctrl2 coding, Select, and the placement formulas.
* **Chip counts.** With the centred placement, a chain can need one chip more
  than ⌈(2M−1)/S⌉. The default chip C, for example, needs two chips for
  N = 9, Q = 11.
* **Single path on chips.** The multi-chip engine follows one path. It is not
  combined with the three-controller pipeline.
* **Number format.** Only exact where the pivots divide evenly in 8-bit
  integer mode. A product that does not fit wraps silently. There is no
  overflow detection and no cycling protection: a degenerate problem can cycle
  without end.
* **Sizes simulated.** Only small sizes were simulated: 3×9 at the
  defaults, 2×4 in Q8.8, one iteration of the three modules at 16×64, and an
  8×24 problem on the multi-chip engine. Sizes such as 100×1000 are allowed
  by the parameters but were not compiled.
* **Reset.** All state is reset asynchronously.

## Files

* `rtl/lp_pkg.sv`: the band-schedule helper and the chip placement functions.
* Cells: `rtl/mac_cell.sv`, `rtl/unified_cell.sv`, `rtl/cell3.sv`.
* Modules: `rtl/module0.sv`, `rtl/module1.sv`, `rtl/module2.sv`.
* Three-starting-point parts: `rtl/controller.sv`, `rtl/switch_net.sv`,
  `rtl/main_memory.sv`.
* Multi-chip engine: `rtl/chip_a.sv`, `rtl/chip_b.sv`, `rtl/chip_c.sv`,
  `rtl/lp_chipset.sv`.
* `rtl/lp_top.sv`: the top, with both engines.
* `tb/`: one testbench per block, plus `tb_lp_top_full` at the default size
  `tb_lp_timing` at 16×64 and `tb_lp_chipset_large` at 8×24.
