# Linear QR-RLS array with squared Givens rotations

This core performs recursive-least-squares (RLS) adaptive filtering, as used
for adaptive beamforming. It does this by QR decomposition with squared Givens
rotations (SGR), a form of Givens rotation without square roots. For an
N-input problem, with N = 2M+1 (2M auxiliary inputs x and one primary input y),
the textbook QR array is triangular and has (N²+N)/2 cells. That is far more
hardware than most sample rates need. Here the triangle is folded onto a line
of M+1 processors:

* one **boundary processor** runs every boundary cell;
* M **internal processors** each run two diagonals of internal cells.

Every processor does useful work on every clock cycle and talks only to its
neighbours. A new QR update starts every **T_QR = 2M+1** cycles.

Each cell may be pipelined to any latency **L_IC** that shares no factor with
T_QR. The operations of successive updates then interleave exactly, so the
pipelining costs no throughput.

The default size is 45 inputs (M = 22, 23 processors, T_QR = 45). At a
100 MHz clock this is 2.22 Msamples/s.

Setting the parameter `N_IC` above 1 gives the **sparse linear** variant. Each
internal processor then takes N_IC columns of work, so there are M/N_IC
internal processors and T_QR = N_IC·(2M+1). For example, the 45-input core
with N_IC = 2 has 12 processors and T_QR = 90.

## What one QR update computes

For each input vector (x_1 … x_2M, y), the triangular array rotates the vector
into the stored upper-triangular matrix R and vector u. Cell (r,c) sits in
row r and column c, with 1 ≤ r ≤ c ≤ N:

* **Boundary cell (r,r), r < N.** It stores the weight D_r. From the arriving
  value x and the incoming δ (δ = 1 for row 1) it computes:

      D'        = β²·D + δ·x²
      a         = x
      b         = δ·x / D'
      δ_out     = δ·β²·D / D'

  If D' = 0, the rotation is the identity: b = 0 and δ_out = δ.
* **Internal cell (r,c), c > r.** It stores one element r of R (or of u, in
  column N) and uses two multiplications:

      x_out = x − a·r
      r'    = r + b·x_out

  a and b pass along the row unchanged. x_out goes down to row r+1.
* **Cell (N,N)** is a multiplier. It outputs the a-posteriori residual
  e = δ·x, where δ is the value left after the last rotation and x is the
  rotated y.

The forgetting factor is β² = 1 − 2^−FORGET_SHIFT. Multiplying by it takes a
shift and a subtraction, with no multiplier.

The core outputs only e. The filter weights follow from R and u by
back-substitution. This core does not do back-substitution: R and u stay in
the processors' local memories.

## Folding the triangle onto a line

This section is the key to reading the RTL.

Cut the triangle after the (M+1)-th boundary cell, mirror the lower part and
stack it against the upper part. The result is a rectangle of 2M+1 rows by
M+1 columns. Each row holds one boundary operation and M internal ones.
Projecting the rectangle onto one row of processors gives the following
assignment, where d = c − r is the distance of a cell from the diagonal:

| cell | processor |
|---|---|
| (r,r) | boundary processor |
| (r,c), 1 ≤ d ≤ M ("A half") | internal processor d |
| (r,c), d > M ("B half", the mirrored part) | internal processor 2M+1−d |

Cell (r,c) of update n runs at cycle

    t = n·T_QR + L_IC·(r + c − 2)

This is the systolic wavefront of the full triangle, scaled by the cell
latency.

The producers of a cell's operands are exactly one wavefront step (L_IC cycles)
earlier:

* x comes from (r−1,c);
* a and b come from (r,c−1);
* for a boundary cell, δ comes from (r−1,r−1), two steps (2·L_IC cycles)
  earlier.

So each processor's output register feeds its consumer directly, with no
buffering in between.

The pipeline latencies follow from this:

| output | latency |
|---|---|
| internal cell outputs | L_IC |
| boundary cell a, b | L_IC |
| boundary cell δ_out | 2·L_IC |

### Operand sources

The operands move as follows:

| | x comes from | a, b come from |
|---|---|---|
| row 1 (any processor) | input scheduler | (as below) |
| boundary processor, row > 1 | internal processor 1 | — |
| internal processor k, A half | right neighbour k+1 | left neighbour k−1 (boundary processor for k = 1) |
| internal processor k, B half | left neighbour k−1 | right neighbour k+1 |
| processor M, across the fold | its own output (A half) | its own output (B half) |

Each processor has a small operand multiplexer. A constant table, indexed by
the slot (cycle mod T_QR), sets it. The table is computed at elaboration by
`qr_pkg::cell_at`.

### Example schedule

For the 7-input example (M = 3, L_IC = 3, T_QR = 7), each processor runs these
cells (r,c):

| slot | boundary | IC 1 | IC 2 | IC 3 |
|---|---|---|---|---|
| 0 | (1,1) | (4,5) | (2,7) | (3,6) |
| 1 | (7,7) | (3,4) | (1,6) | (2,5) |
| 2 | (6,6) | (2,3) | (5,7) | (1,4) |
| 3 | (5,5) | (1,2) | (4,6) | (3,7) |
| 4 | (4,4) | (1,7) | (3,5) | (2,6) |
| 5 | (3,3) | (6,7) | (2,4) | (1,5) |
| 6 | (2,2) | (5,6) | (1,3) | (4,7) |

Every slot of every processor is used, so utilisation is 100%. Cells from about
six successive updates are in flight at once.

### Why L_IC must share no factor with T_QR

Processor p runs its cells at slots L_IC·s mod T_QR, where s = r + c − 2. Two
things make these slots distinct:

* For each processor, the wavefront steps s of its T_QR cells are distinct
  modulo T_QR.
* Multiplying by an L_IC that is coprime to T_QR permutes the residues.

So the slots never collide. If L_IC shared a factor with T_QR, two operations
would need the same processor in the same cycle.

A stored value is written back L_IC cycles after its operation starts. The next
operation on the same cell comes T_QR cycles later, so L_IC must be below T_QR.

`qr_schedule_ctrl` rejects parameter sets that break either rule at
elaboration.

## Sparse linear variant (N_IC > 1)

With N_IC > 1, internal processor J takes the N_IC fold columns
k = (J−1)·N_IC + 1 … J·N_IC and serves them round-robin. In cycle τ it works
on column (J−1)·N_IC + 1 + phase, where phase = τ mod N_IC.

The schedule is the linear one, stretched by N_IC. Cell (r,c) of update n on
column k runs at

    N_IC·(n·(2M+1) + L_IC·(r+c−2)) + phase(k)

Each processor still finds one operation per cycle, so the internal processors
stay 100% busy. The boundary processor works only in phase 0, one cycle in
N_IC.

Because the stretch adds a phase offset, operands no longer arrive exactly
when they are needed:

* The consumer of a token starts N_IC·L_IC + (its phase − producer's phase)
  cycles after the producer.
* Each processor therefore has pipeline latency N_IC·(L_IC−1)+1 and then a
  delay line of 2·N_IC−1 taps. The consumer reads the tap that matches the
  phase difference:

| operand comes from | tap read |
|---|---|
| its own column, or the boundary processor | N_IC−1 |
| the column to its left, in the same processor | N_IC |
| the column to its right, in the same processor | N_IC−2 |
| the left neighbour processor | 0 |
| the right neighbour processor | 2·N_IC−2 |

The δ line of the boundary processor is 2·N_IC·L_IC cycles long. With
N_IC = 1 all of this reduces to the linear array: one tap, latency L_IC.

## Interface and timing (`qr_linear_array`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous, active-low reset (clears R, u, D) |
| `in_ready` | out | high one cycle in every T_QR = N_IC·(2M+1): the input slot |
| `in_valid` | in | sampled with `in_ready`; low makes this update a bubble |
| `in_x[0:N-1]` | in | x_1 … x_2M, then y, as floating-point words |
| `out_valid` | out | one pulse per accepted vector |
| `out_e` | out | residual e of that vector |

Timing:

* A vector accepted in cycle t₀ starts its update at t₀+1.
* Its residual appears with `out_valid` in cycle
  t₀ + 1 + 4M·N_IC·L_IC + N_IC·(L_IC−1) + 1. For the linear array this is
  t₀ + 1 + L_IC·(4M+1), which is 357 cycles at the defaults.
* Residuals come out in input order.

A bubble update flows through the array with its valid flag cleared. It changes
no stored value and produces no residual.

Top-row cells need their inputs at different times: element c is used
L_IC·(c−1) cycles into the update, which can be several periods later.
`qr_input_sched` therefore keeps the last few vectors in a circular buffer
(4 vectors at the defaults) and presents each element in its slot.

## Number format

All arithmetic is floating point, defined in `qr_pkg`:

* 1 sign bit, `EXP_W` = 8 exponent bits, `MAN_W` = 23 fraction bits, with a
  hidden one. This is the IEEE single-precision layout.
* An exponent field of zero means the value zero; there are no subnormals.
* There is no infinity and no NaN: overflow saturates.
* Every result is truncated.

The operators are combinational functions (`fp_add`, `fp_mul`, `fp_div`,
`fp_forget`). Each processor puts L_IC register stages after them. A synthesis
tool with retiming can move these registers into the arithmetic. No
hand-retimed datapath is given.

To change the format, edit `EXP_W`/`MAN_W`. The testbench conversions follow
these constants.

## Files

| file | contents |
|---|---|
| `rtl/qr_pkg.sv` | format, floating-point operators, token struct, schedule functions |
| `rtl/qr_schedule_ctrl.sv` | slot counter mod T_QR, input-slot strobe, parameter checks |
| `rtl/qr_input_sched.sv` | input vector buffer and per-element skew |
| `rtl/qr_boundary_cell.sv` | boundary processor: D memory, SGR rotation parameters, δ line, output multiplier |
| `rtl/qr_internal_cell.sv` | internal processor K: R/u memory, operand multiplexers, SGR update |
| `rtl/qr_linear_array.sv` | top level: controller, scheduler, boundary processor and M internal processors |
| `tb/qr_tb_pkg.sv` | real ↔ floating-point conversions for the testbenches |
| `tb/qr_array_harness.sv` | stimulus, double-precision reference array and residual checker |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_qr_full` and `tb_qr_sparse_linear` |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 22 | N = 2M+1 inputs, M internal processors, T_QR = 2M+1; N ≤ 255 |
| `L_IC` | 4 | cell latency in cycles (wavefront step for N_IC > 1); coprime to 2M+1 and below it |
| `N_IC` | 1 | fold columns per internal processor; must divide M; 1 = linear array |
| `FORGET_SHIFT` | 7 | β² = 1 − 2^−7; 0 turns forgetting off |

Resources scale as:

* processors: M/N_IC + 1;
* stored words: (M+1)·(2M+1) in total, whatever N_IC is;
* pipeline registers: about N_IC·(L_IC+1) per processor.

Every internal processor has two multipliers and two adders. The boundary
processor has five multipliers, two dividers and adders.

For comparison, at 45 inputs:

| architecture | processors | T_QR |
|---|---|---|
| full triangular array | 1035 | 4 (set by the recursive loop) |
| this core, N_IC = 1 | 23 | 45 |
| this core, N_IC = 2 | 12 | 90 |

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=… failures=…`.
For example, using Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/qr_pkg.sv tb/qr_tb_pkg.sv \
        tb/tb_qr_linear_array.sv --top-module tb_qr_linear_array -Mdir obj -o sim
    ./obj/sim

| testbench | what it checks |
|---|---|
| `tb_qr_linear_array` | 7-input example (M = 3, L_IC = 3), 60 update periods |
| `tb_qr_full` | default 45-input core, 120 periods, about 25 s in Verilator |
| `tb_qr_sparse_linear` | sparse variant: M=4/N_IC=2, M=6/N_IC=3, and the 45-input N_IC=2 core |

Both run a double-precision model of the triangular SGR array on the same
quantised inputs. They check:

* every residual, to 1e-4 relative;
* the exact output cycle of every residual;
* that bubbles, zero pivots, overlapping updates and cycles with all
  processors busy each occurred.

`tb_qr_boundary_cell` and `tb_qr_internal_cell` drive a single processor with
random operands. They predict every output token, covering:

* all operand routes, including the fold;
* the δ feedback;
* the memory write-back.

`tb_qr_input_sched` checks the input skew cycle by cycle, and
`tb_qr_schedule_ctrl` checks the counter for N_IC = 1 and N_IC = 3.

## Departures and limits

* **The rectangular variants are not provided.** In these, several stacked
  lines each run a share of the rows of the folded array (T_QR = number of
  rows per line, times N_IC for the sparse rectangular form). Only the linear
  and sparse linear arrays are given here.
* **The sparse linear timing is this design's own.** This covers the phase
  order, the N_IC·(L_IC−1)+1 processor latency and the tap delays. Its
  latency rule is stated on the unreduced schedule: L_IC must be coprime to
  2M+1, not to N_IC·(2M+1).
* **The output multiplier (cell (N,N)) runs in the boundary processor's free
  slot.** It is not a separate unit outside the array.
* **Some parts are this design's own choices:**
  * the fold layout and the wavefront schedule;
  * the input handshake and buffering;
  * bubble handling;
  * reset;
  * the number format;
  * the forgetting-factor value.

  The mapping principle is the published one: boundary and internal
  operations on distinct processors, local links only, T_QR = 2M+1, L_IC
  coprime to T_QR, and δ latency 2·L_IC.
* **Numerical limits.** Truncation and the lack of subnormals make results
  differ slightly from IEEE arithmetic, by about 1e-6 relative per operation
  in the tests. There is no protection against overflow beyond saturation.
* **R and u cannot be read out.**
