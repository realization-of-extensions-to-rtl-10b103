# A dual mode systolic array for Faddeev's algorithm

Faddeev's algorithm computes `D + C·A⁻¹·B` by Gaussian elimination of one
compound matrix:

```
    [  A   B ]    triangularise A, annul -C,         [ A'  B' ]
    [ -C   D ]    carry every row operation right  → [ 0   D + C·A⁻¹·B ]
```

By picking the four blocks one gets, among others, `A⁻¹` (B = C = I, D = 0),
`A⁻¹B`, `CB` (A = I), `B + D`, or the solution of a linear system. This RTL
builds that elimination as a systolic array of W × W cells, a single cell
type on the diagonal and one elsewhere. Every cell moves one step per clock
and talks only to its neighbours. The same array runs in two modes, one
after the other:

* **T mode** (triangular). The upper triangle runs Gaussian elimination on
  the left half `[A; -C]`. While the rows of A pass, it uses *neighbour
  pivoting*: when an incoming entry is larger in magnitude than the stored
  one, the two rows swap. While the rows of -C pass, it does plain
  elimination. Each diagonal cell sends out a stream of multipliers M and
  swap bits C3.
* **S mode** (square). Every cell, including the diagonal ones, applies
  those recorded multipliers and swap bits to the right half `[B; D]`. The
  rows leaving the bottom are then `D + C·A⁻¹·B`.

The array does not need to store the multipliers anywhere. They leave the
east edge of each array row and go into a shift-register queue, **B_q**.
The queue hands them back to the west edge of the same row just as the
matching rows of the right half arrive. Several arrays can be stacked to
handle larger problems. Several problems that share blocks (the
*extensions*, below) can reuse one elimination of the shared part.

## Cells

All data words are 32-bit signed fixed point with 16 fraction bits
(`faddeev_pkg`). Every cell output is a register, so a value moves one cell
per clock cycle. X is the entry a cell holds: one element of the pivot row
that its array row currently keeps.

**Square cell** (`square_cell`). X and C4 come in from the north. M, C3,
C1 and C2 come in from the west.

| condition | `x_out` (south) | new X |
|---|---|---|
| C3 = 1 (the incoming row becomes the pivot row) | X + M·x_in | x_in |
| C3 = 0 | x_in + M·X | X |

M and C3 leave to the east. C1, C2 and C4 leave to the south. When C4 = 1,
X counts as zero for this cycle, which starts a new matrix.

**Circular (diagonal) cell** (`circular_cell`). C1 selects its program:

* **C1 = 1 (T mode).**
  * If C2 = 1 and |x_in| ≥ |X|: C3 = 1, M = −X/x_in (0 if x_in = 0), and
    x_in is stored. This is a row swap.
  * Otherwise: C3 = 0 and M = −x_in/X, and X is kept. A stored zero gives
    M = 0.
* **C1 = 0 (S mode).** The cell behaves exactly like a square cell. It
  passes M and C3 through.

Only the diagonal cells divide, and in the pivoting case |M| ≤ 1.

### The four control bits

| bit | meaning | enters at | path |
|---|---|---|---|
| C1 | 1 = T mode, 0 = S mode | top-left cell | diagonal cell → east → square cell → south → next diagonal cell |
| C2 | neighbour pivoting allowed | top-left cell | same as C1 |
| C3 | row swap, made by the diagonal cell | — | east along the row, then through B_q |
| C4 | clear X | top of every column, with the first row of a matrix | south |

C1 and C2 take two cycles for each step down the diagonal. That is exactly
the skew between the data rows reaching diagonal cells (i,i) and
(i+1,i+1). So the T→S mode change sweeps across the array together with
the first row of B, and no cell needs its own control line.

## The timing: why B_q works

The host feeds the data as **strips**. A strip is W columns of the
compound matrix, one row per clock cycle. The array skews each row so that
column j is one cycle behind column j−1.

The multiplier for data row r leaves array row i at the east edge. It
crosses B_q and comes back in at the west edge of row i. The loop is
W cells plus `len` queue stages long. With `len = strip length − W`, the
loop takes exactly one strip length. So the multiplier meets data row r of
the *next* strip at the first cell of the row.

In S mode the diagonal cells pass M through, so the factors keep going
round. Strip after strip sees the same multipliers for as long as the
input continues. For one array and `[A;-C]` followed by `[B;D]`, the strip
length is 2W, so B_q is W × W.

The control table for one 4 × 4 array (n = 4, 16 steps) is:

| step | 1 | 2–4 | 5–8 | 9 | 10–16 |
|---|---|---|---|---|---|
| rows entering column 1 | a₁ | a₂–a₄ | c₁–c₄ | b₁ | b₂–b₄, d₁–d₄ |
| C1 C2 C4 | 1 1 1 | 1 1 0 | 1 0 0 | 0 0 1 | 0 0 0 |

The last result leaves after 6n − 1 = 23 steps.

## Stacking arrays: the L-tuple system

`faddeev_system` stacks L arrays. The bottom output of one array is the
top input of the next, and each array has its own B_q. Together they act
as an n × W slice of an n × n array, with n = L·W. The n columns of the
full array are visited one strip at a time, so m = n/W = L strips make
up one side of the matrix.

Array l (counting from 0) runs in T mode only while strip l passes. That
strip holds the diagonal block of array l. Array l works in S mode for
every other strip:

* For later strips it applies its recorded factors.
* For earlier strips the data it receives is meaningless. Being in S mode,
  it does not overwrite its queue.

Each array's queue needs `(2L − 1)·W` stages for a plain problem: 3W for
two arrays. `faddeev_ctrl` produces C1 and C2 for each array's top-left
cell, delayed by l·W cycles. It produces C4 once per strip; C4 travels with
the data down through all arrays.

Latency from a row entering to its deskewed result leaving is
`(L+1)·W − 1` cycles. A problem takes

```
(L+1)·W − 1 + (x+1)·L · (y+1)·L·W   cycles
```

For L = 4, W = 32 that is 2207 cycles for one n = 128 problem. It is
52,383 cycles for 50 horizontally compatible ones.

## Extensions: sharing work between problems

The hardware is the same for all of these; only the shape of the input
differs.

* **Horizontal** (x problems with the same A and the same lower-left
  block). The right sides are placed next to each other, for example
  `[A I B I; -I 0 0 D]` gives A⁻¹, A⁻¹B and A⁻¹ + D. A is eliminated once.
  The x·L right-side strips then all reuse the circulating factors.
* **Vertical** (y problems with the same top half). The lower halves are
  stacked, for example `[I B; -C 0; -I D; -E D]` gives CB, B + D and
  EB + D. Strips become (y+1)·n rows long, so B_q must be
  `(y+1)·n − W` long. C2 stays 1 only over the top n rows.
* **Two-dimensional**: both at once, for example `[I B E; -A 0 F; -I D G]`
  gives AB, AE + F, B + D and E + G.

`x_ext` and `y_ext` set x and y (1 and 1 for a plain problem). A start is
refused (`cfg_err`) if `(y_ext+1)·L·W − W` exceeds `BQ_DEPTH`.

## Using `faddeev_system`

Parameters:

* `W`: cells per array side (default 32).
* `L`: number of arrays (default 4).
* `BQ_DEPTH`: B_q stages per row (default `(2L−1)·W` = 224). This allows
  x up to 65535 with y = 1.

Problem layout:

* The compound matrix has (y+1)·n rows and (x+1)·n columns, n = L·W.
* Strips 0 … L−1 are the left side. Strips L … (x+1)·L−1 are the right
  side.

Protocol:

1. Pulse `start` with `x_ext`, `y_ext`.
2. For (x+1)·L·(y+1)·n consecutive cycles `in_req` is high. The host
   drives `in_data` with row `in_row` of strip `in_strip`, W words, in the
   same cycle.
3. Results come out as whole rows on `out_data`. `out_valid` marks the
   rows that belong to a result: right-side strips, rows ≥ n.
   * `out_strip` = L·(h+1) + b gives horizontal problem h and column
     block b.
   * `out_row` = n·(v+1) + r gives vertical problem v and row r.
   * `out_last` flags the final row.
4. `busy` falls once the last row is out.

A `start` during the feed is ignored, except in the last input row. There
it chains the next problem (same strip length) with no gap, so
consecutive problems overlap completely.

## Accuracy

Fixed point with truncating multiply and divide gives errors of a few
LSB per operation. Measured errors:

| problem | largest error |
|---|---|
| random n = 4 problems (entries up to ±2) | ≈ 4·10⁻⁴ |
| n = 128 problem (diagonally dominant A) | ≈ 2·10⁻³ |

There is no overflow detection. Neighbour pivoting keeps |M| ≤ 1 while A
is being triangularised. Annulling C uses M = −x_in/X, which can be large
when A is badly conditioned, so scale the inputs to keep
`D + C·A⁻¹·B` within ±32768.

## Departures and limits

* **Problem size.** Only problems of order exactly n = L·W, in a single
  pass, are supported. Smaller problems can be padded (A with an identity
  block, the rest with zeros). Larger problems need several passes through
  the arrays, with intermediate strips buffered and re-fed (a B_r
  buffer). That scheme is not implemented.
* **Queue length.** B_q length follows the rule "loop = one strip":
  (y+1)·n − W, which gives 3W for two arrays. Some closed-form length
  rules stated alongside the original design give other values; this RTL
  does not follow them.
* **Own choices.** The following are this design's own and not part of
  the original description:
  * the number format;
  * the tap-selectable queue, instead of a fixed length per problem shape;
  * the skew/deskew buffers, so the host deals in whole rows;
  * the controller and handshake;
  * M forwarding in S-mode diagonal cells, a zero `x_out` in T mode, and
    M = 0 when dividing by a stored zero.
* **Not included.**
  * The orthogonal (Givens) triangularisation cells, an alternative the
    array could host.
  * The 5n-step linear-system mode.
  * Chaining a result back into the system for a second Faddeev pass, as
    computing `(A+E+F)(E+G)⁻¹(B+D) + AB` would need.

## Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `faddeev_pkg.sv` | number format, `fx_t`, `mfac_t`, multiply and divide |
| `circular_cell.sv`, `square_cell.sv` | the two cells |
| `dual_mode_array.sv` | W × W array |
| `bq_fifo.sv` | factor queue |
| `skew_buffer.sv` | skew/deskew delay lines |
| `faddeev_ctrl.sv` | sequencer |
| `faddeev_system.sv` | the L-tuple system (top) |

`tb/`:

| file | contents |
|---|---|
| `faddeev_tb_pkg.sv` | double-precision reference model and conversions |
| `tb_<block>.sv` | self-checking testbench for each block |
| `tb_faddeev_system.sv` | plain, horizontal, vertical, 2-D and chained problems on two 2 × 2 arrays; checks every result, the cycle count, and that each mechanism occurred (mode switch, pivot swap, unpivoted elimination, C4 clear, B_q recirculation, refusal, chaining) |
| `tb_faddeev_full.sv` | one n = 128 problem at the default size (4 × 32 × 32 cells) |
| `tb_workload_horizontal.sv` | 50 horizontally compatible n = 128 problems in one run at the default size; checks all results and the 52,383-cycle total |

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/faddeev_pkg.sv tb/faddeev_tb_pkg.sv \
  rtl/*.sv tb/tb_faddeev_system.sv --top-module tb_faddeev_system -o sim
./obj_dir/sim
```

The full-size testbench takes about 3 minutes to build and 2 s to run.
