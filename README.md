# Fixed-point matrix decomposition engines: QR, LU, Cholesky and a least-squares weight solver

Wireless receivers and transmitters keep solving small dense linear systems:
MIMO detection, equalisation, MMSE precoding and adaptive beamforming all need
a 4x4-ish matrix factored, then a triangular solve. This RTL provides four small
fixed-point engines for that job:

| engine | computes | input |
|---|---|---|
| `awc_core` | least-squares weights x for A x ≈ b (QR + back-substitution) | M x N matrix A, vector b |
| `qr_mgs_core` | A = Q R by modified Gram-Schmidt | M x N matrix |
| `lu_core` | A = L U (Doolittle, in place) | N x N matrix |
| `chol_core` | A = G Gᵀ (in place) | N x N symmetric positive definite matrix |

`decomp_top` places the weight solver (which contains the QR engine), the LU
engine and the Cholesky engine side by side. They share a clock and reset and
nothing else.

The idea behind all of them is the *application-specific* form of a generic
matrix processor. A general-purpose engine needs a run-time scheduler,
dynamically assigned memory locations and a full crossbar between units, so
that one piece of hardware can run any of the three decompositions. Here each
engine does one algorithm only. Its schedule is fixed at design time: a
loop-counter state machine steps through the algorithm's loops in a fixed
order. Every arithmetic unit input is wired only to the sources that this
algorithm actually feeds it. Units an algorithm never uses are not there. The
design follows the architecture of Irturk, Benson, Laptev and Kastner,
"Architectural Optimization of Decomposition Algorithms for Wireless
Communication Systems". The internal organisation of the units, the number
format split, the handshakes and all timing are this implementation's own
choices, listed under [Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## Number format

All data are signed two's-complement fixed-point words of `WIDTH` bits, `FRAC`
of them fractional. The defaults are 20 bits with 12 fractional bits, which
gives 8 integer bits (including the sign), a range of [-128, 128) and an LSB of
1/4096.

Every arithmetic result is brought back to the word format at once. There is no
wider accumulator.

* **add / subtract** (`fx_addsub`): exact, then clamped (saturated) to the word range.
* **multiply** (`fx_mul`): the 2·WIDTH-bit product is rounded to `FRAC`
  fractional bits (add half an LSB, shift right arithmetically, i.e. round half
  up), then clamped.
* **divide** (`fx_div`): `(|a| << FRAC) / |b|`, truncated toward zero, signed, then
  clamped. Division by zero returns the largest magnitude with the sign of `a`.
* **square root** (`fx_sqrt`): `floor(sqrt(a << FRAC))`; a negative input gives 0.

Each engine has a sticky `ovf` output. It is cleared by `start` and set when any
multiply or add/subtract clamped during the run. A run with `ovf` set has
produced numbers, but they are not the exact-arithmetic answer. Use a wider
`WIDTH` or scale the input. The division and square-root clamps do not set
`ovf`.

Inputs should keep intermediate values inside the range. For QR the squared
column norms must stay below 128, which with 4 rows means entries of magnitude
below about 5.6.

## The engines

All four engines are built the same way:

* a matrix memory (`matrix_mem`) with two combinational read ports and one
  write port, so a multiply can fetch both operands in one cycle;
* one multiplier, one adder/subtractor, and, where the algorithm needs them,
  a square-root unit and a bank of `NDIV` dividers (`fx_div_bank`, one by
  default);
* a state machine of nested loop counters.

The divider and square-root units are iterative and produce one result bit per
cycle. At the default format they dominate the run time: 33 cycles per
division and 18 per square root, counting the start state. The
multiply-subtract updates run one matrix element per cycle.

The divisions of one column (normalising a Q column, scaling an L column,
dividing a Cholesky column by its diagonal) do not depend on each other. The
engines therefore stream them into the divider bank, one issue per cycle
while the next divider in turn is free. Results come back in issue order,
one per cycle at most, so the single memory write port is enough. With one
divider the divisions run back to back. With `NDIV` dividers up to `NDIV` of
them overlap, which trades area for latency. This is the sequential versus
parallel choice in the published design-space exploration, applied to the
slowest unit. Back-substitution divisions depend on each other, so the solver
keeps one plain divider there.

### QR by modified Gram-Schmidt (`qr_mgs_core`)

The X memory (M x (N+NB)) holds the input, and each column is overwritten in
place by its Q column. For each pivot column i:

1. **norm**: `acc = Σ_k X[k][i]²`. One product is issued per cycle and added one
   cycle later, so this takes M+2 cycles. Then `R[i][i] = sqrt(acc)`.
2. **normalise**: `Q[k][i] = X[k][i] / R[i][i]` for every row, streamed into
   the divider bank (one division at a time with the default single divider).
3. for every later column j: **project** `R[i][j] = <Q_i, X_j>` (M+2 cycles), then
   **update** `X[k][j] -= R[i][j]·Q[k][i]` (one row per cycle, M cycles).

The last NB columns (`NB` parameter, 0 by default) are carried along as
right-hand sides. They are projected and updated in step 3 but never normalised.
After the run, column N of R therefore holds `Qᵀb` for a vector b loaded into
column N. The weight solver relies on this.

The read port returns Q or R (`rd_sel`). Entries of R below the diagonal read
as 0.

### Least-squares weight solver (`awc_core`)

It solves the over-determined (M ≥ N) or square system A x = b + e for the x
that minimises |e|²:

1. Load `[A | b]` (b in column N) and pulse `start`.
2. The QR engine runs with NB = 1, producing R and `c = Qᵀb` in one pass.
3. The back-substitution unit (`back_subst`) solves R x = c, from the last row
   up:
   `x[i] = (c[i] − Σ_{j>i} R[i][j]·x[j]) / R[i][i]`.
   It has no copy of R. It reads R and c through the QR engine's read port,
   which the solver hands to it while it runs.
4. `done` pulses and `x_out` holds the weights. Q and R can still be read out.

Carrying b through the Gram-Schmidt steps gives the same c as a separate `Qᵀb`
product, without a second pass over Q. Because c comes from the MGS projections,
it has MGS's numerical behaviour.

### LU (`lu_core`)

The LU engine works column by column, in place, with no pivoting. For column j:

* **U part**: for k < j, `A[i][j] -= A[i][k]·A[k][j]` for rows k+1..j−1;
* **L part**: for k < j, the same update for rows j..N−1;
* **scale**: `A[i][j] /= A[j][j]` for rows below the diagonal.

Each k first fetches `A[k][j]` into a register (1 cycle). Each update then reads
`A[i][k]` and `A[i][j]` and writes `A[i][j]`, all in the same cycle. The result
is L (unit diagonal, not stored) below the diagonal and U on and above it.
Without pivoting, the leading principal submatrices must be nonsingular. Well
conditioned in practice means diagonally dominant.

### Cholesky (`chol_core`)

The Cholesky engine works in place on the lower triangle. For column k:

* `G[k][k] = sqrt(A[k][k])`;
* `G[i][k] = A[i][k] / G[k][k]` for rows below;
* for each later column j, `A[t][j] -= G[t][k]·G[j][k]` for t = j..N−1. `G[j][k]`
  is fetched into a register first.

The upper triangle of A is never read. G reads as 0 above the diagonal.

## Timing

Let DW = WIDTH+FRAC and HW = ⌈DW/2⌉. A square root costs HW+2 cycles, start
state included. One divider takes L = DW+1 cycles. Let P = min(NDIV, L). Then
a column of n independent divisions takes
D(n) = ⌊(n−1)/P⌋·L + (n−1) mod P + L + 1 cycles, which is n·L + 1 with one
divider. The cycles from the `start` cycle to the `done` cycle are:

| engine | formula | default (4x4, 20/12, NDIV=1) |
|---|---|---|
| QR | 1 + Σ_i [ (M+2) + (HW+2) + D(M) + (N+NB−1−i)(2M+2) ] | 689 |
| weight solver | QR with NB=1 (729) + back-substitution (147) + 2 | 878 |
| back-substitution | 1 + Σ_i [ 1 + (N−1−i) + DW+2 ] | 147 |
| LU | see `tb/tb_lu_core.sv` `expected_cycles()` | 252 |
| Cholesky | 1 + Σ_k [ HW+2 + D(N−1−k) + Σ_{j>k}(1+N−j) ] | 290 |

More dividers shorten the runs (4x4, 20-bit, from `tb_div_units`):

| dividers | QR | weight solver | LU | Cholesky |
|---|---|---|---|---|
| 1 | 689 | 878 | 252 | 290 |
| 2 | 429 | 618 | 187 | 225 |
| 4 | 305 | 494 | 156 | 194 |

At 100 MHz the weight solver with one divider therefore delivers about 114,000
solutions per second. The published 4x4, 20-bit solver core reached about
130,000 solutions per second. This engine would need about 114 MHz to match
it with one divider, or about 64 MHz with four. This design has
no timing-closure figure: no FPGA implementation has been run.

## Interface and protocol

Every engine has the same port pattern. `decomp_top` prefixes the ports with
`awc_`, `lu_` or `ch_`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; active-low asynchronous reset |
| `load_we`, `load_row`, `load_col`, `load_data` | in | write one matrix entry per cycle; only while idle |
| `start` | in | one-cycle pulse; ignored while busy |
| `busy` | out | high from the cycle after `start` until `done` |
| `done` | out | one-cycle pulse when the results are valid |
| `ovf` | out | sticky saturation flag for the last run |
| `rd_row`, `rd_col` → `rd_data` | in/out | combinational read of the result while idle |
| `rd_sel` (QR / solver) | in | Q (`SEL_Q`, 0) or R (`SEL_R`, 1) |
| `x_out[N]` (solver) | out | the weights, valid from `done` to the next `start` |

The matrix memory is not cleared by reset or by `start`. Load every entry the
algorithm reads before each run. For Cholesky, only the lower triangle is read.
A second `start` without reloading re-runs on the previous run's outputs.
Assertions in the engines check the protocol rules: no load while busy, and no
start of an iterative unit that is still busy, and no divider result outside a
column's division phase.

The iterative units (`fx_div`, `fx_sqrt`) use the same start/busy/done
handshake. Their operands are captured on the `start` edge, and the result is
held until the next start. `fx_div_bank` puts a valid/ready issue port in
front of `NDIV` of them. A division is accepted on an edge where `in_valid`
and `in_ready` are both high. `out_valid` then pulses L cycles later with
`out_y` and the `out_tag` given at issue.

## Parameters

| parameter | default | where |
|---|---|---|
| `WIDTH` | 20 | all |
| `FRAC` | 12 | all arithmetic |
| `M` | 4 | rows of the QR / solver input |
| `N` | 4 | columns / matrix dimension |
| `NB` | 0 | extra right-hand-side columns of `qr_mgs_core` (1 inside the solver) |
| `NDIV` | 1 | dividers per engine for the column divisions |

Shared defaults and the `qr_sel_e` read-select type live in `rtl/decomp_pkg.sv`.
Matrix sizes need not be powers of two. The engines have been exercised at
N = 2, 3, 4, 6 and 8, and the QR engine also at 6x4 (M > N). `WIDTH` has been
exercised at 19, 20, 26 and 32 bits, and `NDIV` at 1, 2, 3, 4, 8 and 40.

## Where this design makes its own choices

The algorithms, the application-specific organisation, the 4x4 size and the
20-bit word come from the published architecture. The following were not
specified there and are this design's own choices:

* The split into 8 integer and 12 fractional bits, round-half-up multiplies,
  saturation and the `ovf` flag.
* One multiplier, one adder and one square-root unit per engine, and one
  divider by default. The published solver core uses 12 DSP48 multiplier
  slices and one block RAM, which suggests more parallel multipliers than are
  used here. Only the dividers can be replicated (`NDIV`). Parallel
  multipliers and adders are not built. The engines here are smaller and
  slower.
* The round-robin streaming of a column's divisions into the divider bank.
* The restoring divider and digit-by-digit square root. Both produce one bit
  per cycle.
* Register-array memories with asynchronous reads. These map to distributed
  RAM rather than block RAM.
* How b becomes c for back-substitution: b is carried as an extra QR column.
* In the Cholesky step, the division is by G[k][k]. This is the value in place
  at that point.
* LU scales L by the diagonal after the column updates. This is the Doolittle
  form.
* The start/busy/done handshake and the load/read ports.

Not included:

* The general-purpose engine that runs all three decompositions behind a
  selection input. It is the comparison point for the application-specific
  engines, not one of them.
* The generator flow that produces engines for other sizes and resource counts,
  and its fixed-point error analysis. Those are software. The parameters above
  cover the size and format choices.
* Pivoting in LU.
* Floating point.
* Complex-valued data. Wireless systems often need complex data; the engines
  here are real-valued.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. The decomposition testbenches compare
every output word against golden models in `tb/fx_ref_pkg.sv`. These are
independent 64-bit integer implementations of the same fixed-point rules and
the same operation order, so the comparison is bit-exact. The testbenches also
check the mathematical result in floating point (QR ≈ A, LU ≈ A, GGᵀ ≈ A,
Ax ≈ b) and the exact cycle count against the formulas above.

| testbench | what it runs |
|---|---|
| `tb_fx_addsub`, `tb_fx_mul` | random and corner operands, saturation |
| `tb_fx_div`, `tb_fx_sqrt` | random and corner operands, divide by zero, negative root, latency |
| `tb_fx_div_bank` | one random division stream into banks of 1, 3 and 40 dividers: results, tags, order, exact arrival cycle, `in_ready` |
| `tb_matrix_mem` | fill, dual-port read-back, read-during-write |
| `tb_qr_mgs_core`, `tb_lu_core`, `tb_chol_core` | 20 random well-conditioned 4x4 problems each |
| `tb_back_subst` | 30 random triangular systems |
| `tb_awc_core` | 15 random systems, plus an overflowing one that must raise `ovf` |
| `tb_decomp_top` | the whole design at default parameters. The three engines run concurrently on 10 rounds of random problems, then on matrices that overflow. It counts and requires every mechanism: QR, back-substitution, LU, Cholesky, concurrent operation, and saturation in each engine. |
| `tb_bitwidths` (with `core_harness`) | the QR, LU and Cholesky engines at 19, 26 and 32-bit words |
| `tb_matrix_sizes` (with `core_harness`) | the QR, LU and Cholesky engines at 2x2, 3x3, 6x6 and 8x8 |
| `tb_div_units` (with `core_harness`) | the 4x4 engines with 1, 2 and 4 dividers and the 8x8 engines with 8. It checks the cycle counts and that more dividers are never slower. |

To run a testbench with Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/decomp_pkg.sv tb/fx_ref_pkg.sv tb/tb_decomp_top.sv \
  --top-module tb_decomp_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_decomp_top` with any other testbench name. Verilator finds the
modules it needs through `-Irtl -Itb`, since every file is named after its
module. To lint the RTL, run
`verilator --lint-only -Wall -Irtl rtl/decomp_pkg.sv rtl/decomp_top.sv`.
The lint leaves these warnings:

* unused package constants, when a leaf module is linted alone;
* `SYNCASYNCNET`: the assertions use `rst_n` in `disable iff` while the flops
  use it as an asynchronous reset;
* a constant comparison in the square root's clamp, which is constant only at
  the default format;
* the R memory's unused second read port.

## Files

* `rtl/decomp_pkg.sv`: shared defaults and the read-select type
* `rtl/fx_addsub.sv`, `rtl/fx_mul.sv`, `rtl/fx_div.sv`, `rtl/fx_sqrt.sv`:
  arithmetic units
* `rtl/fx_div_bank.sv`: `NDIV` dividers behind one streaming issue port
* `rtl/matrix_mem.sv`: two-read, one-write matrix memory
* `rtl/qr_mgs_core.sv`, `rtl/lu_core.sv`, `rtl/chol_core.sv`: decomposition
  engines
* `rtl/back_subst.sv`, `rtl/awc_core.sv`: triangular solver and least-squares
  weight solver
* `rtl/decomp_top.sv`: the three engines side by side
* `tb/`: testbenches, the golden model package `fx_ref_pkg`, and
  `core_harness`
