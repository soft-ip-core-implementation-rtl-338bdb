# QR-RLS adaptive filter from multipliers and adders only

This is a complex-valued recursive-least-squares (RLS) filter built as a
triangular systolic array of QR-decomposition cells, in IEEE single-precision
floating point. Its main idea is that every operation is reduced to
floating-point multiplication and addition. The one division in the
algorithm, a reciprocal in the boundary cell, is computed from a small seed
table followed by multiplicative refinement. Once the divider is gone, the
boundary cell and the internal cell use the same kinds of operator. One
*generic cell* with two multipliers, two adders and a reciprocal unit (a
table and one dedicated multiplier) can then play either role. The array is built from identical copies of that cell.

The RLS problem solved is, for each new sample (x, y), with N complex inputs
x and a complex desired signal y:

    minimise  sum_k beta2^(n-k) | y_k - sum_j w_j x_k,j |^2

The array does not output the weights w. It outputs the a-priori error
`alpha`, the conversion factor `gamma` and the a-posteriori error
`e = gamma * alpha`, which are what adaptive beamforming and
noise-cancelling use.

## Squared Givens rotations: what a cell computes

A QR-RLS array keeps the triangular factor R of the weighted input matrix and
updates it with one Givens rotation per row per sample. The classic rotation
needs a square root and a division. The *squared Givens rotation* (SGR) form
used here stores R as `D^(1/2) * Rbar`, with `Rbar` unit upper-triangular. Each
boundary cell holds a real diagonal entry d. Each internal cell holds one
complex entry r of `Rbar`. No square root remains, and the only division left
is `1/d'` in the boundary cell. A real factor `delta`, the likelihood weight,
travels down the diagonal. It starts at 1 for each sample.

Boundary cell (on the diagonal). The state is d and the input is x from above:

    d'        = beta2 * d + delta_in * |x|^2
    a         = x                              (sent right)
    b         = delta_in * conj(x) / d'        (sent right)
    delta_out = delta_in * beta2 * d / d'      (sent to the next boundary cell)

Internal cell (off the diagonal). The state is r, with x from above and a, b
from the left:

    x_out = x - a * r                          (sent down)
    r'    = r + b * x_out
    a, b passed on to the right

Derivation in one line: the row update `r' = (beta2 d r + delta conj(x1) xj) / d'`
becomes `r + b x_out` once `xj = x_out + x1 r` is substituted. This also
shows why `beta2` is not needed in the internal cells.

Until a boundary cell has seen a non-zero input, `d'` is 0. The cell then
applies the identity rotation: `b = 0` and `delta_out = delta_in`. Its `dzero`
output flags this.

At the bottom of the last column (the y column), the value that leaves is the
a-priori error `alpha`. The last boundary cell's delta is the conversion
factor `gamma`. An output stage multiplies the two to give `e`.

## The reciprocal without a divider

`fp_recip` inverts the exponent directly and needs a reciprocal only for the
significand `m = 1.f` in [1, 2).

1. **Seed.** `recip_lut` is indexed by the top `LUT_BITS` fraction bits. It
   holds `1/(interval midpoint)`, so the seed error `|1 - m*y0|` is at most
   `2^-(LUT_BITS+1)`. The table is computed when the design is elaborated:

       y0[k] = round( 2^(FRAC_BITS+LUT_BITS+1) / (2^(LUT_BITS+1) + 2k + 1) )

2. **Refinement.** Each step squares the relative error, so it doubles the
   number of correct bits. There are two forms (`METHOD`):
   * Newton-Raphson: `t = 2 - m*y`, then `y = y*t`. The two multiplies depend
     on each other, so each iteration takes two pipeline stages. Any error in
     an estimate is corrected by the next iteration.
   * Series expansion: `e = 1 - m*y0` once, then in each stage `y = y*(1+e)`
     and `e = e*e`. These are independent multiplies in one stage. An error is
     not corrected later, which is why the datapath carries spare bits.

   With one iteration the two forms compute the same thing.

3. **Repack.** The result is rounded to 24 significant bits.

The datapath is fixed point with `FRAC_BITS = 30`, six bits more than the
result. The default is a 10-bit table with one Newton step, which gives about
21 correct bits (checked to a relative error of 2^-21). A 12-bit table, or a
6-bit table with two steps, reaches the full 24 bits. Latency is
`2 + 2*ITERATIONS` clocks for Newton-Raphson and `3 + ITERATIONS` for the
series form. A new operand can enter every clock.

Zero input gives infinity. Infinite input gives zero.

The same algorithm exists in two forms:

* `fp_recip` is the circuit unrolled. Every multiply has its own
  multiplier and pipeline stage, so a new operand can enter every clock.
* `fp_recip_iter` runs the same steps one after another on a single
  multiplier. For Newton-Raphson that is m·y, then y·t. For the series form
  it is m·y0, then y·(1+e) and e·e in turn. Both forms take
  `2 + 2*ITERATIONS` clocks, and the unit accepts the next operand only when
  the previous result appears. The two give bit-identical results for
  Newton-Raphson.

A cell needs one reciprocal per boundary update, once every 11 clocks. The
generic cell therefore uses `fp_recip_iter` by default: one table and one
multiplier per cell. Setting `RECIP_PIPELINED = 1` swaps in `fp_recip`.

## The generic cell and its schedule

`sgr_generic_cell` runs one update as a fixed sequence of steps, one per
clock. In each step it can use up to two multipliers (M), two adders (A) and
the reciprocal unit. The floating-point units are combinational, and
every result is registered at the end of its step. The `mode` input selects
which of the two schedules runs:

| step | boundary cell                          | internal cell                          |
|------|----------------------------------------|----------------------------------------|
| 0    | M: x.re², x.im²                        | M: a.re·r.re, a.im·r.im                |
| 1    | A: \|x\|²; M: beta2·d                  | A: Re(a·r); M: a.re·r.im, a.im·r.re    |
| 2    | M: delta·\|x\|², delta·beta2·d         | A: Im(a·r); A: x_out.re                |
| 3    | A: d'                                  | A: x_out.im; M: b.re·xo.re, b.im·xo.re |
| 4    | reciprocal of d' starts (4 clocks)     | M: b.im·xo.im, b.re·xo.im              |
| 5    | –                                      | A: Re(b·xo), Im(b·xo)                  |
| 6    | –                                      | A: r' (both parts)                     |
| 8    | M: delta/d', delta_out                 |                                        |
| 9    | M: b.re, b.im (conj by sign flip)      |                                        |

Both schedules are padded to the same length: `STEPS = 6 + LR` steps, 10 with
the default reciprocal latency `LR = 4`. A cell therefore finishes
`LATENCY = 11` clocks after `in_valid`, with a one-clock `out_valid` pulse.
The outputs are registers and hold through that clock. The next update may
start in the same clock (`busy` is low then). An assertion flags an
`in_valid` that arrives while `busy` is high. A second assertion checks that
the reciprocal result is ready in the step that reads it.

By default the floating-point units are combinational, so the clock period
covers one full floating-point add or multiply. `FP_STAGES` puts that many
output registers in every `fp_add` and `fp_mul` of the cell. A retiming
synthesis run can move them into the arithmetic. Each schedule step then
lasts `FP_STAGES + 1` clocks, and the unit inputs stay steady for the whole
step. Results are written back in the step's last clock. The reciprocal
result is captured when it appears and held, and the wait for it is rounded
up to whole steps:

    steps   = max(7, 6 + ceil(LR / (FP_STAGES + 1)))
    LATENCY = steps * (FP_STAGES + 1) + 1

The cell's structure and step order do not change. `sgr_pkg::cell_latency`
computes this figure for the array.

## The triangular array and its timing

`qr_rls_array` has `N_INPUTS` rows. Row i has a boundary cell in column i and
internal cells in columns i+1 … N_INPUTS. The last column holds y. With the
default `N_INPUTS = 3` that is 3 + 6 = 9 cells, all of them `sgr_generic_cell`
with the mode fixed by position.

Each cell takes exactly L = 11 clocks, so the array can be scheduled
statically:

* Cell (i, j) starts sample k at `t_k + (i + j) * L`. The x from above and the
  (a, b) from the left then arrive in the same clock. The data needs no
  buffering and no handshake between cells, only `out_valid` → `in_valid`.
* Column j of the input is delayed by `j * L` clocks in shift registers (the
  input skew).
* A boundary cell's `delta_out` is needed by the next boundary cell one cell
  period later. It is captured in a holding register on `out_valid`.
* The rate control accepts a sample when `in_valid && in_ready`. After that,
  `in_ready` stays low for L-1 clocks. The array therefore takes at most one
  sample every L clocks, and at that rate every cell is busy every clock.
  Irregular gaps are allowed.
* `alpha`, `gamma` and `e_out` appear with `out_valid`
  `2 * N_INPUTS * L + 1` clocks (67 by default) after their sample was
  accepted.

Each boundary update uses the five arithmetic units in 12 of its 55
unit-slots. Each internal update uses them in 16 of its 55. The two adders
and two multipliers are what the schedule needs for the internal cell's two
complex multiplies.

## Files

| file | contents |
|------|----------|
| `rtl/sgr_pkg.sv` | `fp32_t`, `cplx_t` (packed re/im pair), `cell_mode_e`, `recip_method_e`, constants |
| `rtl/fp_add.sv` | single-precision adder/subtractor, combinational |
| `rtl/fp_mul.sv` | single-precision multiplier, combinational |
| `rtl/recip_lut.sv` | reciprocal seed table |
| `rtl/fp_recip.sv` | pipelined reciprocal: table + Newton-Raphson or series stages |
| `rtl/fp_recip_iter.sv` | the same reciprocal on one reused multiplier (the cell's default) |
| `rtl/sgr_generic_cell.sv` | generic SGR cell (boundary or internal) |
| `rtl/qr_rls_array.sv` | top: triangular array, input skew, rate control, output stage |
| `tb/tb_fp_pkg.sv` | testbench helpers: exact single↔double conversion, RNE rounding |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_INPUTS` | 3 | `qr_rls_array` | number of complex filter inputs (array has N(N+3)/2 cells) |
| `LUT_BITS` | 10 | array, cell, `fp_recip` | seed table address bits |
| `RECIP_ITERS` / `ITERATIONS` | 1 | array, cell / `fp_recip` | refinement steps |
| `RECIP_METHOD` / `METHOD` | `RECIP_NEWTON` | array, cell / `fp_recip` | `RECIP_NEWTON` or `RECIP_SERIES` |
| `RECIP_PIPELINED` | 0 | array, cell | 0: `fp_recip_iter` (one multiplier), 1: `fp_recip` (pipelined) |
| `FP_STAGES` | 0 | array, cell | pipeline registers in each floating-point unit of a cell |
| `STAGES` | 0 | `fp_add`, `fp_mul` | output pipeline registers of the unit |
| `FRAC_BITS` | 30 | `fp_recip`, `fp_recip_iter`, `recip_lut` | fixed-point fraction bits of the reciprocal datapath |

If you change the reciprocal parameters, the cell period L changes with
them. It is computed by `sgr_pkg::cell_latency`. The latencies that the
testbenches expect change too.
`beta2`, the squared forgetting factor, is an input port (for example 0.99 =
`32'h3F7D70A4`).

## Number format

IEEE-754 single precision throughout. Both `fp_add` and `fp_mul` round to
nearest, ties to even, and the testbenches check them bit-exactly against
that rounding. Denormal inputs are treated as zero and underflow flushes to
zero. Overflow and infinite inputs give infinity. NaN is never produced, and
an exact cancellation gives +0.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and stops on a watchdog:

* `tb_fp_mul`, `tb_fp_add`: thousands of random operands, compared bit for bit
  with the exact result rounded in double precision. They also cover carries,
  near-total cancellation, large exponent gaps, zeros, overflow and
  underflow. They include exact ties for round-to-even. A copy with
  `STAGES = 2` must agree two clocks later.
* `tb_recip_lut`: every table entry, and the seed error bound at both ends of
  every interval.
* `tb_fp_recip`: six table/step combinations side by side: the default,
  6-bit/2-step Newton, 6-bit/2-step series, 6-bit/1-step, 3-bit/2-step
  (held to 12 bits) and 12-bit/1-step (held to the full 24 bits). They run
  on a random stream with gaps. It checks accuracy,
  the clock count from input to output for every result, and zero and
  infinity inputs.
* `tb_fp_recip_iter`: the single-multiplier unit in the same three
  configurations (the default, a 6-bit Newton unit and a 6-bit series unit).
  It checks accuracy, latency, and zero and infinity inputs.
* `tb_sgr_generic_cell`: 300 back-to-back updates mixing the two modes. Each
  result is compared with the SGR equations evaluated in double precision from
  the cell's state, and the 11-clock latency is checked. The d' = 0 identity
  rotation is covered. A second cell, built with the pipelined reciprocal,
  runs on the same inputs and must match bit for bit.
* `tb_qr_rls_array`: the full default array over 240 samples, with
  y = w·x exactly. The outputs are compared with a double-precision model of
  the array. The test checks, independently of that model, that `e` drops
  below 1e-3 once the weights are determined. It then changes w and checks
  that the filter tracks the new weights with beta2 = 0.9. It also checks the
  67-clock latency and that the rate control holds samples back. It counts
  boundary and internal updates, identity rotations, stall clocks, convergence
  and re-convergence, and fails if any of them never happens.
* `tb_qr_rls_array_variants`: the same end-to-end test on a differently
  configured array:
  * 5 inputs (20 cells)
  * a 6-bit table with two series stages
  * the pipelined reciprocal
  * `FP_STAGES = 2`

  The cell period is then 25 clocks and a result takes 251 clocks.

To run one with Verilator (for example the array):

    verilator --binary --timing --assert -Irtl -Itb \
      tb/tb_fp_pkg.sv rtl/sgr_pkg.sv rtl/fp_add.sv rtl/fp_mul.sv \
      rtl/recip_lut.sv rtl/fp_recip.sv rtl/fp_recip_iter.sv \
      rtl/sgr_generic_cell.sv \
      rtl/qr_rls_array.sv tb/tb_qr_rls_array.sv --top-module tb_qr_rls_array
    ./obj_dir/Vtb_qr_rls_array

Each testbench runs in well under a second.

## What is this design's own, and what it leaves out

These parts follow the published design:

* the SGR QR-RLS array
* complex arithmetic split into real multiplies and adds
* the reciprocal as a seed table plus Newton-Raphson or series iterations, with
  the 6- and 10-bit table options
* the generic cell on two multipliers, two adders and a dedicated reciprocal
  multiplier and table
* single-precision floating point

These are choices made here:

* the exact cell equations (the standard SGR form above)
* the order of the schedule steps and the padding of both modes to one length
* the midpoint seed table and the fixed-point widths
* the choice of the 10-bit table with one Newton step as the default
* the floating-point units' internals and exception handling
* the identity rotation at d' = 0, the zero reset of the cell state, and the
  `in_valid`/`out_valid` handshake
* the array size (3 inputs, 9 cells, about the number of 5-FLOP cells that
  matches a 5 GFLOP device)
* how pipelining is added to the cell: registers at the unit outputs, with
  each schedule step stretched to match
* the static skew-and-hold timing of the array, the rate control, and the
  output cell `e = gamma * alpha`
* fixed-point rather than floating-point multipliers inside the reciprocal.
  The pipelined `fp_recip` is an extra option.

Not built:

* Mapping the triangular array onto a reduced linear array of generic cells.
  Here each cell would time-share the work of several triangle positions. The
  published design relies on such a mapping, but its schedule and data routing
  are not described in enough detail to implement.
* Sharing one table and multiplier among several cells. This is mentioned only
  as an option.
* Extracting the weights w from the array.

The floating-point units are written for clarity. With the default
`FP_STAGES = 0` they are single-cycle, so the clock rate is well below that
of a pipelined FPGA implementation. Raising `FP_STAGES` adds registers but
does not overlap steps, so the clock count per update grows in proportion.
