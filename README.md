# Systolic arrays for the LMS adaptive FIR filter

An LMS (least-mean-square) adaptive FIR filter computes, for every input
sample u(n), an output y(n) = Σ w_k·u(n−k+1) over M coefficients. It compares
y(n) with a desired sample d(n) and nudges every coefficient along the error:
w_k ← w_k + μ·u(n−k+1)·e(n), with e(n) = d(n) − y(n). The output is an inner
product, so it maps onto a linear chain of identical cells. Each cell holds one
coefficient and does one multiply-add for the output, plus the
`q = μ·u; m = q·e; w = w + m` correction for its own coefficient. The error is
broadcast to all cells.

The chain can be laid out in several ways. Samples and partial sums can be
broadcast, can ripple combinationally, or can be pipelined at different speeds
and in different directions. Each layout is a different systolic array with a
different latency, input rate and cell utilization. This repository holds six
such arrays. All of them are synthesizable SystemVerilog, share one cell, and
are checked bit-exactly against a behavioural model.

| array (module) | samples | partial sums | cells | sample rate | latency |
|---|---|---|---|---|---|
| `lms_ripple_array` | pipelined, 1 delay/cell | ripple right→left within a clock | M | 1 per clock | 0 |
| `lms_bcast_array` | broadcast | pipelined right→left, 1 delay/cell | M | 1 per clock | 0 |
| `lms_yfast_array` | left→right, 2 delays/cell | left→right, 1 delay/cell | M | 1 per clock | M−1 samples |
| `lms_ufast_array` | left→right, 1 delay/cell | left→right, 2 delays/cell | M | 1 per clock | M−1 samples |
| `lms_bidir_array` | left→right, 1 delay/cell | right→left, 1 delay/cell | M | 1 per 2 clocks per signal; two signals interleaved fill it | 0 |
| `lms_fold_array` | enter left, loop back at right end | share the line with the samples | M/2 | 1 per 2 clocks, every cell busy every clock | 0 |

`lms_systolic_top` places all six side by side. Latency 0 means y(n) and e(n)
come out combinationally in the same clock that u(n) is presented.

## The shared cell

`lms_pe` holds one coefficient `w` and a preloaded step size `mu`. Each clock it
computes `y_out = y_in + w·u_mul`. This is combinational; the arrays place the
delay elements between cells. When `e_valid` is high, the cell also updates
`w ← w + (μ·u_upd)·e` at the clock edge. The product uses the coefficient from
before the update, because the error depends on the product.

`u_upd` is not always the sample being multiplied now. It is `u_mul` delayed by
`HIST` enabled clocks. The next section explains why.

`lms_fold_pe` is the two-coefficient cell of the folded array. It stores `v`
and `t` and sees one rightward item `p` and one leftward item `r` per clock.
Each item is tagged as a sample or a partial sum:

* if `p` is a sample: `p` passes unchanged and `r' = r + v·p`;
* otherwise: `r` passes unchanged and `p' = p + t·r`.

Each of `v` and `t` has its own operand history (`HV`, `HT`) for the update.

## Pairing each error with the right sample (the subtle part)

The LMS update of coefficient k needs e(n) together with u(n−k+1), the sample
that coefficient multiplied for y(n). In a pipelined array, cell k does its
multiply-add for y(n) some clocks *before* y(n) leaves the array and e(n)
exists. By then the sample has moved on (or, in the broadcast array, been
replaced). Each cell therefore keeps a short shift register of its past
operands. Its depth is the distance, in clocks, between the cell's use of its
coefficient and the appearance of the error:

| array | history depth of cell k (k = 1..M from the left) |
|---|---|
| ripple | 0 |
| broadcast | k−1 |
| y-faster | M−k |
| u-faster | 2(M−k) |
| bidirectional | k−1 (in clocks; samples of one signal are 2 clocks apart) |
| folded, cell j = 0..M/2−1 | `v`: j, `t`: M−1−j |

A consequence follows, and it matters when choosing an array. **Only the
ripple array is exactly the standard LMS filter.** In every pipelined array,
cell k computes its part of y(n) with a coefficient that has not yet absorbed
the most recent errors. Number the taps i = 0..M−1 and let lag_i be the number
of items by which tap i trails. Then

    y(n) = Σ_i W_i(n − lag_i) · u(n − S·i)

where W_i(x) has absorbed the errors of all items before x. S is 1 for the
one-sample-per-clock arrays and 2 for the bidirectional and folded arrays, with
items counted in clocks. The lags are:

* ripple: 0;
* broadcast and y-faster: i and M−1−i samples;
* u-faster: 2i samples;
* bidirectional and folded: i clocks.

For the last two that is ⌊i/2⌋ samples of one signal. This is the behaviour of
transposed-form and delayed-update LMS filters. It converges for small enough μ,
and every array does in the tests. Its stability limit on μ is tighter than
that of exact LMS and depends on the lags.

## The folded (100% utilization) array

`lms_fold_array` needs only M/2 cells. Samples enter the leftmost cell on
alternate clocks; on the clocks in between, a zero partial sum is injected.
Every item travels right one cell per clock and passes one delay element at the
right end. It then travels back left on the upper line.

A rightward item and a leftward item are always one sample and one sum, because
the delays make every meeting pair an odd number of clocks apart. So every cell
does a useful multiply-add every clock. A sum meets each of the M samples that
entered within M−1 clocks before or after it. Samples newer than the sum meet
it on its way back and use `v`; older ones meet it on its way out and use `t`.

The sum that leaves the leftmost cell in the clock u(n) enters is the full
y(n). Cell j therefore holds `v = w_(j+1)` and `t = w_(M−j)`. `w_out` of the
array lists the coefficients in tap order.

`in_valid` must alternate strictly. An assertion in the array checks this.

## Bidirectional array: 2-slow and two-signal operation

In `lms_bidir_array`, samples and sums move in opposite directions, so a sum
meets only every second item of the sample line. There are two ways to run it:

* **2-slow:** one signal, with `in_valid` low on every other clock (nil slots).
  A nil slot carries a zero sample, and its error is not applied.
* **Two signals:** a second signal u\*, d\* is placed in the nil slots, with
  `in_valid` high every clock. The two interleaved signals are filtered by one
  shared coefficient set, and both adapt it.

## Interfaces and timing

All arrays have the same ports:

`clk`, `rst_n` (synchronous, active low), `mu_load`/`mu_in` (step size preload,
Q1.15), `in_valid`, `u_in`, `d_in`, `out_valid`, `y_out`, `e_out`, `w_out[M]`.

* `d(n)` is presented with `u(n)`. `lms_error_unit` delays it to meet y(n)
  when the array has latency.
* In the ripple, broadcast, y-faster and u-faster arrays, `in_valid` also acts
  as the clock enable of the whole pipeline. A clock without a sample is a
  stall that changes nothing.
* In the y-faster and u-faster arrays, y(n) and e(n) appear in the clock that
  u(n+M−1) is presented. `out_valid` rises once M−1 samples have been pushed.
* The bidirectional and folded arrays run every clock, and
  `out_valid = in_valid`.
* Coefficients reset to zero. `mu` is held in every cell until the next
  `mu_load`.

## Number formats

Defined in `lms_pkg`:

| quantity | bits | fraction bits |
|---|---|---|
| u, d | 16 | 12 |
| y, e | 24 | 12 |
| coefficients | 24 | 20 |
| μ | 16 | 15 |

The coefficients have more fraction bits than the data so that small
corrections do not truncate to zero. All arithmetic wraps and truncates:
there is no rounding and no saturation. With M = 8 and |u| < 8, the 24-bit
sums have ample headroom. For much longer filters, widen `AW`.

## Where this design departs from its source description

* **Exactness.** The source presents every array as producing the same outputs
  as the standard LMS filter. As shown above, only the rippling array does; the
  pipelined ones lag as described.
* **Operand history.** The histories are additions of this design. Without
  them, a pipelined cell would correct its coefficient with the wrong sample.
* **Order of operations.** The source's cell procedure lists the coefficient
  update before the multiply-add. Here the multiply-add uses the coefficient
  from before the update. With a combinational error, the other order would
  form a loop.
* **Latency.** The source states a latency of M samples for the unidirectional
  arrays. These modules deliver y combinationally from the last cell, which
  gives M−1. Registering the output would give M.
* **Fixed choices of this design.** The number formats, the d alignment delay,
  the per-cell μ register with a load strobe, zero reset, and the use of
  `in_valid` as a pipeline enable are not specified by the source.
* **Coefficient labels in the u-faster array.** The source's figure labels the
  leftmost cell's coefficient w1 while that cell multiplies the oldest sample.
  Here coefficients are numbered by tap: `w_out[0]` multiplies u(n), and it
  sits in the rightmost cell.
* **Sizes.** The broadcast array defaults to M = 3, the worked example of the
  source. The others default to M = 8, which is this design's choice; the
  source leaves M general (even for the folded array).
* **Out of scope.** The source also mentions the inner-product array without
  adaptation (the broadcast array with μ = 0 behaves as it does), FFT-based and
  block-LMS architectures used only for comparison, and a 2-D extension left as
  future work. None of these is built.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=F`. Each testbench has a watchdog.

* `lms_ref_pkg` is the reference model. It evaluates the lagged-LMS equation
  above with 64-bit integers and the same truncations as the RTL.
* Each array testbench identifies a fixed unknown FIR system from random input,
  with μ = 1/16. It checks every y and e bit-exactly, as well as the final
  coefficients, the latency, and `out_valid` timing. It also checks that the
  mean |e| over the last quarter of the run is below a quarter of that over
  the first quarter.
* The stalling arrays see random stalls in the first half of the run, then one
  sample per clock. The bidirectional testbench runs 2-slow, then with two
  signals.
* The cell testbenches (`tb_lms_pe`, `tb_lms_fold_pe`) and `tb_lms_error_unit`
  check the cell arithmetic, both function options, the history depths and the
  d delay against their own integer models.
* `tb_lms_systolic_top` runs all six arrays at their default sizes. It counts
  stalls, pipeline latency, nil slots, second-signal samples and partial-sum
  injections, and fails if any of them never occurs.
* `tb_lms_long_filter` runs the same test with 256 coefficients in every
  array, 3000 samples each and μ = 1/64. It is the long-filter use case these
  arrays are meant for. Its Verilator build takes a few minutes; the
  simulation takes seconds.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_lms_fold_array \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/lms_pkg.sv tb/lms_ref_pkg.sv \
        tb/tb_lms_fold_array.sv
    ./obj_dir/Vtb_lms_fold_array

Replace the module name for the other testbenches. The cell and error-unit
testbenches do not need `tb/lms_ref_pkg.sv`. Every testbench finishes in well
under a second of wall-clock time, except `tb_lms_long_filter`.

## Changing it

* **Filter length.** `M` is a parameter of every array and of the top
  (`M_BCAST` for the broadcast array). The folded array needs M even and
  M ≥ 4. History depths follow from M automatically.
* **Word widths.** These are the localparams in `lms_pkg`; `ips` and
  `lms_corr` there hold all the arithmetic. The reference model in
  `tb/lms_ref_pkg.sv` hard-codes the same formats and must be changed with
  them.
* **Critical path.** In the ripple array, the critical path runs through all M
  adders, the subtractor and the correction multipliers. In the other arrays
  it is one cell's multiply-add plus the error broadcast. The source counts
  two multiplications and two additions per cell per clock.
