# RLS adaptive FIR filter

An 8-tap adaptive FIR filter that updates its weights with the recursive
least-squares (RLS) algorithm. It takes a reference signal x(n) and a desired
signal d(n). For each sample pair it outputs the error e(n) = d(n) − y(n), and
it updates its eight tap weights so that the filter output y(n) tracks d(n).

In noise cancellation, d is a signal corrupted by noise and x is a reference
correlated with that noise. The filter learns the noise path, and e is the
cleaned signal. In system identification, d is the output of an unknown
system driven by x, and the weights converge to that system's impulse
response.

RLS converges far faster than LMS-type filters, and it does not depend on
how the input's eigenvalues are spread. The price is an N × N matrix update
on every sample. Here every vector and matrix operation is fully parallel,
and one iteration completes in 8 clock cycles.

The RTL is modelled on a published RLS filter ASIC that was taken through a
130 nm standard-cell flow. These points follow that design:

- the filter order (8);
- the 16-bit sample width;
- 12 bits of operand precision;
- the 8-clock latency;
- the algorithm's step order.

Everything else is this design's own choice, including the internal matrix
format, the forgetting factor, the initial matrix, the handshake, the reset
and the stage split. Each is listed below.

## The recursion

With λ the forgetting factor (0 < λ < 1) and P the inverse of the
exponentially weighted autocorrelation matrix of x, each sample runs:

| step | quantity | formula |
|---|---|---|
| 1 | filter output | y(n) = w(n−1)ᵀ x(n) |
| 2 | intermediate gain | u(n) = P(n−1) x(n) |
| 2 | gain vector | k(n) = u(n) / (λ + x(n)ᵀ u(n)) |
| 3 | a-priori error | e(n) = d(n) − y(n) |
| 4 | weight update | w(n) = w(n−1) + k(n) e(n) |
| 5 | matrix update | P(n) = (P(n−1) − k(n) [x(n)ᵀ P(n−1)]) / λ |

Here x(n) = [x(n), x(n−1), …, x(n−7)]. Older errors are weighted down by
λ per sample, so the filter's memory is roughly 1/(1−λ) samples: 100 at the
default λ = 0.99.

The iteration costs about 4N² multiplications: P x, xᵀ P, the outer
product k (xᵀP), and the scaling by 1/λ. The term xᵀ P is computed on its own
and not taken from u. P is symmetric only in exact arithmetic, and the
hardware follows the formula as written.

## The 8-clock iteration

`rls_controller` moves through eight stages, one per clock. Each stage
writes its results into registers that the next stage reads. Clock 0 is the
clock in which the sample is taken (`ready && in_valid`).

| clock | stage | what is registered | module |
|---|---|---|---|
| 0 | accept | delay line shifts in x(n); d(n) latched | `tap_delay_line` |
| 1 | S1 | y = w·x, u = P x, z = xᵀ P | `dot_product`, `mat_vec_mul` ×2 |
| 2 | S2 | e = d − y, xu = x·u | `error_unit`, `dot_product` |
| 3 | S3 | inv = 1 / (λ + xu) | `gain_reciprocal` |
| 4 | S4 | k = inv · u | `kalman_gain` |
| 5 | S5 | w ← w + k e | `weight_update` |
| 6 | S6 | Pd ← P − k zᵀ | `pmatrix_update` |
| 7 | S7 | P ← Pd / λ | `pmatrix_update` |
| 8 | S8 | e_out, y_out, w_out ← results | `rls_top` |

`out_valid` is high for the one clock that follows the S8 edge. It comes
exactly 8 clocks after the accept edge. At that point the weights and the
matrix are already updated, so the filter is ready for the next sample in
the same clock.

**Throughput.** The original design quotes both an 8-clock latency and
"throughput of 1 clock cycle". Exact RLS cannot take a new sample every
clock: step 1 of sample n+1 needs the weights from step 4 of sample n, and
step 2 needs the matrix from step 5. This design keeps the recursion exact.
It accepts at most one sample per 8 clocks and delivers each result in a
single clock. At the 250 MHz target that is over 31 Msample/s, against the
1 ksample/s the application needs. A one-sample-per-clock pipeline would
need a delayed-update RLS variant, which is a different algorithm and is not
built here.

## Number formats

| quantity | width | format | range |
|---|---|---|---|
| x, d, y, e, w | 16 | Q3.12 | ±8, LSB 2.4e-4 |
| P, u, xᵀP, xᵀu, 1/(λ+xᵀu), k | 32 | Q11.20 | ±2048, LSB 9.5e-7 |

The 16-bit samples and the 12 fraction bits follow the original design. It
found 12 bits enough to keep the hardware within 8 % of a floating-point
model. The 32-bit matrix format is this design's own choice.

P needs the extra range and precision. It starts at 10·I. It settles near
(1−λ)/σ²ₓ, which is about 0.04 for the test signals. Along any direction the
input does not excite, such as a tap the delay line has not yet filled, it
grows by 1/λ on every sample. The gain k can grow large when the input
is small.

Every product is kept at full precision, and every sum is formed in 64
bits. Each narrowing then does two things:

1. It rounds to nearest, with ties toward +∞, by adding half an LSB before
   an arithmetic shift.
2. It saturates to the target width.

The helpers are `round_shift` and `saturate` in `rls_pkg`.

The reciprocal is a single-cycle combinational divider:
inv = round(2⁴⁰ / den). In exact arithmetic den ≥ λ. If rounding ever
drives den to zero or below, or so small that the quotient overflows, the
largest positive value is returned. 1/λ is a constant that is worked out
when the design is elaborated, so the division by λ in step 5 is a
multiplication.

All intermediate values fit in 64 bits provided DW + PW + log₂N ≤ 63 and
2·PW ≤ 64. The defaults meet both.

## Interface (`rls_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock; the timing target is 250 MHz |
| rst_n | in | 1 | asynchronous active-low reset |
| in_valid | in | 1 | x_in/d_in hold a sample; keep it high until it is taken |
| x_in | in | 16 | reference sample x(n), Q3.12 |
| d_in | in | 16 | desired sample d(n), Q3.12 |
| ready | out | 1 | high when idle; the sample is taken on a clock edge where ready && in_valid |
| out_valid | out | 1 | one-clock pulse, 8 clocks after the sample was taken |
| e_out | out | 16 | error e(n), the cleaned output |
| y_out | out | 16 | filter output y(n) |
| w_out | out | 8 × 16 | weights w(n) after the update |

The original design has four inputs (clock, reset, x and d) and one
output, e. This design adds the `in_valid`/`ready` handshake because
samples arrive far more slowly than the clock. It also brings out y and the
weights for observation.

Reset does three things:

- it clears the delay line and the weights;
- it loads P(0) = 10·I;
- it returns the controller to idle.

## Parameters

| parameter | default | meaning |
|---|---|---|
| N | 8 | taps |
| DW / DFRAC | 16 / 12 | sample and weight width and fraction bits |
| PW / PFRAC | 32 / 20 | matrix and gain width and fraction bits |
| LAMBDA_Q | 1038090 | λ in Q(PFRAC); 0.99 |
| P_INIT_Q | 10485760 | initial diagonal of P in Q(PFRAC); 10.0 |

The defaults are collected in `rls_pkg`. The original design gives no value
for λ or for P(0).

## Modules

- `rls_pkg` holds the default sizes, the controller's state enum, the
  stage-enable struct, and the rounding and saturation helpers.
- `rls_top` is the filter. It holds the stage registers and wires the units
  together.
- `rls_controller` is the eight-stage sequencer and the handshake. It has
  assertions: the stage enables are one-hot or zero, and no stage runs
  while the controller is ready.
- `tap_delay_line` holds the input vector x(n).
- `dot_product` computes the inner product with rounding and saturation. It
  is used for w·x and for x·u.
- `mat_vec_mul` computes P x, or xᵀ P with `TRANSPOSE = 1`.
- `error_unit` computes e = d − y, saturated.
- `gain_reciprocal` computes 1 / (λ + xᵀu).
- `kalman_gain` computes k = inv · u.
- `weight_update` holds the weight register and applies w += k e.
- `pmatrix_update` holds the P register and applies the two-step update.

The arithmetic units are combinational; the registers sit in `rls_top`,
`weight_update` and `pmatrix_update`. At the defaults the design holds about
5400 flip-flops: 4096 of them for P and its intermediate copy Pd, and 128
for the weights. The datapath has 288 multipliers (4N² + 4N) and one 64-bit
divider.

This RTL does not cover the original design's physical implementation:
synthesis to a 130 nm library, floorplan, place-and-route and a 3 × 3 mm die.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs against reference arithmetic in `tb_fx_pkg`. That package
rounds through an integer quotient and remainder, independently of the RTL
helpers. Each testbench ends with a `TB_RESULT checks=… failures=…` line.

- **`tb_rls_top`** is the end-to-end test at the default parameters. The
  filter identifies an unknown 8-tap system whose taps are the coefficient
  values the original design reports at its 20th iteration: 1.0439, 0.3869,
  0.1557, 0.1214, −0.1888, −0.4204, −0.0379 and −0.2333. It runs 400
  samples at random spacing, and some samples are offered while the filter
  is busy so that they wait. Every result is checked three ways:
  - bit-exactly, against a fixed-point model of the whole recursion: e, y
    and all weights;
  - for timing: exactly 8 clocks of latency, and ready low while busy;
  - for accuracy, against a double-precision RLS. The largest weight
    difference is 0.0003 at iteration 20 and 0.0023 at iteration 400. At
    the end the weights are within 0.01 of the unknown system.
- **`tb_rls_noise_cancel`** runs noise cancellation: a sine plus noise that
  came through a 4-tap path. The noise is suppressed by 14.9 dB, which is
  about the limit for λ = 0.99 with a sine present. The error output stays
  within 0.0014 of a double-precision RLS.
- The unit testbenches cover the saturation corners, both orientations of
  `mat_vec_mul`, the reciprocal's guarded cases, the enables of the two
  register blocks, and the controller's stage order and stalls.

To simulate with plain Verilator, run this from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rls_pkg.sv tb/tb_fx_pkg.sv tb/tb_rls_top.sv --top-module tb_rls_top
./obj_dir/Vtb_rls_top
```

Substitute any other testbench name. Each run takes well under a second.

## Where this design departs from its source

- **Throughput.** One sample per 8 clocks, not one per clock (see above).
- **Ports.** It adds `in_valid`/`ready`, y and the weights.
- **Synthesis targets.** The original design quotes a 250 MHz clock, at most
  200 cells and at most 10 mW in 130 nm. None of these can be judged from
  RTL alone. The fully parallel datapath shown here, with a single-cycle
  64-bit divider in S3 and 64-bit multiply-accumulate chains in S1, will
  probably not close timing at 250 MHz without retiming or a multi-cycle
  divider. It is also far above 200 cells; the original design's own
  reported area of 1.87 mm² is itself far above that.
- **Left to this design.** λ, P(0), the matrix word format, the rounding
  details, saturation, the reset style and the split of the steps into
  stages.
