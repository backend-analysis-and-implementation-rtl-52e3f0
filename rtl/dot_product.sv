// dot_product: y = sum_i a[i] * b[i], rounded and saturated.
//
// Used twice in the filter: for the filter output y = w^T x (weights times
// input vector, both Q3.12, result Q3.12) and for the term x^T u of the gain
// denominator (input vector Q3.12 times u Q11.20, result Q11.20).
// The N full-precision products are summed in 64 bits, the sum is shifted
// right by SHIFT with round-to-nearest and clamped to OW bits. Purely
// combinational; the caller registers the result. A fully parallel
// multiplier row is this design's choice.
module dot_product #(
  parameter int unsigned N     = rls_pkg::N_TAPS,
  parameter int unsigned AW    = rls_pkg::D_W,
  parameter int unsigned BW    = rls_pkg::D_W,
  parameter int unsigned SHIFT = rls_pkg::D_FRAC,
  parameter int unsigned OW    = rls_pkg::D_W
) (
  input  logic signed [AW-1:0] a [N],
  input  logic signed [BW-1:0] b [N],
  output logic signed [OW-1:0] y
);
  import rls_pkg::*;

  logic signed [63:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) acc += 64'(a[i]) * 64'(b[i]);
    y = OW'(saturate(round_shift(acc, SHIFT), OW));
  end

endmodule
