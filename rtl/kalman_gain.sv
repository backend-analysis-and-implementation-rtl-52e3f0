// kalman_gain: gain vector k = inv * u.
//
// Multiplies each element of the intermediate vector u = P x by the scalar
// reciprocal inv = 1 / (lambda + x^T u). Both operands and the result are in
// Q(PFRAC); products are rounded to nearest and saturated to PW bits.
// Combinational, N multipliers; the caller registers the result.
module kalman_gain #(
  parameter int unsigned N     = rls_pkg::N_TAPS,
  parameter int unsigned PW    = rls_pkg::P_W,
  parameter int unsigned PFRAC = rls_pkg::P_FRAC
) (
  input  logic signed [PW-1:0] inv,
  input  logic signed [PW-1:0] u [N],
  output logic signed [PW-1:0] k [N]
);
  import rls_pkg::*;

  always_comb begin
    for (int i = 0; i < N; i++)
      k[i] = PW'(saturate(round_shift(64'(inv) * 64'(u[i]), PFRAC), PW));
  end

endmodule
