// gain_reciprocal: inv = 1 / (lambda + x^T u), the scalar of the gain vector.
//
// The forgetting factor lambda (LAMBDA_Q, in Q(PFRAC)) is added to x^T u
// (also Q(PFRAC)) and the reciprocal is formed with a combinational divider:
// inv = round(2^(2*PFRAC) / den), again in Q(PFRAC). In exact arithmetic
// den >= lambda > 0; should rounding drive it to zero or below, or so small
// that the reciprocal overflows, the largest positive value is returned.
// The single-cycle divider is this design's choice; the caller registers the
// result.
module gain_reciprocal #(
  parameter int unsigned PW       = rls_pkg::P_W,
  parameter int unsigned PFRAC    = rls_pkg::P_FRAC,
  parameter longint      LAMBDA_Q = rls_pkg::LAMBDA_Q_DEF
) (
  input  logic signed [PW-1:0] xu,
  output logic signed [PW-1:0] inv
);
  import rls_pkg::*;

  localparam logic signed [63:0] ONE2  = 64'sd1 <<< (2 * PFRAC);
  localparam logic signed [63:0] INVMAX = (64'sd1 <<< (PW - 1)) - 64'sd1;

  logic signed [63:0] den;
  logic signed [63:0] quo;

  always_comb begin
    den = 64'(xu) + LAMBDA_Q;
    quo = INVMAX;
    if (den > 0) quo = (ONE2 + (den >>> 1)) / den;
    inv = PW'(saturate(quo, PW));
  end

endmodule
