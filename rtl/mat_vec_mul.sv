// mat_vec_mul: product of an N x N matrix and an N-vector.
//
// TRANSPOSE = 0 gives r = M v      (r[i] = sum_j m[i][j] v[j]), the
//                                   intermediate gain vector u = P x.
// TRANSPOSE = 1 gives r = v^T M    (r[j] = sum_i v[i] m[i][j]), the row vector
//                                   x^T P of the matrix update.
// Each of the N sums is formed in 64 bits from full-precision products, then
// shifted right by SHIFT with round-to-nearest and saturated to OW bits.
// With P in Q11.20 and x in Q3.12, SHIFT = 12 keeps the result in Q11.20.
// Combinational, N*N multipliers; the caller registers the result.
module mat_vec_mul #(
  parameter int unsigned N         = rls_pkg::N_TAPS,
  parameter int unsigned MW        = rls_pkg::P_W,
  parameter int unsigned VW        = rls_pkg::D_W,
  parameter int unsigned SHIFT     = rls_pkg::D_FRAC,
  parameter int unsigned OW        = rls_pkg::P_W,
  parameter bit          TRANSPOSE = 1'b0
) (
  input  logic signed [MW-1:0] m [N][N],
  input  logic signed [VW-1:0] v [N],
  output logic signed [OW-1:0] r [N]
);
  import rls_pkg::*;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [63:0] acc;
      acc = '0;
      for (int j = 0; j < N; j++) begin
        if (TRANSPOSE) acc += 64'(m[j][i]) * 64'(v[j]);
        else           acc += 64'(m[i][j]) * 64'(v[j]);
      end
      r[i] = OW'(saturate(round_shift(acc, SHIFT), OW));
    end
  end

endmodule
