// pmatrix_update: storage and update of the N x N inverse correlation
// matrix, P(n) = (1/lambda) * (P(n-1) - k(n) [x^T(n) P(n-1)]).
//
// The matrix is held in registers (Q(PFRAC)) so that all N*N entries update
// in parallel. The update takes two clocks:
//   en_sub   : Pd[i][j] <= P[i][j] - round(k[i] * z[j])     (z = x^T P)
//   en_scale : P[i][j]  <= round(Pd[i][j] * (1/lambda))
// Both steps round to nearest and saturate to PW bits. 1/lambda is a
// constant, round(2^(2*PFRAC) / LAMBDA_Q), worked out at elaboration, so the
// division by lambda is a multiplication. Reset loads P(0) = P_INIT * I;
// the value of P(0) is this design's choice.
module pmatrix_update #(
  parameter int unsigned N        = rls_pkg::N_TAPS,
  parameter int unsigned PW       = rls_pkg::P_W,
  parameter int unsigned PFRAC    = rls_pkg::P_FRAC,
  parameter longint      LAMBDA_Q = rls_pkg::LAMBDA_Q_DEF,
  parameter longint      P_INIT_Q = rls_pkg::P_INIT_Q_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_sub,
  input  logic                 en_scale,
  input  logic signed [PW-1:0] k [N],
  input  logic signed [PW-1:0] z [N],
  output logic signed [PW-1:0] p [N][N]
);
  import rls_pkg::*;

  localparam longint LAMBDA_INV_Q = ((64'sd1 <<< (2 * PFRAC)) + (LAMBDA_Q / 2)) / LAMBDA_Q;

  logic signed [PW-1:0] pd      [N][N];
  logic signed [PW-1:0] pd_next [N][N];
  logic signed [PW-1:0] p_next  [N][N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        pd_next[i][j] = PW'(saturate(64'(p[i][j]) -
                                     round_shift(64'(k[i]) * 64'(z[j]), PFRAC), PW));
        p_next[i][j]  = PW'(saturate(round_shift(64'(pd[i][j]) * LAMBDA_INV_Q, PFRAC), PW));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          p[i][j]  <= (i == j) ? PW'(P_INIT_Q) : '0;
          pd[i][j] <= '0;
        end
    end else begin
      if (en_sub)   pd <= pd_next;
      if (en_scale) p  <= p_next;
    end
  end

endmodule
