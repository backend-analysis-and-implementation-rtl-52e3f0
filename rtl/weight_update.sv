// weight_update: the tap-weight register of the adaptive filter and its
// update w(n) = w(n-1) + k(n) e(n).
//
// Holds N weights in Q(DFRAC). On a clock with en high each weight grows by
// the product of its gain element k[i] (Q(PFRAC)) and the a-priori error e
// (Q(DFRAC)), rounded back to Q(DFRAC); the sum saturates to DW bits.
// The new weights appear the clock after en. Reset clears the weights,
// which is this design's choice of starting point.
module weight_update #(
  parameter int unsigned N     = rls_pkg::N_TAPS,
  parameter int unsigned DW    = rls_pkg::D_W,
  parameter int unsigned PW    = rls_pkg::P_W,
  parameter int unsigned PFRAC = rls_pkg::P_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [PW-1:0] k [N],
  input  logic signed [DW-1:0] e,
  output logic signed [DW-1:0] w [N]
);
  import rls_pkg::*;

  logic signed [DW-1:0] w_next [N];

  always_comb begin
    for (int i = 0; i < N; i++)
      w_next[i] = DW'(saturate(64'(w[i]) + round_shift(64'(k[i]) * 64'(e), PFRAC), DW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) w[i] <= '0;
    end else if (en) begin
      w <= w_next;
    end
  end

endmodule
