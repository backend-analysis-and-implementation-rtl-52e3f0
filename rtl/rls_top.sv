// rls_top: recursive-least-squares (RLS) adaptive FIR filter.
//
// For each sample pair (x(n), d(n)) the filter computes, with N taps,
//   y(n)  = w(n-1)^T x(n)                          filter output
//   u(n)  = P(n-1) x(n)                            intermediate gain vector
//   k(n)  = u(n) / (lambda + x(n)^T u(n))          gain vector
//   e(n)  = d(n) - y(n)                            a-priori error (output)
//   w(n)  = w(n-1) + k(n) e(n)                     weight update
//   P(n)  = (P(n-1) - k(n) [x(n)^T P(n-1)]) / lambda   inverse-matrix update
// where P is the inverse of the exponentially weighted input autocorrelation
// matrix and lambda the forgetting factor. In noise cancellation d is the
// noisy signal, x a reference correlated with the noise, and e the cleaned
// output.
//
// Datapath: every vector operation is fully parallel (N multipliers per
// vector, N*N per matrix operation) and each step is registered, giving an
// iteration of 8 clocks (see rls_controller for the stage map). Interface:
// offer x_in/d_in with in_valid; the sample is taken in a clock where ready
// is high. Exactly 8 clocks later out_valid pulses for one clock with the
// error e_out, the output y_out and the updated weights w_out. One sample is
// accepted every 8 clocks at most. The 16-bit Q3.12 sample format, the order
// N = 8 and the 8-clock latency follow the design targets; the Q11.20
// matrix format, lambda = 0.99, P(0) = 10 I, the handshake and the
// asynchronous active-low reset are this design's choices.
module rls_top #(
  parameter int unsigned N        = rls_pkg::N_TAPS,
  parameter int unsigned DW       = rls_pkg::D_W,
  parameter int unsigned DFRAC    = rls_pkg::D_FRAC,
  parameter int unsigned PW       = rls_pkg::P_W,
  parameter int unsigned PFRAC    = rls_pkg::P_FRAC,
  parameter longint      LAMBDA_Q = rls_pkg::LAMBDA_Q_DEF,
  parameter longint      P_INIT_Q = rls_pkg::P_INIT_Q_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 ready,
  output logic                 out_valid,
  output logic signed [DW-1:0] e_out,
  output logic signed [DW-1:0] y_out,
  output logic signed [DW-1:0] w_out [N]
);
  import rls_pkg::*;

  logic       accept;
  rls_stage_t stage;

  // Stage registers
  logic signed [DW-1:0] d_r, y_r, e_r;
  logic signed [PW-1:0] u_r [N];
  logic signed [PW-1:0] z_r [N];
  logic signed [PW-1:0] k_r [N];
  logic signed [PW-1:0] xu_r, inv_r;

  // Combinational results
  logic signed [DW-1:0] x_vec [N];
  logic signed [DW-1:0] w     [N];
  logic signed [PW-1:0] p     [N][N];
  logic signed [DW-1:0] y_c, e_c;
  logic signed [PW-1:0] u_c [N];
  logic signed [PW-1:0] z_c [N];
  logic signed [PW-1:0] k_c [N];
  logic signed [PW-1:0] xu_c, inv_c;

  rls_controller u_ctrl (
    .clk, .rst_n, .in_valid, .ready, .accept, .stage
  );

  tap_delay_line #(.N(N), .DW(DW)) u_taps (
    .clk, .rst_n, .shift_en(accept), .x_in, .x_vec
  );

  // Step 1: filter output with the previous weights
  dot_product #(.N(N), .AW(DW), .BW(DW), .SHIFT(DFRAC), .OW(DW)) u_fir (
    .a(w), .b(x_vec), .y(y_c)
  );

  // Step 2: u = P x and, for step 5, z = x^T P
  mat_vec_mul #(.N(N), .MW(PW), .VW(DW), .SHIFT(DFRAC), .OW(PW), .TRANSPOSE(1'b0)) u_px (
    .m(p), .v(x_vec), .r(u_c)
  );
  mat_vec_mul #(.N(N), .MW(PW), .VW(DW), .SHIFT(DFRAC), .OW(PW), .TRANSPOSE(1'b1)) u_xp (
    .m(p), .v(x_vec), .r(z_c)
  );

  // Step 3: error
  error_unit #(.DW(DW)) u_err (.d(d_r), .y(y_r), .e(e_c));

  // Step 2 (cont.): gain denominator, reciprocal and gain vector
  dot_product #(.N(N), .AW(DW), .BW(PW), .SHIFT(DFRAC), .OW(PW)) u_xu (
    .a(x_vec), .b(u_r), .y(xu_c)
  );
  gain_reciprocal #(.PW(PW), .PFRAC(PFRAC), .LAMBDA_Q(LAMBDA_Q)) u_recip (
    .xu(xu_r), .inv(inv_c)
  );
  kalman_gain #(.N(N), .PW(PW), .PFRAC(PFRAC)) u_gain (
    .inv(inv_r), .u(u_r), .k(k_c)
  );

  // Step 4: weights
  weight_update #(.N(N), .DW(DW), .PW(PW), .PFRAC(PFRAC)) u_wupd (
    .clk, .rst_n, .en(stage.s5), .k(k_r), .e(e_r), .w
  );

  // Step 5: inverse correlation matrix
  pmatrix_update #(.N(N), .PW(PW), .PFRAC(PFRAC), .LAMBDA_Q(LAMBDA_Q), .P_INIT_Q(P_INIT_Q)) u_pupd (
    .clk, .rst_n, .en_sub(stage.s6), .en_scale(stage.s7), .k(k_r), .z(z_r), .p
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_r   <= '0;
      y_r   <= '0;
      e_r   <= '0;
      xu_r  <= '0;
      inv_r <= '0;
      for (int i = 0; i < N; i++) begin
        u_r[i] <= '0;
        z_r[i] <= '0;
        k_r[i] <= '0;
      end
      out_valid <= 1'b0;
      e_out     <= '0;
      y_out     <= '0;
      for (int i = 0; i < N; i++) w_out[i] <= '0;
    end else begin
      if (accept)   d_r <= d_in;
      if (stage.s1) begin
        y_r <= y_c;
        u_r <= u_c;
        z_r <= z_c;
      end
      if (stage.s2) begin
        e_r  <= e_c;
        xu_r <= xu_c;
      end
      if (stage.s3) inv_r <= inv_c;
      if (stage.s4) k_r   <= k_c;
      out_valid <= stage.s8;
      if (stage.s8) begin
        e_out <= e_r;
        y_out <= y_r;
        w_out <= w;
      end
    end
  end

endmodule
