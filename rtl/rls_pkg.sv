// rls_pkg: shared constants, types and fixed-point helpers of the RLS
// adaptive filter.
//
// Number formats. Samples, the filter output, the error and the tap weights
// are 16-bit two's-complement words with 12 fraction bits (Q3.12): 16 bits per
// sample and a 12-bit operand precision are the figures the design is built
// around. The inverse correlation matrix P and the vectors derived from it
// (u = P x, x^T P, the gain denominator, its reciprocal and the gain k) need
// more range and precision; they use 32-bit words with 20 fraction bits
// (Q11.20), a choice of this design.
//
// Every product is rounded to nearest (add half an LSB, then an arithmetic
// shift) and every narrowing saturates. All intermediate arithmetic fits in
// 64 bits at the default sizes.
package rls_pkg;

  // Default sizes
  localparam int unsigned N_TAPS  = 8;   // filter order
  localparam int unsigned D_W     = 16;  // sample / weight width
  localparam int unsigned D_FRAC  = 12;  // fraction bits of samples / weights
  localparam int unsigned P_W     = 32;  // matrix / gain width
  localparam int unsigned P_FRAC  = 20;  // fraction bits of matrix / gain

  // Forgetting factor 0.99 and initial matrix P(0) = 10 * I, in Q(P_FRAC)
  localparam longint LAMBDA_Q_DEF = 64'sd1038090;   // round(0.99 * 2^20)
  localparam longint P_INIT_Q_DEF = 64'sd10485760;  // 10.0 * 2^20

  // Stages of one filter iteration, one per clock
  typedef enum logic [3:0] {
    ST_IDLE = 4'd0,
    ST_S1   = 4'd1,   // y = w.x, u = P x, z = x^T P
    ST_S2   = 4'd2,   // e = d - y, xu = x.u
    ST_S3   = 4'd3,   // inv = 1 / (lambda + xu)
    ST_S4   = 4'd4,   // k = inv * u
    ST_S5   = 4'd5,   // w += k e
    ST_S6   = 4'd6,   // Pd = P - k z^T
    ST_S7   = 4'd7,   // P = Pd / lambda
    ST_S8   = 4'd8    // output register, iteration done
  } rls_state_e;

  // One-hot stage enables, raised for the clock in which a stage's
  // results are written
  typedef struct packed {
    logic s8;
    logic s7;
    logic s6;
    logic s5;
    logic s4;
    logic s3;
    logic s2;
    logic s1;
  } rls_stage_t;

  // Round to nearest and arithmetic shift right by sh (sh >= 0).
  function automatic logic signed [63:0] round_shift(input logic signed [63:0] v,
                                                     input int unsigned sh);
    logic signed [63:0] half;
    if (sh == 0) return v;
    half = 64'sd1 <<< (sh - 1);
    return (v + half) >>> sh;
  endfunction

  // Clamp v to the range of a signed word of w bits (2 <= w <= 63).
  function automatic logic signed [63:0] saturate(input logic signed [63:0] v,
                                                  input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
