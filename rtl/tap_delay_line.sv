// tap_delay_line: the input vector x(n) = [x(n), x(n-1), ..., x(n-N+1)] of an
// N-tap FIR filter.
//
// On each clock with shift_en high the new sample enters x_vec[0] and every
// other tap moves one place down the line; the oldest sample is dropped.
// x_vec is a register output, valid the clock after the shift. The number of
// taps is the filter order. Clearing the taps on reset is this design's
// choice, so that the first iterations see a zero history.
module tap_delay_line #(
  parameter int unsigned N  = rls_pkg::N_TAPS,
  parameter int unsigned DW = rls_pkg::D_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic signed [DW-1:0] x_in,
  output logic signed [DW-1:0] x_vec [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) x_vec[i] <= '0;
    end else if (shift_en) begin
      x_vec[0] <= x_in;
      for (int i = 1; i < N; i++) x_vec[i] <= x_vec[i-1];
    end
  end

endmodule
