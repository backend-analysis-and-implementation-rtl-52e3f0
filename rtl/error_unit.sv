// error_unit: a-priori estimation error e = d - y.
//
// d is the desired (noisy) signal and y the filter output computed with the
// previous weights; e is both the signal that drives the weight update and
// the filter's error-corrected output. The difference is saturated to DW
// bits (saturation is this design's choice). Combinational.
module error_unit #(
  parameter int unsigned DW = rls_pkg::D_W
) (
  input  logic signed [DW-1:0] d,
  input  logic signed [DW-1:0] y,
  output logic signed [DW-1:0] e
);
  import rls_pkg::*;

  always_comb e = DW'(saturate(64'(d) - 64'(y), DW));

endmodule
