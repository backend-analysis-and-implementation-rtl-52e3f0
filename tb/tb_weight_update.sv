// tb_weight_update: applies random gains and errors with a random enable
// and tracks the weights with a model of w += round(k e); checks the reset
// value and that the weights hold while en is low.
module tb_weight_update;
  import tb_fx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [31:0] k [N];
  logic signed [15:0] e = '0;
  logic signed [15:0] w [N];
  longint model [N];
  int checks = 0, failures = 0, holds = 0;

  weight_update #(.N(N), .DW(16), .PW(32), .PFRAC(20)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (k[i]) k[i] = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      e  = 16'(rand_bits(14));
      foreach (k[i]) k[i] = 32'(rand_bits(22));
      @(posedge clk);
      if (en) begin
        foreach (model[i]) model[i] = sat(model[i] + rnd(longint'(k[i]) * longint'(e), 20), 16);
      end else holds++;
      #1;
      foreach (model[i]) begin
        checks++;
        if (longint'(w[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d w[%0d]=%0d expected %0d", t, i, w[i], model[i]);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
