// tb_rls_controller: offers samples at random times, some while the
// controller is busy, and checks the handshake (ready only when idle, a
// sample taken only with ready), the stage sequence S1..S8 on the eight
// clocks after an accept, and that a waiting sample is taken as soon as
// the iteration ends.
module tb_rls_controller;
  import rls_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic ready, accept;
  rls_stage_t stage;
  int checks = 0, failures = 0, accepts = 0, stalls = 0;
  int since;   // clocks since the last accept, -1 when none
  bit took = 0;

  rls_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    since = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] exp_stage;
      @(negedge clk);
      if (took) in_valid = 0;
      else if (!in_valid) in_valid = ($urandom % 3) == 0;   // hold once raised
      took = 0;
      #1;
      exp_stage = (since >= 1 && since <= 8) ? 8'(1 << (since - 1)) : 8'h00;
      checks += 3;
      if (stage != exp_stage) begin
        failures++;
        if (failures < 10) $display("t=%0d since=%0d stage=%b expected %b", t, since, stage, exp_stage);
      end
      if (ready != (since == -1)) begin
        failures++;
        if (failures < 10) $display("t=%0d since=%0d ready=%b", t, since, ready);
      end
      if (accept != (ready && in_valid)) failures++;
      if (in_valid && !ready) stalls++;
      @(posedge clk);
      if (accept) begin
        accepts++;
        since = 1;
        took = 1;
      end else if (since >= 1 && since < 8) since++;
      else since = -1;
    end
    checks += 2;
    if (accepts < 10) failures++;
    if (stalls == 0) failures++;
    $display("accepts=%0d stalls=%0d", accepts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
