// tb_gain_reciprocal: 1 / (lambda + xu) in Q11.20 for denominators from
// lambda up to the top of the range, plus the guarded cases (denominator
// zero, negative, or so small the reciprocal overflows).
module tb_gain_reciprocal;
  import tb_fx_pkg::*;
  localparam longint LQ = 1038090;   // 0.99 in Q20
  logic signed [31:0] xu, inv;
  int checks = 0, failures = 0, guarded = 0;

  gain_reciprocal #(.PW(32), .PFRAC(20), .LAMBDA_Q(LQ)) dut (.xu(xu), .inv(inv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint den, ex;
      case (t)
        0: xu = 32'sd0;                       // inv = 1/0.99
        1: xu = 32'(-LQ);                     // den = 0
        2: xu = 32'(-LQ - 1000);              // den < 0
        3: xu = 32'(-LQ + 100);               // den tiny: overflow
        4: xu = 32'sh7fffffff;
        5: xu = 32'(1 << 20);                 // den = 1.99
        default: xu = (t % 2 != 0) ? 32'($urandom % (1 << 24)) : 32'($urandom & 32'h3fffffff);
      endcase
      #1;
      den = longint'(xu) + LQ;
      if (den <= 0) begin
        ex = 64'sd2147483647;
        guarded++;
      end else begin
        ex = rdiv(longint'(1) << 40, den);
        if (ex > 2147483647) begin ex = 2147483647; guarded++; end
      end
      checks++;
      if (longint'(inv) != ex) begin
        failures++;
        if (failures < 10) $display("xu=%0d inv=%0d expected %0d", xu, inv, ex);
      end
      if (t == 0) begin
        checks++;   // 2^40 / 1038090 = 1059168.4 -> 1059168
        if (inv != 32'sd1059168) begin failures++; $display("1/0.99 = %0d", inv); end
      end
    end
    checks++;
    if (guarded < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
