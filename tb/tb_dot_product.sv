// tb_dot_product: random and extreme vectors through both configurations
// the filter uses (Q3.12 x Q3.12 -> Q3.12, and Q3.12 x Q11.20 -> Q11.20);
// every result is compared with an independent round-and-saturate model.
module tb_dot_product;
  import tb_fx_pkg::*;
  localparam int N = 8;
  logic signed [15:0] a [N];
  logic signed [15:0] b [N];
  logic signed [31:0] b2 [N];
  logic signed [15:0] y;
  logic signed [31:0] y2;
  int checks = 0, failures = 0, sat_seen = 0;

  dot_product #(.N(N), .AW(16), .BW(16), .SHIFT(12), .OW(16)) dut (.a(a), .b(b), .y(y));
  dot_product #(.N(N), .AW(16), .BW(32), .SHIFT(12), .OW(32)) dut2 (.a(a), .b(b2), .y(y2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint acc, acc2, e1, e2;
      for (int i = 0; i < N; i++) begin
        if (t < 20) begin
          a[i] = (t % 2 != 0) ? 16'sh7fff : 16'sh8000;
          b[i] = 16'sh7fff;
          b2[i] = 32'sh7fffffff;
        end else begin
          a[i] = 16'(rand_bits((t % 3 == 0) ? 16 : 13));
          b[i] = 16'(rand_bits((t % 3 == 0) ? 16 : 13));
          b2[i] = 32'(rand_bits((t % 5 == 0) ? 32 : 24));
        end
      end
      #1;
      acc = 0; acc2 = 0;
      for (int i = 0; i < N; i++) begin
        acc  += longint'(a[i]) * longint'(b[i]);
        acc2 += longint'(a[i]) * longint'(b2[i]);
      end
      e1 = sat(rnd(acc, 12), 16);
      e2 = sat(rnd(acc2, 12), 32);
      if (e1 != rnd(acc, 12)) sat_seen++;
      checks += 2;
      if (longint'(y) != e1) begin
        failures++;
        if (failures < 10) $display("t=%0d y=%0d expected %0d", t, y, e1);
      end
      if (longint'(y2) != e2) begin
        failures++;
        if (failures < 10) $display("t=%0d y2=%0d expected %0d", t, y2, e2);
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
