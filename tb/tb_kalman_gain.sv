// tb_kalman_gain: k = inv * u for random scalars and vectors, compared
// element by element with an independent rounding and saturation model.
module tb_kalman_gain;
  import tb_fx_pkg::*;
  localparam int N = 8;
  logic signed [31:0] inv;
  logic signed [31:0] u [N];
  logic signed [31:0] k [N];
  int checks = 0, failures = 0, sat_seen = 0;

  kalman_gain #(.N(N), .PW(32), .PFRAC(20)) dut (.inv(inv), .u(u), .k(k));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      inv = 32'(rand_bits((t % 4 == 0) ? 32 : 22));
      for (int i = 0; i < N; i++) u[i] = 32'(rand_bits((t % 4 == 0) ? 32 : 24));
      #1;
      for (int i = 0; i < N; i++) begin
        longint p, ex;
        p  = rnd(longint'(inv) * longint'(u[i]), 20);
        ex = sat(p, 32);
        if (ex != p) sat_seen++;
        checks++;
        if (longint'(k[i]) != ex) begin
          failures++;
          if (failures < 10) $display("inv=%0d u=%0d k=%0d expected %0d", inv, u[i], k[i], ex);
        end
      end
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
