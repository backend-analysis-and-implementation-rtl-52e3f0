// tb_mat_vec_mul: random matrices and vectors through M v and v^T M; each
// element is compared with an independent model. A non-symmetric matrix
// makes the two orientations differ.
module tb_mat_vec_mul;
  import tb_fx_pkg::*;
  localparam int N = 8;
  logic signed [31:0] m [N][N];
  logic signed [15:0] v [N];
  logic signed [31:0] r [N];
  logic signed [31:0] rt [N];
  int checks = 0, failures = 0;

  mat_vec_mul #(.N(N), .MW(32), .VW(16), .SHIFT(12), .OW(32), .TRANSPOSE(1'b0)) dut  (.m(m), .v(v), .r(r));
  mat_vec_mul #(.N(N), .MW(32), .VW(16), .SHIFT(12), .OW(32), .TRANSPOSE(1'b1)) dutt (.m(m), .v(v), .r(rt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        v[i] = 16'(rand_bits(16));
        for (int j = 0; j < N; j++) m[i][j] = 32'(rand_bits((t % 4 == 0) ? 32 : 26));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        longint acc, acct, e, et;
        acc = 0; acct = 0;
        for (int j = 0; j < N; j++) begin
          acc  += longint'(m[i][j]) * longint'(v[j]);
          acct += longint'(m[j][i]) * longint'(v[j]);
        end
        e  = sat(rnd(acc, 12), 32);
        et = sat(rnd(acct, 12), 32);
        checks += 2;
        if (longint'(r[i]) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d r[%0d]=%0d expected %0d", t, i, r[i], e);
        end
        if (longint'(rt[i]) != et) begin
          failures++;
          if (failures < 10) $display("t=%0d rt[%0d]=%0d expected %0d", t, i, rt[i], et);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
