// tb_pmatrix_update: checks P(0) = P_INIT * I after reset, then runs random
// two-step updates (subtract k z^T, scale by 1/lambda) and compares all N*N
// entries with a model after each step; the scale step must act only on
// en_scale and the subtraction only on en_sub.
module tb_pmatrix_update;
  import tb_fx_pkg::*;
  localparam int N = 8;
  localparam longint LQ = 1038090, PINIT = 10485760;
  logic clk = 0, rst_n = 0, en_sub = 0, en_scale = 0;
  logic signed [31:0] k [N];
  logic signed [31:0] z [N];
  logic signed [31:0] p [N][N];
  longint mp [N][N];
  longint md [N][N];
  longint linv;
  int checks = 0, failures = 0;

  pmatrix_update #(.N(N), .PW(32), .PFRAC(20), .LAMBDA_Q(LQ), .P_INIT_Q(PINIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int t);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(p[i][j]) != mp[i][j]) begin
          failures++;
          if (failures < 10) $display("t=%0d p[%0d][%0d]=%0d expected %0d", t, i, j, p[i][j], mp[i][j]);
        end
      end
  endtask

  initial begin
    linv = rdiv(longint'(1) << 40, LQ);
    foreach (k[i]) begin k[i] = '0; z[i] = '0; end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        mp[i][j] = (i == j) ? PINIT : 0;
        md[i][j] = 0;
      end
    repeat (2) @(posedge clk);
    #1 compare(-1);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int mode;
      mode = $urandom % 4;   // 0: none, 1: sub, 2: scale, 3: sub then scale
      @(negedge clk);
      foreach (k[i]) begin
        k[i] = 32'(rand_bits(22));
        z[i] = 32'(rand_bits(24));
      end
      en_sub = (mode == 1 || mode == 3);
      en_scale = (mode == 2);
      @(posedge clk);
      if (en_sub)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            md[i][j] = sat(mp[i][j] - rnd(longint'(k[i]) * longint'(z[j]), 20), 32);
      if (en_scale)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            mp[i][j] = sat(rnd(md[i][j] * linv, 20), 32);
      #1 compare(t);
      if (mode == 3) begin
        @(negedge clk);
        en_sub = 0;
        en_scale = 1;
        @(posedge clk);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            mp[i][j] = sat(rnd(md[i][j] * linv, 20), 32);
        #1 compare(t);
      end
      @(negedge clk);
      en_sub = 0;
      en_scale = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
