// tb_tap_delay_line: shifts random samples into the delay line with a
// random enable and compares every tap against a model of the last N
// accepted samples; also checks that reset clears the line.
module tb_tap_delay_line;
  localparam int N = 8, DW = 16;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [DW-1:0] x_in = '0;
  logic signed [DW-1:0] x_vec [N];
  longint model [N];
  int checks = 0, failures = 0;

  tap_delay_line #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (x_vec[i] !== '0) begin failures++; $display("reset tap %0d = %0d", i, x_vec[i]); end
    end
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      shift_en = ($urandom % 4) != 0;
      x_in = DW'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = longint'(x_in);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(x_vec[i]) != model[i]) begin
          failures++;
          $display("t=%0d tap %0d: got %0d expected %0d", t, i, x_vec[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
