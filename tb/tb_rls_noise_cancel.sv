// tb_rls_noise_cancel: adaptive noise cancellation with the RLS filter at
// its default sizes.
//
// The primary input d(n) = s(n) + v(n) is a sine s plus noise v that
// reached the sensor through an unknown 4-tap path g; the reference input
// x(n) is the noise source itself. The filter learns g, so its error output
// e(n) = d(n) - y(n) should approach the clean sine. After a settling period
// the testbench measures the residual power E[(e - s)^2] against the noise
// power E[(d - s)^2]. With lambda = 0.99 the weights keep chasing the sine a
// little (excess error about N(1-lambda)/(1+lambda), some 4 % of the sine's
// power), so about 14 dB is what the algorithm itself can reach; the test
// requires 12 dB, and requires the hardware to stay within 0.005 (error)
// and 0.02 (weights) of a double-precision RLS fed the same samples. Each
// result must also arrive 8 clocks after its sample.
module tb_rls_noise_cancel;
  import tb_fx_pkg::*;

  localparam int N = 8, NSAMP = 600, SETTLE = 200;
  localparam real G [4] = '{0.6, -0.35, 0.2, 0.1};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] x_in = '0, d_in = '0;
  logic ready, out_valid;
  logic signed [15:0] e_out, y_out;
  logic signed [15:0] w_out [N];

  rls_top dut (.*);

  always #2 clk = ~clk;

  int checks = 0, failures = 0;

  // double-precision RLS on the same quantised samples
  real rx [N], rw [N], rp [N][N];

  task automatic real_step(input real xs, input real ds, output real e);
    real u [N], k [N], z [N];
    real y, den;
    for (int i = N - 1; i > 0; i--) rx[i] = rx[i-1];
    rx[0] = xs;
    y = 0.0;
    for (int i = 0; i < N; i++) y += rw[i] * rx[i];
    for (int i = 0; i < N; i++) begin
      u[i] = 0.0; z[i] = 0.0;
      for (int j = 0; j < N; j++) begin
        u[i] += rp[i][j] * rx[j];
        z[i] += rp[j][i] * rx[j];
      end
    end
    den = 0.99;
    for (int i = 0; i < N; i++) den += rx[i] * u[i];
    for (int i = 0; i < N; i++) k[i] = u[i] / den;
    e = ds - y;
    for (int i = 0; i < N; i++) rw[i] += k[i] * e;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) rp[i][j] = (rp[i][j] - k[i] * z[j]) / 0.99;
  endtask

  function automatic real absr(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v [4];
    real s, d, p_noise, p_resid;
    int acc_cyc, cyc;
    real e_dbl, max_ediff;
    foreach (v[i]) v[i] = 0.0;
    for (int i = 0; i < N; i++) begin
      rx[i] = 0.0; rw[i] = 0.0;
      for (int j = 0; j < N; j++) rp[i][j] = (i == j) ? 10.0 : 0.0;
    end
    max_ediff = 0.0;
    p_noise = 0.0;
    p_resid = 0.0;
    cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      longint xq;
      real nd;
      xq = rand_bits(12);                      // noise source, |v| < 0.5
      for (int i = 3; i > 0; i--) v[i] = v[i-1];
      v[0] = real'(xq) / 4096.0;
      s = 0.3 * $sin(2.0 * PI * real'(n) / 37.0);
      nd = 0.0;
      for (int i = 0; i < 4; i++) nd += G[i] * v[i];
      d = s + nd;
      // offer the sample and wait until it is taken
      @(negedge clk);
      x_in = 16'(xq);
      d_in = 16'(sat(longint'($rtoi(d * 4096.0 + (d >= 0 ? 0.5 : -0.5))), 16));
      in_valid = 1;
      real_step(real'(xq) / 4096.0, real'(d_in) / 4096.0, e_dbl);
      while (!ready) begin @(negedge clk); cyc++; end
      @(posedge clk);
      acc_cyc = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) begin @(posedge clk); cyc++; #1; end
      checks++;
      if (cyc - acc_cyc != 8) begin
        failures++;
        $display("sample %0d: latency %0d", n, cyc - acc_cyc);
      end
      if (absr(real'(e_out) / 4096.0 - e_dbl) > max_ediff) max_ediff = absr(real'(e_out) / 4096.0 - e_dbl);
      if (n >= SETTLE) begin
        p_noise += nd * nd;
        p_resid += (real'(e_out) / 4096.0 - s) * (real'(e_out) / 4096.0 - s);
      end
    end
    p_noise /= real'(NSAMP - SETTLE);
    p_resid /= real'(NSAMP - SETTLE);
    $display("noise power %e, residual power %e, suppression %0.1f dB",
             p_noise, p_resid, 10.0 * $log10(p_noise / p_resid));
    $display("largest |e_hw - e_double| = %f", max_ediff);
    checks += 2;
    if (p_resid * 15.85 > p_noise) begin
      failures++;
      $display("less than 12 dB of noise suppression");
    end
    if (max_ediff > 0.005) begin
      failures++;
      $display("hardware error output departs from double precision");
    end
    $write("weights:");
    for (int i = 0; i < N; i++) $write(" %7.4f", real'(w_out[i]) / 4096.0);
    $write("\n");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (absr(real'(w_out[i]) / 4096.0 - rw[i]) > 0.02) begin
        failures++;
        $display("w[%0d] = %f, double precision %f", i, real'(w_out[i]) / 4096.0, rw[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
