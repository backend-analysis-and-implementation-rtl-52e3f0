// tb_rls_top: end-to-end test of the RLS filter at its default sizes
// (8 taps, Q3.12 samples, Q11.20 matrix, lambda = 0.99, P(0) = 10 I).
//
// The filter identifies an unknown 8-tap FIR system: x is a random
// reference signal, d the system's response plus a little noise. Each
// iteration is checked three ways:
//  - bit-exact: e, y and all weights against a fixed-point model of the
//    recursion written here independently of the RTL;
//  - timing: out_valid exactly 8 clocks after the sample was taken, a
//    one-clock pulse, ready low while an iteration is in flight;
//  - accuracy: against a double-precision RLS run on the same samples
//    (weights within 0.08 of it at the 20th iteration, the filter's
//    12-bit-fraction accuracy target of 8 %), and against the unknown
//    system itself after convergence.
// Samples are offered with random gaps, and some are offered while the
// filter is busy so that the input waits (stall); both events are counted
// and each must happen.
module tb_rls_top;
  import tb_fx_pkg::*;

  localparam int N = 8, NITER = 400;
  localparam longint LQ = 1038090;          // 0.99 in Q20
  localparam longint PINIT = 10485760;      // 10.0 in Q20
  localparam real LAMBDA = 0.99;
  localparam real H [N] = '{1.0439, 0.3869, 0.1557, 0.1214, -0.1888, -0.4204, -0.0379, -0.2333};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] x_in = '0, d_in = '0;
  logic ready, out_valid;
  logic signed [15:0] e_out, y_out;
  logic signed [15:0] w_out [N];

  rls_top dut (.*);

  always #2 clk = ~clk;   // 250 MHz

  int checks = 0, failures = 0;
  int stalls = 0, accepts = 0, outputs = 0, gaps = 0;

  // fixed-point reference state
  longint fx [N], fw [N], fp [N][N];
  longint linv;
  // double-precision reference state
  real rx [N], rw [N], rp [N][N];
  // true system input history
  real hx [N];

  // expected results, queued at accept
  longint q_cyc [$], q_e [$], q_y [$];
  longint q_w [$];      // N weights per queued result

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one iteration of the fixed-point model; returns e and y
  task automatic fx_step(input longint xs, input longint ds, output longint e, output longint y);
    longint u [N], z [N], k [N], pd [N][N];
    longint acc, xu, den, inv;
    for (int i = N - 1; i > 0; i--) fx[i] = fx[i-1];
    fx[0] = xs;
    acc = 0;
    for (int i = 0; i < N; i++) acc += fw[i] * fx[i];
    y = sat(rnd(acc, 12), 16);
    for (int i = 0; i < N; i++) begin
      longint a1, a2;
      a1 = 0; a2 = 0;
      for (int j = 0; j < N; j++) begin
        a1 += fp[i][j] * fx[j];
        a2 += fp[j][i] * fx[j];
      end
      u[i] = sat(rnd(a1, 12), 32);
      z[i] = sat(rnd(a2, 12), 32);
    end
    e = sat(ds - y, 16);
    acc = 0;
    for (int i = 0; i < N; i++) acc += fx[i] * u[i];
    xu = sat(rnd(acc, 12), 32);
    den = xu + LQ;
    inv = (den > 0) ? sat(rdiv(longint'(1) << 40, den), 32) : 2147483647;
    for (int i = 0; i < N; i++) k[i] = sat(rnd(inv * u[i], 20), 32);
    for (int i = 0; i < N; i++) fw[i] = sat(fw[i] + rnd(k[i] * e, 20), 16);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) pd[i][j] = sat(fp[i][j] - rnd(k[i] * z[j], 20), 32);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) fp[i][j] = sat(rnd(pd[i][j] * linv, 20), 32);
  endtask

  // one iteration of the double-precision RLS
  task automatic real_step(input real xs, input real ds);
    real u [N], k [N], z [N];
    real y, e, den;
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
    den = LAMBDA;
    for (int i = 0; i < N; i++) den += rx[i] * u[i];
    for (int i = 0; i < N; i++) k[i] = u[i] / den;
    e = ds - y;
    for (int i = 0; i < N; i++) rw[i] += k[i] * e;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) rp[i][j] = (rp[i][j] - k[i] * z[j]) / LAMBDA;
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    int offered, gap, iter;
    longint cyc;
    bit drop, will_accept;
    real maxdiff;
    linv = rdiv(longint'(1) << 40, LQ);
    for (int i = 0; i < N; i++) begin
      fx[i] = 0; fw[i] = 0; rx[i] = 0.0; rw[i] = 0.0; hx[i] = 0.0;
      for (int j = 0; j < N; j++) begin
        fp[i][j] = (i == j) ? PINIT : 0;
        rp[i][j] = (i == j) ? 10.0 : 0.0;
      end
    end
    offered = 0; gap = 0; cyc = 0; iter = 0; drop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (outputs < NITER) begin
      @(negedge clk);
      if (drop) begin in_valid = 0; drop = 0; end
      if (!in_valid && offered < NITER) begin
        if (gap > 0) begin
          gap--;
          gaps++;
        end else begin
          real xr, dr, nz;
          longint xq, dq;
          xq = rand_bits(12);                 // |x| < 0.5
          for (int i = N - 1; i > 0; i--) hx[i] = hx[i-1];
          hx[0] = real'(xq) / 4096.0;
          dr = 0.0;
          for (int i = 0; i < N; i++) dr += H[i] * hx[i];
          nz = (real'($urandom % 1001) - 500.0) / 500000.0;   // +-0.001
          dq = sat(longint'($rtoi((dr + nz) * 4096.0 + ((dr + nz) >= 0 ? 0.5 : -0.5))), 16);
          x_in = 16'(xq);
          d_in = 16'(dq);
          in_valid = 1;
          offered++;
          case ($urandom % 4)
            0, 1: gap = 0;                    // next sample offered at once: it waits
            2:    gap = 1 + ($urandom % 3);
            default: gap = 9 + ($urandom % 4);  // arrives after the filter is idle
          endcase
        end
      end
      will_accept = in_valid && ready;
      if (in_valid && !ready) stalls++;
      @(posedge clk);
      cyc++;
      if (will_accept) begin
        longint ee, yy;
        accepts++;
        drop = 1;
        fx_step(longint'(x_in), longint'(d_in), ee, yy);
        real_step(real'(x_in) / 4096.0, real'(d_in) / 4096.0);
        q_cyc.push_back(cyc);
        q_e.push_back(ee);
        q_y.push_back(yy);
        for (int i = 0; i < N; i++) q_w.push_back(fw[i]);
      end
      #1;
      if (out_valid) begin
        longint ac, ee, yy;
        longint ww [N];
        outputs++;
        iter++;
        if (q_cyc.size() == 0) begin
          failures++;
          $display("out_valid without a pending sample at cycle %0d", cyc);
        end else begin
          ac = q_cyc.pop_front();
          ee = q_e.pop_front();
          yy = q_y.pop_front();
          for (int i = 0; i < N; i++) ww[i] = q_w.pop_front();
          checks += 3;
          if (cyc - ac != 8) begin
            failures++;
            $display("iter %0d: latency %0d clocks, expected 8", iter, cyc - ac);
          end
          if (longint'(e_out) != ee) begin
            failures++;
            if (failures < 20) $display("iter %0d: e=%0d expected %0d", iter, e_out, ee);
          end
          if (longint'(y_out) != yy) begin
            failures++;
            if (failures < 20) $display("iter %0d: y=%0d expected %0d", iter, y_out, yy);
          end
          for (int i = 0; i < N; i++) begin
            checks++;
            if (longint'(w_out[i]) != ww[i]) begin
              failures++;
              if (failures < 20) $display("iter %0d: w[%0d]=%0d expected %0d", iter, i, w_out[i], ww[i]);
            end
          end
        end
        if (iter == 20 || iter == NITER) begin
          maxdiff = 0.0;
          for (int i = 0; i < N; i++)
            if (absr(real'(w_out[i]) / 4096.0 - rw[i]) > maxdiff)
              maxdiff = absr(real'(w_out[i]) / 4096.0 - rw[i]);
          $display("iter %0d: max |w_hw - w_double| = %f; y_hw = %f", iter, maxdiff, real'(y_out) / 4096.0);
          $write("  weights:");
          for (int i = 0; i < N; i++) $write(" %7.4f", real'(w_out[i]) / 4096.0);
          $write("\n");
          checks++;
          if (maxdiff > 0.08) begin
            failures++;
            $display("iter %0d: hardware weights depart from double precision by %f", iter, maxdiff);
          end
        end
      end else begin
        // between results: no stray pulse
        checks++;
        if (q_cyc.size() != 0 && ready) begin
          failures++;
          $display("ready high with an iteration in flight at cycle %0d", cyc);
        end
      end
    end
    // convergence to the unknown system
    for (int i = 0; i < N; i++) begin
      checks++;
      if (absr(real'(w_out[i]) / 4096.0 - H[i]) > 0.01) begin
        failures++;
        $display("w[%0d] = %f, system tap %f", i, real'(w_out[i]) / 4096.0, H[i]);
      end
    end
    $display("mechanisms: accepted=%0d results=%0d stalled_cycles=%0d idle_cycles=%0d", accepts, outputs, stalls, gaps);
    checks += 3;
    if (stalls == 0) begin failures++; $display("no sample ever waited"); end
    if (gaps == 0) begin failures++; $display("filter never idle"); end
    if (accepts != NITER) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
