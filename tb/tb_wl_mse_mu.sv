// Convergence experiment: mean-square error against iteration for the
// 4-tap filter at three convergence factors, mu = 2^-3, 2^-4 and 2^-5, side
// by side (three filter instances differing only in MU_SHIFT).
//
// Each trial resets the filters (all partial products zero) and runs 600
// iterations of system identification: white, full-scale 8-bit input, and
// d(k) the output of a fixed 4-tap FIR h = [0.5, -0.25, 0.15, 0.1]. The
// squared error of every iteration is averaged over 40 trials. Checks:
// every output equals the reference model bit for bit; each curve ends below
// 2% of its starting MSE; and the iterations needed to fall below 10% of the
// start grow as mu shrinks. The averaged curves are printed (as fractions
// of full scale squared).
module tb_wl_mse_mu;
  `include "da_lms_model.svh"

  localparam int B = 8, TRIALS = 40, ITER = 600, NMU = 3;
  localparam int MU [NMU] = '{3, 4, 5};
  localparam real H [4] = '{0.5, -0.25, 0.15, 0.1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [B-1:0] s_in = '0, d_in = '0;
  logic signed [B-1:0] y_out [NMU];
  logic [NMU-1:0] sc;
  int checks = 0, failures = 0;
  real mse [NMU][ITER];

  for (genvar g = 0; g < NMU; g++) begin : g_mu
    da_lms_filter #(.MU_SHIFT(MU[g])) dut (
      .clk, .rst_n, .s_in, .d_in, .y_out(y_out[g]), .sc(sc[g])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (TRIALS * (ITER * 18 + 40)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    da_lms_model m [NMU];
    int hs [4];
    int t10 [NMU];
    foreach (mse[g, i]) mse[g][i] = 0.0;
    for (int tr = 0; tr < TRIALS; tr++) begin
      rst_n = 1'b0;
      foreach (hs[j]) hs[j] = 0;
      for (int g = 0; g < NMU; g++) m[g] = new(B, 4, 20, 17, MU[g]);
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int k = 0; k < ITER; k++) begin
        int s, d;
        real acc;
        s = $urandom_range(0, 255) - 128;
        for (int j = 3; j > 0; j--) hs[j] = hs[j-1];
        hs[0] = s;
        acc = 0.0;
        foreach (hs[j]) acc += H[j] * real'(hs[j]);
        d = $rtoi(acc + ((acc < 0) ? -0.5 : 0.5));
        d = (d > 127) ? 127 : (d < -128) ? -128 : d;
        s_in = B'(s);
        d_in = B'(d);
        do @(posedge clk); while (!sc[0]);
        @(negedge clk);
        for (int g = 0; g < NMU; g++) begin
          int y_ref;
          y_ref = m[g].run(s, d);
          check(int'(y_out[g]) == y_ref,
                $sformatf("mu=2^-%0d trial %0d iter %0d: y %0d exp %0d", MU[g], tr, k, y_out[g], y_ref));
          mse[g][k] += real'((d - y_ref) ** 2) / (16384.0 * TRIALS);
        end
      end
    end
    $display("iteration   mu=2^-3    mu=2^-4    mu=2^-5");
    for (int k = 0; k < ITER; k += 25)
      $display("%9d  %9.5f  %9.5f  %9.5f", k, mse[0][k], mse[1][k], mse[2][k]);
    for (int g = 0; g < NMU; g++) begin
      real start, tail;
      start = 0.0; tail = 0.0;
      for (int k = 0; k < 5; k++) start += mse[g][k] / 5.0;
      for (int k = ITER - 50; k < ITER; k++) tail += mse[g][k] / 50.0;
      t10[g] = ITER;
      for (int k = ITER - 1; k >= 0; k--) begin
        real w;
        int  lo;
        w = 0.0;
        lo = (k >= 4) ? k - 4 : 0;
        for (int q = lo; q <= k; q++) w += mse[g][q] / real'(k - lo + 1);
        if (w >= 0.1 * start) break;
        t10[g] = k;
      end
      $display("mu=2^-%0d: start MSE %.4f, final MSE %.6f, below 10%% from iteration %0d",
               MU[g], start, tail, t10[g]);
      check(tail < 0.02 * start, $sformatf("mu=2^-%0d did not converge", MU[g]));
    end
    check(t10[0] <= t10[1] && t10[1] <= t10[2], "convergence time does not grow as mu shrinks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
