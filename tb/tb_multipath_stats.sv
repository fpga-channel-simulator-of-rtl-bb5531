`timescale 1ns/1ps
// tb_multipath_stats: statistical run of the six-ray generator. Over 60
// realisations (reseed plus random theta_k, phi_k and a random start time),
// 300 output sets each with t spaced 262 LSB (fd = 200 Hz, fd * tau = 0.025), it estimates for
// every path the auto-correlation of the real part against J0(2 pi fd tau)
// and, at lag 0, the correlation between the real parts of every pair of
// paths, which should be near zero for uncorrelated paths.
// A single path is a sum of only eight sinusoids with closely spaced
// frequencies, so its time-averaged statistics over 300 samples scatter
// widely from one realisation to the next; the per-path bounds are loose
// sanity bounds and the tight check is on the average over all six paths.
// Pass: per path, power within 0.4..1.6 and mean |auto-correlation error|
// over 30 lags below 0.35; every |cross-correlation| below 0.25; averaged
// over the paths, power within 0.85..1.15 and mean error below 0.15; the
// envelope |X_k| of all paths pooled within 0.1 of the Rayleigh
// distribution P(|X| < x) = 1 - exp(-x^2 / 2) at x = 0.5, 1, 1.5, 2.
module tb_multipath_stats;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 6, REAL = 60, NS = 300, LAGS = 30, STEP = 262;

  logic       clk = 1'b0, reset = 1'b1, reseed = 1'b0;
  fd_t        fd = 12'd200;
  time_t      t = '0;
  angle_t     theta [K], phi [K];
  cplx_coef_t coef [K];
  logic       valid;
  int checks = 0, failures = 0;

  xiao_multipath dut (.clk, .reset, .reseed, .fd, .t, .theta, .phi, .coef, .valid);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bessel_j0(real x);
    real term = 1.0, sum = 1.0;
    for (int k = 1; k < 60; k++) begin
      term = -term * (x / 2.0) * (x / 2.0) / (real'(k) * real'(k));
      sum += term;
    end
    return sum;
  endfunction

  real x [K][NS];
  int  env_below [4];                            // |X_k| below 0.5, 1.0, 1.5, 2.0
  real racc [K][LAGS];
  real xcor [K][K];
  real ravg [LAGS];


  initial begin
    for (int k = 0; k < K; k++) begin
      for (int m = 0; m < LAGS; m++) racc[k][m] = 0;
      for (int k2 = 0; k2 < K; k2++) xcor[k][k2] = 0;
    end
    for (int k = 0; k < K; k++) begin theta[k] = '0; phi[k] = '0; end
    for (int i = 0; i < 4; i++) env_below[i] = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int r = 0; r < REAL; r++) begin
      int n;
      int unsigned t0;
      for (int k = 0; k < K; k++) begin
        theta[k] = angle_t'($urandom_range(0, 11519)) - angle_t'(5760);
        phi[k]   = angle_t'($urandom_range(0, 11519)) - angle_t'(5760);
      end
      t0 = $urandom_range(0, 1 << 20);
      reseed = 1'b1;
      @(negedge clk);
      reseed = 1'b0;
      repeat (150) @(negedge clk);             // the 16-frame reseed sequence
      n = -2;
      while (n < NS) begin
        @(posedge clk);
        #1;
        if (valid) begin
          if (n >= 0)
            for (int k = 0; k < K; k++) begin
              real xr, xi;
              xr = real'(coef[k].re) / 2048.0;
              xi = real'(coef[k].im) / 2048.0;
              x[k][n] = xr;
              for (int i = 0; i < 4; i++)
                if (xr * xr + xi * xi < 0.25 * real'((i + 1) * (i + 1))) env_below[i]++;
            end
          n++;
        end
        // t for the frame that starts next
        t = time_t'(t0 + (n + 3) * STEP);
      end
      for (int k = 0; k < K; k++) begin
        for (int m = 0; m < LAGS; m++)
          for (int i = 0; i + m < NS; i++)
            racc[k][m] += x[k][i] * x[k][i+m] / real'((NS - m) * REAL);
        for (int k2 = 0; k2 < K; k2++)
          for (int i = 0; i < NS; i++)
            xcor[k][k2] += x[k][i] * x[k2][i] / real'(NS * REAL);
      end
    end
    for (int m = 0; m < LAGS; m++) ravg[m] = 0;
    for (int k = 0; k < K; k++) begin
      real dev;
      dev = 0;
      for (int m = 0; m < LAGS; m++) begin
        dev += absr(racc[k][m] - bessel_j0(2.0 * PI * 0.025 * real'(m))) / LAGS;
        ravg[m] += racc[k][m] / K;
      end
      $display("path %0d: power %0.3f, mean |R - J0| %0.3f", k, racc[k][0], dev);
      checks++;
      if (racc[k][0] < 0.4 || racc[k][0] > 1.6 || dev > 0.35) failures++;
      for (int k2 = 0; k2 < k; k2++) begin
        $display("  xcor(%0d,%0d) = %0.3f", k, k2, xcor[k][k2]);
        checks++;
        if (absr(xcor[k][k2]) > 0.25) failures++;
      end
    end
    begin
      real dev;
      dev = 0;
      for (int m = 0; m < LAGS; m++)
        dev += absr(ravg[m] - bessel_j0(2.0 * PI * 0.025 * real'(m))) / LAGS;
      $display("all paths: power %0.3f, mean |R - J0| %0.3f", ravg[0], dev);
      checks++;
      if (ravg[0] < 0.85 || ravg[0] > 1.15 || dev > 0.15) failures++;
    end
    // envelope of all paths pooled: Rayleigh, P(|X| < x) = 1 - exp(-x^2 / 2)
    for (int i = 0; i < 4; i++) begin
      real xe, emp, ideal;
      xe    = 0.5 * real'(i + 1);
      emp   = real'(env_below[i]) / real'(K * NS * REAL);
      ideal = 1.0 - $exp(-xe * xe / 2.0);
      $display("P(|X| < %0.1f): %0.3f, Rayleigh %0.3f", xe, emp, ideal);
      checks++;
      if (absr(emp - ideal) > 0.1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
