`timescale 1ns/1ps
// tb_xiao_stats: statistical run of the single-ray Xiao generator, after the
// document's evaluation of its outputs: ensemble averages over 20 channel
// realisations, M = 8, sample spacing with fd * tau = 0.025.
//
// Each realisation draws new psi_n (a `reseed` pulse) and random theta and
// phi, then sweeps t over 400 samples spaced 262 LSB (125 us; fd = 200 Hz).
// The time- and ensemble-averaged auto-correlations of X_c and X_s and
// their cross-correlation are compared with the ideal J0(2 pi fd tau) and 0:
// the mean power must be within 0.6..1.4 and the mean absolute deviation
// over the first 40 lags below 0.1 (the model has only 8 sinusoids and the
// phases come from a short PN sequence, so the match is loose). The real
// part of E[X(t) X*(t + tau)] is compared with 2 J0 (mean deviation below
// 0.2), and the envelope |X| with the Rayleigh distribution
// P(|X| < x) = 1 - exp(-x^2 / 2) at x = 0.5, 1, 1.5, 2 (within 0.1).
module tb_xiao_stats;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int REAL = 20, NS = 400, LAGS = 40, STEP = 262;

  logic   clk = 1'b0, reset = 1'b1, reseed = 1'b0;
  fd_t    fd = 12'd200;
  time_t  t = '0;
  angle_t theta = '0, phi = '0;
  coef_t  re, im;
  logic   valid;
  int checks = 0, failures = 0;

  xiao_single dut (.clk, .reset, .reseed, .fd, .t, .theta, .phi, .re, .im, .valid);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  real xc [NS], xs [NS];
  real rcc [LAGS], rss [LAGS], rcs [LAGS];
  int  env_below [4];                            // |X| below 0.5, 1.0, 1.5, 2.0

  initial begin
    real dcc, dss, dcs, dxx;
    for (int m = 0; m < LAGS; m++) begin rcc[m] = 0; rss[m] = 0; rcs[m] = 0; end
    for (int i = 0; i < 4; i++) env_below[i] = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int r = 0; r < REAL; r++) begin
      // a new realisation: new psi_n, theta, phi
      theta  = angle_t'($urandom_range(0, 11519)) - angle_t'(5760);
      phi    = angle_t'($urandom_range(0, 11519)) - angle_t'(5760);
      reseed = 1'b1;
      repeat (1 + r * 37) @(negedge clk);        // vary the PN state used
      reseed = 1'b0;
      for (int k = 0; k < NS + 5; k++) begin
        t = time_t'(k * STEP);
        @(negedge clk);
        if (k >= 5) begin                        // latency 5: sample of k - 5
          xc[k-5] = real'(re) / 2048.0;
          xs[k-5] = real'(im) / 2048.0;
        end
      end
      for (int k = 0; k < NS; k++)
        for (int i = 0; i < 4; i++)
          if (xc[k] * xc[k] + xs[k] * xs[k] < 0.25 * real'((i + 1) * (i + 1))) env_below[i]++;
      for (int m = 0; m < LAGS; m++)
        for (int k = 0; k + m < NS; k++) begin
          rcc[m] += xc[k] * xc[k+m] / real'((NS - m) * REAL);
          rss[m] += xs[k] * xs[k+m] / real'((NS - m) * REAL);
          rcs[m] += xc[k] * xs[k+m] / real'((NS - m) * REAL);
        end
    end
    dcc = 0; dss = 0; dcs = 0; dxx = 0;
    for (int m = 0; m < LAGS; m++) begin
      real j0;
      j0 = bessel_j0(2.0 * PI * 0.025 * real'(m));
      dcc += absr(rcc[m] - j0) / LAGS;
      dss += absr(rss[m] - j0) / LAGS;
      dcs += absr(rcs[m]) / LAGS;
      dxx += absr(rcc[m] + rss[m] - 2.0 * j0) / LAGS;  // Re E[X(t) X*(t+tau)]
      if (m % 8 == 0)
        $display("lag %2d  J0 %7.3f  Rcc %7.3f  Rss %7.3f  Rcs %7.3f", m, j0, rcc[m], rss[m], rcs[m]);
    end
    $display("mean |deviation|: Rcc %0.3f Rss %0.3f Rcs %0.3f", dcc, dss, dcs);
    checks += 3;
    if (rcc[0] < 0.6 || rcc[0] > 1.4 || rss[0] < 0.6 || rss[0] > 1.4) begin
      failures++;
      $display("FAIL power %f %f", rcc[0], rss[0]);
    end
    if (dcc > 0.1 || dss > 0.1) begin failures++; $display("FAIL auto-correlation"); end
    if (dcs > 0.1) begin failures++; $display("FAIL cross-correlation"); end
    $display("mean |Re R_XX - 2 J0| %0.3f", dxx);
    checks++;
    if (dxx > 0.2) begin failures++; $display("FAIL R_XX"); end
    // envelope: Rayleigh with E|X|^2 = 2, P(|X| < x) = 1 - exp(-x^2 / 2)
    for (int i = 0; i < 4; i++) begin
      real x, emp, ideal;
      x     = 0.5 * real'(i + 1);
      emp   = real'(env_below[i]) / real'(NS * REAL);
      ideal = 1.0 - $exp(-x * x / 2.0);
      $display("P(|X| < %0.1f): %0.3f, Rayleigh %0.3f", x, emp, ideal);
      checks++;
      if (absr(emp - ideal) > 0.1) begin failures++; $display("FAIL envelope distribution"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
