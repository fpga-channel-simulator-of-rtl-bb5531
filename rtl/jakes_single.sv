// jakes_single: single-ray Rayleigh fading coefficient generator after
// Jakes' sum-of-sinusoids model,
//     u_c(t) = 2/sqrt(N) * sum_{n=0..M} a_n cos(w_n t)
//     u_s(t) = 2/sqrt(N) * sum_{n=0..M} b_n cos(w_n t),   N = 4M + 2
//     a_0 = sqrt2 cos(pi/4), a_n = 2 cos(pi n / M)
//     b_0 = sqrt2 sin(pi/4), b_n = 2 sin(pi n / M)
//     w_0 = w_d,             w_n = w_d cos(2 pi n / N)
// with N = 34 (M = 8) as in the document. u_c is the real part and u_s the
// imaginary part of the coefficient. The model is deterministic: the same
// (fd, t) always gives the same coefficient.
//
// How it works: all M+1 sinusoids are evaluated in parallel, each by a
// Doppler-phase stage (doppler_phase, with the constant cos(2 pi n / N))
// followed by a look-up in the 720-entry cosine table (trig_lut720). The
// weights 2/sqrt(N) a_n and 2/sqrt(N) b_n are constants with 15 fraction
// bits, computed at elaboration. The full parallel layout, one coefficient
// per clock, matches the document's rate of over 100 M coefficients per
// second; the pipeline split is this design's choice.
//
// Interface: fd (Hz) and t (2^-21 s per LSB) are taken every clock;
// re/im (coef_t, 4 integer and 11 fraction bits) appear
// later (LATENCY = 5 clock edges: input register, phase, table,
// weighting, sum), and `valid` marks outputs computed from inputs taken after reset
// (synchronous, active high).
module jakes_single
  import rf_pkg::*;
#(
  parameter int M = 8
) (
  input  logic  clk,
  input  logic  reset,
  input  fd_t   fd,
  input  time_t t,
  output coef_t re,
  output coef_t im,
  output logic  valid
);

  localparam int    N       = 4 * M + 2;
  localparam int    LATENCY = 5;
  localparam int    WFRAC   = 15;
  localparam real   PI      = 3.14159265358979323846;
  localparam int    PROD_W  = TRIG_W + 17;
  localparam int    SUM_W   = PROD_W + $clog2(M + 1) + 1;

  // cos(2 pi n / N) in trig_t, and the output weights in Q.15
  function automatic trig_t freq_coef(int n);
    return trig_t'(fix_const((n == 0) ? 1.0 : $cos(2.0 * PI * real'(n) / real'(N)), TRIG_FRAC));
  endfunction
  function automatic logic signed [16:0] weight_a(int n);
    real a = (n == 0) ? $sqrt(2.0) * $cos(PI / 4.0) : 2.0 * $cos(PI * real'(n) / real'(M));
    return 17'(fix_const(2.0 / $sqrt(real'(N)) * a, WFRAC));
  endfunction
  function automatic logic signed [16:0] weight_b(int n);
    real b = (n == 0) ? $sqrt(2.0) * $sin(PI / 4.0) : 2.0 * $sin(PI * real'(n) / real'(M));
    return 17'(fix_const(2.0 / $sqrt(real'(N)) * b, WFRAC));
  endfunction

  fd_t   fd0;
  time_t t0;
  always_ff @(posedge clk) begin
    fd0 <= fd;
    t0  <= t;
  end

  trig_t cos_w [M+1];
  logic signed [PROD_W-1:0] pa [M+1];
  logic signed [PROD_W-1:0] pb [M+1];

  for (genvar n = 0; n <= M; n++) begin : g_sin
    angle_t phase;
    trig_t  unused_sin;
    // stage 1 (after the input register): Doppler phase, stage 2: cosine
    doppler_phase u_phase (.clk, .fd(fd0), .t(t0), .c(freq_coef(n)), .phi('0), .phase(phase));
    trig_lut720   u_lut   (.clk, .angle(phase), .cos_o(cos_w[n]), .sin_o(unused_sin));
    // stage 3: weighting
    always_ff @(posedge clk) begin
      pa[n] <= cos_w[n] * weight_a(n);
      pb[n] <= cos_w[n] * weight_b(n);
    end
  end

  // stage 4: sum of the M+1 weighted sinusoids, rescaled to coef_t
  logic signed [SUM_W-1:0] sum_a, sum_b;
  always_comb begin
    sum_a = '0;
    sum_b = '0;
    for (int n = 0; n <= M; n++) begin
      sum_a = sum_a + SUM_W'(pa[n]);
      sum_b = sum_b + SUM_W'(pb[n]);
    end
  end

  localparam int SHIFT = TRIG_FRAC + WFRAC - COEF_FRAC;
  always_ff @(posedge clk) begin
    re <= COEF_W'(sum_a >>> SHIFT);
    im <= COEF_W'(sum_b >>> SHIFT);
  end

  // valid: a shift register of the reset history, LATENCY deep
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (reset) vpipe <= '0;
    else       vpipe <= {vpipe[LATENCY-2:0], 1'b1};
  end
  assign valid = vpipe[LATENCY-1];

endmodule
