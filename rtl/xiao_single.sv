// xiao_single: single-ray Rayleigh fading coefficient generator after the
// Xiao model (Jakes' model with random phases),
//     X_c(t) = 2/sqrt(M) * sum_{n=1..M} cos(psi_n) cos(w_d t cos(alpha_n) + phi)
//     X_s(t) = 2/sqrt(M) * sum_{n=1..M} sin(psi_n) cos(w_d t cos(alpha_n) + phi)
//     alpha_n = (2 pi n - pi + theta) / (4 M)
// with M = 8 as in the document. X_c is the real and X_s the imaginary part.
// theta and phi are random phases fixed for a realisation of the channel;
// here they are inputs.
//
// How it works: M xiao_branch units, one per term, run in parallel and their
// outputs are summed and scaled by 2/sqrt(M), giving one coefficient per
// clock (the document reports about 100 M coefficients per second). Each
// psi_n is held in a register; after reset the registers hold the phases the
// document uses for its first run (PSI_INIT). Every psi_n has its own PN
// generator (pn_gen, seeds PN1..PN8 of the document) running freely; a pulse
// on `reseed` loads psi_n with 17 bits of generator n, a uniform angle in
// 0..4096 degrees, as the document describes. That psi is held until the
// next reseed (rather than redrawn every sample) is this design's reading.
//
// Interface: fd, t, theta, phi are taken every clock (phi must be within
// [-360, 360) degrees); re/im follow LATENCY = 5 clocks later. `valid`
// marks outputs computed from inputs taken after reset (synchronous,
// active high). psi changes made by `reseed` apply to inputs taken from the
// next clock on.
module xiao_single
  import rf_pkg::*;
#(
  parameter int     M = 8,
  parameter angle_t PSI_INIT [M] = '{
    18'b0_000010010101_01110,   // 149.4375
    18'b0_000000010111_10101,   //  23.65625
    18'b0_000001100101_11000,   // 101.75
    18'b0_000010000010_10111,   // 130.71875
    18'b0_000000010101_11011,   //  21.84375
    18'b0_000011101101_10110,   // 237.6875
    18'b0_000101001010_10111,   // 330.71875
    18'b0_000100010101_11101    // 277.90625
  }
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   reseed,
  input  fd_t    fd,
  input  time_t  t,
  input  angle_t theta,
  input  angle_t phi,
  output coef_t  re,
  output coef_t  im,
  output logic   valid
);

  localparam int LATENCY = 5;
  localparam int TERM_W  = 2 * TRIG_W;
  localparam int SUM_W   = TERM_W + $clog2(M) + 1;
  localparam int KFRAC   = 15;
  localparam logic signed [16:0] K_SCALE = 17'(fix_const(2.0 / $sqrt(real'(M)), KFRAC));
  localparam int SHIFT   = 2 * TRIG_FRAC + KFRAC - COEF_FRAC;

  angle_t psi [M];
  logic signed [TERM_W-1:0] tre [M];
  logic signed [TERM_W-1:0] tim [M];

  for (genvar n = 0; n < M; n++) begin : g_term
    logic [23:0] pn_state;
    logic        unused_pn_bit;
    pn_gen #(.N(24), .TAP(5), .SEED(PN_SEED[n % 8])) u_pn (
      .clk, .reset, .en(1'b1), .state(pn_state), .bit_o(unused_pn_bit)
    );

    always_ff @(posedge clk) begin
      if (reset)       psi[n] <= PSI_INIT[n];
      else if (reseed) psi[n] <= {1'b0, pn_state[16:0]};
    end

    xiao_branch #(.M(M)) u_branch (
      .clk, .n(($clog2(M+1))'(n + 1)), .fd, .t, .theta, .phi, .psi(psi[n]),
      .re(tre[n]), .im(tim[n])
    );
  end

  logic signed [SUM_W-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int n = 0; n < M; n++) begin
      sum_re = sum_re + SUM_W'(tre[n]);
      sum_im = sum_im + SUM_W'(tim[n]);
    end
  end

  logic signed [SUM_W+16:0] scaled_re, scaled_im;
  always_comb begin
    scaled_re = sum_re * K_SCALE;
    scaled_im = sum_im * K_SCALE;
  end

  always_ff @(posedge clk) begin
    re <= COEF_W'(scaled_re >>> SHIFT);
    im <= COEF_W'(scaled_im >>> SHIFT);
  end

  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (reset) vpipe <= '0;
    else       vpipe <= {vpipe[LATENCY-2:0], 1'b1};
  end
  assign valid = vpipe[LATENCY-1];

endmodule
