// doppler_phase: phase of one sinusoid of a sum-of-sinusoids fading model.
//
// Computes, in degrees,
//     phase = 360 * frac(fd * t * c) + phi
// where fd is the maximum Doppler shift in Hz, t the time in seconds, c the
// cosine of the arrival angle of this sinusoid (trig_t, in -1..1) and phi an
// initial phase. This is the argument w_d * t * cos(alpha_n) + phi of the
// Jakes and Xiao models written in degrees, the unit of the trigonometric
// table. Taking only the fractional number of Doppler cycles keeps the
// result within one turn before phi is added; phi must lie in
// [-360, +360) degrees so that the sum fits angle_t.
//
// Arithmetic (this design's choice, the document gives only the formula):
// fd * t is exact (33 bits, 21 fraction bits, in cycles); times c it has 31
// fraction bits, of which the top 16 are kept and scaled by 360 degrees.
// The phase error from this is below 0.01 degree, far under the 0.5 degree
// step of the table.
//
// Timing: one register stage, a new input every clock.
module doppler_phase
  import rf_pkg::*;
(
  input  logic   clk,
  input  fd_t    fd,
  input  time_t  t,
  input  trig_t  c,
  input  angle_t phi,
  output angle_t phase
);

  localparam int PROD_FRAC = T_W + TRIG_FRAC;       // 31 fraction bits in cycles
  localparam int KEEP      = 16;                     // fraction bits kept
  localparam int PROD_W    = FD_W + T_W + TRIG_W + 1;

  logic [FD_W+T_W-1:0]        cycles;     // fd * t, unsigned
  logic signed [PROD_W-1:0]   prod;       // fd * t * c
  logic [KEEP-1:0]            frac_cyc;   // fraction of a cycle
  logic [KEEP+15-1:0]         deg_full;   // frac_cyc * 360 * 2^ANGLE_FRAC
  angle_t                     deg;

  always_comb begin
    cycles   = fd * t;
    prod     = $signed({1'b0, cycles}) * c;
    frac_cyc = prod[PROD_FRAC-1 -: KEEP];
    deg_full = frac_cyc * (KEEP+15)'(360 << ANGLE_FRAC);
    deg      = ANGLE_W'(deg_full >> KEEP);
  end

  always_ff @(posedge clk)
    phase <= deg + phi;

endmodule
