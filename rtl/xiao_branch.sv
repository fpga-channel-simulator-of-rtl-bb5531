// xiao_branch: one term of the Xiao (random-phase Jakes) fading model.
//
// For term index n of an M-term model it produces
//     re = cos(psi) * cos(w_d t cos(alpha_n) + phi)
//     im = sin(psi) * cos(w_d t cos(alpha_n) + phi)
//     alpha_n = (360 n - 180 + theta) / (4 M)   degrees
// which the enclosing generator sums over n = 1..M and scales by 2/sqrt(M).
// All trigonometry uses the 720-entry table (trig_lut720): once for
// cos(alpha_n), once for cos(psi)/sin(psi) and once for the Doppler term, so
// the branch needs only the two products and the Doppler multiply.
//
// Pipeline (this design's arrangement), four clocks from inputs to outputs,
// one new term per clock:
//   1  table look-up of cos(alpha_n) and of cos/sin(psi)
//   2  Doppler phase 360*frac(fd*t*cos(alpha_n)) + phi
//   3  table look-up of the cosine of that phase
//   4  products, registered
// Outputs have 20 fraction bits (trig_t * trig_t).
module xiao_branch
  import rf_pkg::*;
#(
  parameter int M = 8
) (
  input  logic                    clk,
  input  logic [$clog2(M+1)-1:0]  n,       // term index, 1..M
  input  fd_t                     fd,
  input  time_t                   t,
  input  angle_t                  theta,
  input  angle_t                  phi,
  input  angle_t                  psi,
  output logic signed [2*TRIG_W-1:0] re,
  output logic signed [2*TRIG_W-1:0] im
);


  // alpha_n in angle units: ((360 n - 180) * 2^frac + theta) / (4 M)
  logic signed [ANGLE_W+4:0] alpha_num;
  angle_t                    alpha;
  always_comb begin
    alpha_num = (ANGLE_W+5)'(((360 * int'(n)) - 180) << ANGLE_FRAC) + (ANGLE_W+5)'(theta);
    alpha     = ANGLE_W'(alpha_num / (ANGLE_W+5)'(4 * M));
  end

  trig_t cos_alpha, cos_psi1, sin_psi1;
  trig_t unused_sin_alpha;
  trig_lut720 u_lut_alpha (.clk, .angle(alpha), .cos_o(cos_alpha), .sin_o(unused_sin_alpha));
  trig_lut720 u_lut_psi   (.clk, .angle(psi),   .cos_o(cos_psi1),  .sin_o(sin_psi1));

  // Stage 1 delays of the operands of the Doppler phase.
  fd_t    fd1;
  time_t  t1;
  angle_t phi1;
  always_ff @(posedge clk) begin
    fd1  <= fd;
    t1   <= t;
    phi1 <= phi;
  end

  angle_t phase2;
  doppler_phase u_phase (.clk, .fd(fd1), .t(t1), .c(cos_alpha), .phi(phi1), .phase(phase2));

  trig_t cos_psi2, sin_psi2, cos_psi3, sin_psi3;
  always_ff @(posedge clk) begin
    cos_psi2 <= cos_psi1;
    sin_psi2 <= sin_psi1;
    cos_psi3 <= cos_psi2;
    sin_psi3 <= sin_psi2;
  end

  trig_t cos_ph3, unused_sin_ph3;
  trig_lut720 u_lut_dop (.clk, .angle(phase2), .cos_o(cos_ph3), .sin_o(unused_sin_ph3));

  always_ff @(posedge clk) begin
    re <= cos_psi3 * cos_ph3;
    im <= sin_psi3 * cos_ph3;
  end

endmodule
