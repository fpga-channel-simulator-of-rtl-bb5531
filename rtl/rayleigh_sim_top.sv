// rayleigh_sim_top: FPGA Rayleigh fading channel-coefficient simulator.
//
// Holds the three generators side by side, each with its own ports:
//   * xiao_multipath - the main design: six uncorrelated Xiao-model fading
//     paths, a complete set of six complex coefficients every 8 clocks;
//   * jakes_single   - single-ray Jakes model (N = 34), one coefficient
//     per clock;
//   * xiao_single    - single-ray Xiao model (M = 8), one coefficient per
//     clock.
// All three share the clock and the synchronous active-high reset; each
// takes its own Doppler shift fd (Hz) and time t (2^-21 s per LSB), so that
// they can be driven independently. The parts of a complete channel
// simulator outside these generators (convolution of the signal with the
// coefficients, noise, host interface) are not part of this module.
module rayleigh_sim_top
  import rf_pkg::*;
#(
  parameter int K = 6,
  parameter int M = 8
) (
  input  logic       clk,
  input  logic       reset,
  // six-ray Xiao generator
  input  logic       mp_reseed,
  input  fd_t        mp_fd,
  input  time_t      mp_t,
  input  angle_t     mp_theta [K],
  input  angle_t     mp_phi   [K],
  output cplx_coef_t mp_coef  [K],
  output logic       mp_valid,
  // single-ray Jakes generator
  input  fd_t        jk_fd,
  input  time_t      jk_t,
  output coef_t      jk_re,
  output coef_t      jk_im,
  output logic       jk_valid,
  // single-ray Xiao generator
  input  logic       xs_reseed,
  input  fd_t        xs_fd,
  input  time_t      xs_t,
  input  angle_t     xs_theta,
  input  angle_t     xs_phi,
  output coef_t      xs_re,
  output coef_t      xs_im,
  output logic       xs_valid
);

  xiao_multipath #(.K(K), .M(M)) u_multipath (
    .clk, .reset, .reseed(mp_reseed), .fd(mp_fd), .t(mp_t),
    .theta(mp_theta), .phi(mp_phi), .coef(mp_coef), .valid(mp_valid)
  );

  jakes_single #(.M(M)) u_jakes (
    .clk, .reset, .fd(jk_fd), .t(jk_t), .re(jk_re), .im(jk_im), .valid(jk_valid)
  );

  xiao_single #(.M(M)) u_xiao (
    .clk, .reset, .reseed(xs_reseed), .fd(xs_fd), .t(xs_t), .theta(xs_theta),
    .phi(xs_phi), .re(xs_re), .im(xs_im), .valid(xs_valid)
  );

endmodule
