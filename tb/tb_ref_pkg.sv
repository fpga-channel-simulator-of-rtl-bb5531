// tb_ref_pkg: reference arithmetic for the testbenches, written directly
// from the model equations with real numbers.
//
// The only hardware detail the references share with the design is the
// documented number formats: angles in 1/32 degree, sine/cosine values with
// 10 fraction bits, and the 0.5-degree cosine table (value floor(cos*1024)
// at the half-degree step at or below the angle). Everything else (the
// Doppler phase, the sums, the weights) is computed in floating point.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real deg_of(logic signed [17:0] a);
    return real'(a) / 32.0;
  endfunction

  // Value of the 720-entry cosine table for an angle in degrees.
  // Rounding of cosines that are exactly 0 or +-0.5 can differ by one LSB
  // between equivalent angles, so users allow one LSB.
  function automatic real tab_cos(real deg);
    real step = $floor(deg * 2.0);           // half-degree steps, toward -inf
    step = step - 720.0 * $floor(step / 720.0);
    return $floor($cos(step * PI / 360.0) * 1024.0) / 1024.0;
  endfunction
  function automatic real tab_sin(real deg);
    real step = $floor(deg * 2.0);
    step = step - 720.0 * $floor(step / 720.0);
    return $floor($sin(step * PI / 360.0) * 1024.0) / 1024.0;
  endfunction

  // 10-fraction-bit rounding of a constant
  function automatic real q10(real x);
    return $floor(x * 1024.0 + 0.5) / 1024.0;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Fractional part (in 0..1)
  function automatic real frac(real x);
    return x - $floor(x);
  endfunction

  // Doppler phase in degrees, fd in Hz, t in LSB of 2^-21 s, c cosine
  function automatic real dop_deg(int unsigned fd, int unsigned t, real c, real phi_deg);
    real cyc = real'(fd) * real'(t) / 2097152.0 * c;
    return $floor(frac(cyc) * 65536.0) / 65536.0 * 360.0 + phi_deg;
  endfunction

  // One step of the 24-stage PN register, written as the recurrence of its
  // output sequence: the new bit equals the bits 24 and 6 steps earlier.
  function automatic logic [23:0] pn_next(logic [23:0] s);
    logic b24 = s[23];   // entered 24 steps ago
    logic b6  = s[5];    // entered 6 steps ago
    return {s[22:0], b24 ^ b6};
  endfunction

  // Xiao model, one ray, with the table's trigonometry
  function automatic void xiao_ref(int unsigned fd, int unsigned t, real theta_deg,
                                   real phi_deg, real psi_deg [8], output real re,
                                   output real im);
    re = 0.0;
    im = 0.0;
    for (int n = 1; n <= 8; n++) begin
      real alpha = (360.0 * n - 180.0 + theta_deg) / 32.0;
      real a_q   = $floor(alpha * 32.0) / 32.0;         // angle_t resolution
      real ca    = tab_cos(a_q);
      real ph    = dop_deg(fd, t, ca, phi_deg);
      real cp    = tab_cos(ph);
      re += tab_cos(psi_deg[n-1]) * cp;
      im += tab_sin(psi_deg[n-1]) * cp;
    end
    re = re * 2.0 / $sqrt(8.0);
    im = im * 2.0 / $sqrt(8.0);
  endfunction

endpackage
