// rf_pkg: number formats and constants shared by the Rayleigh fading
// coefficient generators.
//
// All values are two's complement fixed point:
//   angle_t  18 bits, degrees: sign, 12 integer bits, 5 fraction bits
//            (so 240 degrees is 18'b0_000011110000_00000).
//   trig_t   12 bits, sine/cosine: sign, 1 integer bit, 10 fraction bits.
//   fd_t     12 bits, unsigned maximum Doppler shift in whole Hz.
//   time_t   21 bits, unsigned time in seconds with all 21 bits fraction
//            (one LSB is 2^-21 s, about 0.477 us).
//   coef_t   16 bits, channel coefficient: sign, 4 integer bits, 11
//            fraction bits.
// The angle, trig and coefficient formats and the widths of fd and t follow
// the document; the scaling of t (2^-21 s per LSB) is this design's reading
// of its examples, where t = 10 LSB is quoted as 4.768 us.
package rf_pkg;

  localparam int ANGLE_W    = 18;
  localparam int ANGLE_FRAC = 5;
  localparam int TRIG_W     = 12;
  localparam int TRIG_FRAC  = 10;
  localparam int FD_W       = 12;
  localparam int T_W        = 21;
  localparam int COEF_W     = 16;
  localparam int COEF_FRAC  = 11;

  typedef logic signed [ANGLE_W-1:0] angle_t;
  typedef logic signed [TRIG_W-1:0]  trig_t;
  typedef logic        [FD_W-1:0]    fd_t;
  typedef logic        [T_W-1:0]     time_t;
  typedef logic signed [COEF_W-1:0]  coef_t;

  // One complex channel coefficient.
  typedef struct packed {
    coef_t re;
    coef_t im;
  } cplx_coef_t;


  // Seeds of the eight PN generators, stage 24 (MSB) first.
  localparam logic [23:0] PN_SEED [8] = '{
    24'b100010101110010100100110,
    24'b010111001001110010101101,
    24'b101101000111010110011100,
    24'b101110011010011100100111,
    24'b001010110110101001010100,
    24'b010010111010100111100011,
    24'b111010101101010101011010,
    24'b101011110101010100010101
  };

  // Degrees (real) to angle_t, rounded to the nearest LSB.
  function automatic angle_t deg_to_angle(real deg);
    return angle_t'($rtoi($floor(deg * real'(1 << ANGLE_FRAC) + 0.5)));
  endfunction

  // Fixed-point signed constant: round(x * 2^frac), for elaboration-time use.
  function automatic int fix_const(real x, int frac);
    return $rtoi($floor(x * real'(1 << frac) + 0.5));
  endfunction

endpackage
