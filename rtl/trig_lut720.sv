// trig_lut720: cosine and sine of an angle by direct table look-up.
//
// One period of the cosine is stored as 720 samples, one every 0.5 degree
// (the "LUTs-720 division" the document selects as its trigonometric unit
// because it is fast and needs no multiplier). The input angle is in
// degrees (angle_t: sign, 12 integer, 5 fraction bits) and may be any value
// in -4096..+4096 degrees; it is truncated to a half-degree index and
// reduced modulo 720. The sine is read from the same table a quarter period
// later: sin(x) = cos(x + 270 deg).
//
// Table entry i holds floor(cos(i * pi / 360) * 1024) in trig_t format
// (sign, 1 integer, 10 fraction bits), so cos(240 deg) reads as
// 12'b1101_1111_1111, as in the document's example. The floor rounding and
// the half-degree truncation of the index are this design's choices.
//
// Timing: one clock of latency, a new angle every clock. No reset: the
// outputs are a function of the angle presented one clock earlier.
module trig_lut720
  import rf_pkg::*;
#(
  parameter int LUT_N = 720
) (
  input  logic   clk,
  input  angle_t angle,
  output trig_t  cos_o,
  output trig_t  sin_o
);

  typedef trig_t rom_t [LUT_N];

  function automatic rom_t make_rom();
    rom_t r;
    for (int i = 0; i < LUT_N; i++)
      r[i] = trig_t'($rtoi($floor($cos(real'(i) * 2.0 * 3.14159265358979323846 / real'(LUT_N))
                                  * real'(1 << TRIG_FRAC))));
    return r;
  endfunction

  localparam rom_t ROM = make_rom();
  // Table steps per degree, in angle_t units: shift right by this much.
  localparam int STEP_SHIFT = ANGLE_FRAC - $clog2(LUT_N / 360);
  localparam int IDX_W      = $clog2(LUT_N);

  logic signed [ANGLE_W-STEP_SHIFT-1:0] steps;   // angle in table steps
  logic signed [ANGLE_W-STEP_SHIFT:0]   rem;     // steps mod LUT_N, may be negative
  logic [IDX_W-1:0] idx_cos, idx_sin;

  always_comb begin
    steps = (ANGLE_W-STEP_SHIFT)'(angle >>> STEP_SHIFT);
    rem   = (ANGLE_W-STEP_SHIFT+1)'(steps % LUT_N);
    if (rem < 0) rem = rem + (ANGLE_W-STEP_SHIFT+1)'(LUT_N);
    idx_cos = IDX_W'(rem);
    // sin(x) = cos(x + 3/4 period)
    if (rem >= (ANGLE_W-STEP_SHIFT+1)'(LUT_N / 4))
      idx_sin = IDX_W'(rem - (ANGLE_W-STEP_SHIFT+1)'(LUT_N / 4));
    else
      idx_sin = IDX_W'(rem + (ANGLE_W-STEP_SHIFT+1)'(3 * LUT_N / 4));
  end

  always_ff @(posedge clk) begin
    cos_o <= ROM[idx_cos];
    sin_o <= ROM[idx_sin];
  end

endmodule
