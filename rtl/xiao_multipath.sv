// xiao_multipath: K-ray (default six) Rayleigh fading coefficient generator
// after the Xiao model, one uncorrelated channel per path k:
//     X_k(t) = 2/sqrt(M) * sum_{n=1..M} (cos psi_{n,k} + j sin psi_{n,k})
//                             * cos(w_d t cos(alpha_{n,k}) + phi_k)
//     alpha_{n,k} = (2 pi n - pi + theta_k) / (4 M)
//
// How it works: six full parallel generators would not fit the document's
// FPGA, so each path has a single xiao_branch that is time-shared over the M
// terms. A counter J steps n = 1..M, one term per clock; each path's
// accumulator sums the M terms and, when the last one arrives, the scaled
// sum is registered and `valid` pulses. So all K coefficients are renewed
// together every M clocks (12.5 M per path per second at 100 MHz, as the
// document reports). fd, t, theta_k and phi_k are sampled when J = 1 and
// held for the frame.
//
// The random phases psi_{n,k} live in a K x M register file. After reset it
// holds PSI_INIT: for each path psi_{1,k} is the document's initial value
// for that channel; the document gives no psi_{n,k} for n > 1, so those
// default to the single-ray phases psi_2..psi_8 (this design's choice).
// Each path has its own free-running PN generator (seeds PN1..PN6 of the
// document). A pulse on `reseed` is remembered until the next frame start;
// from there a reseed sequence of 2M frames runs, and in its frame 2(n-1)
// psi_{n,k} is reloaded at J = n with 17 bits of generator k (a uniform
// angle in 0..4096 degrees). Loads are therefore 17 generator shifts apart
// and use disjoint bits; loading the M phases from M successive states
// would make them shifted copies of each other and correlate them. A new
// psi_{n,k} is used from the frame after it is loaded, so the phases change
// one at a time over the sequence; a request made during a sequence starts
// another one after it.
//
// Timing: the coefficients of a frame, with their one-clock `valid` pulse,
// are registered on the (M + 3)-th rising edge after the edge that samples
// the frame's inputs at J = 1 (11 edges for M = 8: the branch pipeline, the
// remaining terms and the output register); then one set every M clocks.
// Reset is synchronous and active high.
module xiao_multipath
  import rf_pkg::*;
#(
  parameter int     K = 6,
  parameter int     M = 8,
  parameter angle_t PSI_INIT [K][M] = '{
    '{18'b0_000010010101_01110, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101},
    '{18'b0_000000010111_10101, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101},
    '{18'b0_000001100101_11000, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101},
    '{18'b0_000010000010_10111, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101},
    '{18'b0_000000010101_11011, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101},
    '{18'b0_000011101101_10110, 18'b0_000000010111_10101, 18'b0_000001100101_11000,
      18'b0_000010000010_10111, 18'b0_000000010101_11011, 18'b0_000011101101_10110,
      18'b0_000101001010_10111, 18'b0_000100010101_11101}
  }
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       reseed,
  input  fd_t        fd,
  input  time_t      t,
  input  angle_t     theta [K],
  input  angle_t     phi   [K],
  output cplx_coef_t coef  [K],
  output logic       valid
);

  localparam int BR_LAT  = 4;
  localparam int J_W     = $clog2(M + 1);
  localparam int TERM_W  = 2 * TRIG_W;
  localparam int ACC_W   = TERM_W + $clog2(M) + 1;
  localparam int KFRAC   = 15;
  localparam logic signed [16:0] K_SCALE = 17'(fix_const(2.0 / $sqrt(real'(M)), KFRAC));
  localparam int SHIFT   = 2 * TRIG_FRAC + KFRAC - COEF_FRAC;

  // ---- term counter and frame inputs ------------------------------------
  logic [J_W-1:0] j;
  logic           frame_start, frame_end;
  assign frame_start = (j == J_W'(1));
  assign frame_end   = (j == J_W'(M));
  logic [$clog2(M)-1:0] jidx;            // J - 1, index into the psi file
  assign jidx = ($clog2(M))'(j - J_W'(1));

  always_ff @(posedge clk) begin
    if (reset || frame_end) j <= J_W'(1);
    else                    j <= j + J_W'(1);
  end

  fd_t    fd_hold;
  time_t  t_hold;
  angle_t theta_hold [K];
  angle_t phi_hold   [K];
  always_ff @(posedge clk) begin
    if (frame_start) begin
      fd_hold    <= fd;
      t_hold     <= t;
      theta_hold <= theta;
      phi_hold   <= phi;
    end
  end

  fd_t    fd_use;
  time_t  t_use;
  angle_t theta_use [K];
  angle_t phi_use   [K];
  always_comb begin
    fd_use    = frame_start ? fd    : fd_hold;
    t_use     = frame_start ? t     : t_hold;
    theta_use = frame_start ? theta : theta_hold;
    phi_use   = frame_start ? phi   : phi_hold;
  end

  // ---- reseed control ----------------------------------------------------
  // A reseed runs over 2M frames; in frame 2(n-1) of it, psi_{n,k} is loaded
  // at J = n. Successive loads are thus 2M + 1 = 17 PN shifts apart, so
  // every phase takes 17 fresh bits of the generator.
  localparam int RF_W = $clog2(2 * M);
  logic            reseed_pending, rs_active, start_now, cont_now, eff_active;
  logic [RF_W-1:0] rs_frame, eff_frame;

  always_comb begin
    start_now  = frame_start && !rs_active && (reseed_pending || reseed);
    cont_now   = frame_start && rs_active && (rs_frame != RF_W'(2 * M - 1));
    eff_active = frame_start ? (start_now || cont_now) : rs_active;
    eff_frame  = frame_start ? (start_now ? '0 : rs_frame + RF_W'(1)) : rs_frame;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      reseed_pending <= 1'b0;
      rs_active      <= 1'b0;
      rs_frame       <= '0;
    end else begin
      reseed_pending <= (reseed_pending || reseed) && !start_now;
      if (frame_start) begin
        rs_active <= eff_active;
        rs_frame  <= eff_frame;
      end
    end
  end

  logic psi_write;
  assign psi_write = eff_active && !eff_frame[0] && (RF_W'(jidx) == (eff_frame >> 1));

  // ---- first/last markers travelling with the terms ----------------------
  logic [BR_LAT-1:0] first_p, last_p, live_p;
  always_ff @(posedge clk) begin
    if (reset) begin
      first_p <= '0;
      last_p  <= '0;
      live_p  <= '0;
    end else begin
      first_p <= {first_p[BR_LAT-2:0], frame_start};
      last_p  <= {last_p[BR_LAT-2:0],  frame_end};
      live_p  <= {live_p[BR_LAT-2:0],  1'b1};
    end
  end
  logic term_first, term_last, term_live;
  assign term_first = first_p[BR_LAT-1];
  assign term_last  = last_p[BR_LAT-1];
  assign term_live  = live_p[BR_LAT-1];

  // ---- one time-shared branch per path -----------------------------------
  logic [K-1:0] path_valid;

  for (genvar k = 0; k < K; k++) begin : g_path
    angle_t psi [M];
    logic [23:0] pn_state;
    logic        unused_pn_bit;
    pn_gen #(.N(24), .TAP(5), .SEED(PN_SEED[k % 8])) u_pn (
      .clk, .reset, .en(1'b1), .state(pn_state), .bit_o(unused_pn_bit)
    );

    always_ff @(posedge clk) begin
      if (reset)          psi <= PSI_INIT[k];
      else if (psi_write) psi[jidx] <= {1'b0, pn_state[16:0]};
    end

    logic signed [TERM_W-1:0] tre, tim;
    xiao_branch #(.M(M)) u_branch (
      .clk, .n(j), .fd(fd_use), .t(t_use), .theta(theta_use[k]), .phi(phi_use[k]),
      .psi(psi[jidx]), .re(tre), .im(tim)
    );

    logic signed [ACC_W-1:0]    acc_re, acc_im, tot_re, tot_im;
    logic signed [ACC_W+16:0]   sc_re, sc_im;
    always_comb begin
      tot_re = (term_first ? '0 : acc_re) + ACC_W'(tre);
      tot_im = (term_first ? '0 : acc_im) + ACC_W'(tim);
      sc_re  = tot_re * K_SCALE;
      sc_im  = tot_im * K_SCALE;
    end

    always_ff @(posedge clk) begin
      if (reset) begin
        acc_re        <= '0;
        acc_im        <= '0;
        path_valid[k] <= 1'b0;
      end else begin
        acc_re        <= tot_re;
        acc_im        <= tot_im;
        path_valid[k] <= term_live && term_last;
      end
      if (term_live && term_last) begin
        coef[k].re <= COEF_W'(sc_re >>> SHIFT);
        coef[k].im <= COEF_W'(sc_im >>> SHIFT);
      end
    end
  end

  assign valid = path_valid[0];

  // All paths share the counter, so their valid flags agree.
  always_ff @(posedge clk)
    if (!reset) assert (path_valid == '0 || &path_valid)
      else $error("xiao_multipath: paths out of step");

endmodule
