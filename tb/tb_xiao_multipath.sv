`timescale 1ns/1ps
// tb_xiao_multipath: runs the six-ray Xiao generator with the per-path
// random phases theta_k, phi_k and initial psi_{1,k} of the document's
// six-channel run, fd = 200 Hz first and random (fd, t) later, a new t each
// frame. Every output set is compared with the floating-point model (table
// cosines, tolerance 0.02) for all six paths. A cycle-accurate model of the
// frame counter and of the six PN generators gives the phases loaded by
// `reseed` (pulsed three times, at different points of a frame; each starts
// a 16-frame sequence that reloads psi_{n,k} one at a time). Checks:
// first `valid` 12 clocks after the first sampling clock, then exactly one
// every 8 clocks, and that the six paths differ.
module tb_xiao_multipath;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int  K = 6, M = 8;
  localparam real TOL = 0.02;
  localparam int  FRAMES = 300;

  logic       clk = 1'b0, reset = 1'b1, reseed = 1'b0;
  fd_t        fd;
  time_t      t;
  angle_t     theta [K], phi [K];
  cplx_coef_t coef [K];
  logic       valid;
  int checks = 0, failures = 0;

  xiao_multipath dut (.clk, .reset, .reseed, .fd, .t, .theta, .phi, .coef, .valid);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real TH [K] = '{-20.0, 30.0, 65.0, -40.0, 145.0, -100.0};
  localparam real PH [K] = '{31.0, 22.5, 19.40625, 8.03125, 32.0625, 30.96875};
  localparam real PSI1 [K] = '{149.4375, 23.65625, 101.75, 130.71875, 21.84375, 237.6875};
  localparam real PSI_REST [8] = '{0.0, 23.65625, 101.75, 130.71875, 21.84375, 237.6875,
                                   330.71875, 277.90625};
  localparam logic [23:0] SEEDS [K] = '{
    24'b100010101110010100100110, 24'b010111001001110010101101,
    24'b101101000111010110011100, 24'b101110011010011100100111,
    24'b001010110110101001010100, 24'b010010111010100111100011 };

  real psi_cur [K][8], psi_nxt [K][8];
  logic [23:0] pn [K];
  typedef struct { int unsigned f; int unsigned tt; real psi [K][8]; } frame_t;
  frame_t fq [$];

  initial begin
    frame_t fr;
    bit pending = 0, rs_active = 0;
    int rs_frame = 0;
    int c = 0, first_valid = -1, last_valid = -1, nvalid = 0, ndiff = 0, nres = 0;
    for (int k = 0; k < K; k++) begin
      theta[k] = deg_to_angle(TH[k]);
      phi[k]   = deg_to_angle(PH[k]);
      pn[k]    = SEEDS[k];
      for (int n = 0; n < 8; n++) psi_cur[k][n] = (n == 0) ? PSI1[k] : PSI_REST[n];
      psi_nxt[k] = psi_cur[k];
    end
    fd = '0;
    t  = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // c counts clock edges after reset; edge c has J = c % 8 + 1
    while (c < FRAMES * M + 16) begin
      int j;
      j = c % M + 1;
      if (j == 1) begin
        fd = (c < 100 * M) ? 12'd200 : fd_t'($urandom);
        t  = (c == 0) ? 21'd10 : time_t'($urandom);
        fr.f = fd; fr.tt = t;
        for (int k = 0; k < K; k++) psi_cur[k] = psi_nxt[k];
        fr.psi = psi_cur;
        fq.push_back(fr);
      end
      reseed = (c == 205 || c == 1000 || c == 1403);
      // model of the reseed sequence at this edge
      begin
        bit start_now, cont_now, eff_active;
        int eff_frame;
        start_now  = (j == 1) && !rs_active && (pending || reseed);
        cont_now   = (j == 1) && rs_active && rs_frame != 2 * M - 1;
        eff_active = (j == 1) ? (start_now || cont_now) : rs_active;
        eff_frame  = (j == 1) ? (start_now ? 0 : rs_frame + 1) : rs_frame;
        if (eff_active && eff_frame % 2 == 0 && j - 1 == eff_frame / 2)
          for (int k = 0; k < K; k++) psi_nxt[k][j-1] = real'({1'b0, pn[k][16:0]}) / 32.0;
        if (start_now) nres++;
        pending = (pending || reseed) && !start_now;
        if (j == 1) begin rs_active = eff_active; rs_frame = eff_frame; end
      end
      @(posedge clk);
      for (int k = 0; k < K; k++) pn[k] = pn_next(pn[k]);
      #1;
      if (valid) begin
        frame_t o;
        bit differ = 1;
        nvalid++;
        if (first_valid < 0) first_valid = c;
        else if (c - last_valid != M) begin
          failures++;
          $display("FAIL valid spacing %0d", c - last_valid);
        end
        last_valid = c;
        o = fq.pop_front();
        for (int k = 0; k < K; k++) begin
          real xr, xi;
          xiao_ref(o.f, o.tt, TH[k], PH[k], o.psi[k], xr, xi);
          checks++;
          if (absr(real'(coef[k].re) / 2048.0 - xr) > TOL ||
              absr(real'(coef[k].im) / 2048.0 - xi) > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL edge %0d path %0d got %f %f expected %f %f", c, k,
                       real'(coef[k].re) / 2048.0, real'(coef[k].im) / 2048.0, xr, xi);
          end
          for (int k2 = 0; k2 < k; k2++)
            if (coef[k] == coef[k2]) differ = 0;
        end
        if (differ) ndiff++;
      end
      c++;
      @(negedge clk);
    end
    reseed = 1'b0;
    checks++;
    // edge 11 is the 12th clock edge from the first sampling edge (edge 0)
    if (first_valid != 11 || nvalid < FRAMES || nres != 3 || ndiff < FRAMES - 5) begin
      failures++;
      $display("FAIL first_valid=%0d nvalid=%0d nres=%0d ndiff=%0d", first_valid, nvalid, nres, ndiff);
    end
    $display("reseed frames %0d, output sets %0d", nres, nvalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
