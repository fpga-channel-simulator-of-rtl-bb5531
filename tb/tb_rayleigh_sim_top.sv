`timescale 1ns/1ps
// tb_rayleigh_sim_top: end-to-end run of the whole simulator at its default
// size (six paths, M = 8), with no parameter overrides.
//
// All three generators run at once from one clock and reset:
//   * six-ray Xiao: theta_k, phi_k of the document's six-channel run, a new
//     t every 8-clock frame, reseeded three times (once mid-frame, so the
//     request waits for the next frame, once on a frame's first clock, and
//     once while that reseed sequence runs, so a second sequence follows);
//   * Jakes: fd = 200 Hz and a new t every clock;
//   * single Xiao: theta = -20, phi = 0 degrees, a new t every clock,
//     reseeded twice.
// Each output is compared with the floating-point model (table cosines).
// The mechanisms of the design are counted and each must occur: complete
// six-path frames, deferred and immediate multipath reseeds, a multipath
// reseed requested during a running sequence, single-ray
// reseeds, back-to-back (one per clock) Jakes and Xiao outputs.
module tb_rayleigh_sim_top;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int  K = 6, M = 8;
  localparam real TOL = 0.02;
  localparam int  CYCLES = 4000;

  logic clk = 1'b0, reset = 1'b1;
  logic mp_reseed = 1'b0, xs_reseed = 1'b0;
  fd_t  mp_fd, jk_fd, xs_fd;
  time_t mp_t, jk_t, xs_t;
  angle_t mp_theta [K], mp_phi [K], xs_theta, xs_phi;
  cplx_coef_t mp_coef [K];
  coef_t jk_re, jk_im, xs_re, xs_im;
  logic mp_valid, jk_valid, xs_valid;
  int checks = 0, failures = 0;

  rayleigh_sim_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real TH [K] = '{-20.0, 30.0, 65.0, -40.0, 145.0, -100.0};
  localparam real PH [K] = '{31.0, 22.5, 19.40625, 8.03125, 32.0625, 30.96875};
  localparam real PSI1 [K] = '{149.4375, 23.65625, 101.75, 130.71875, 21.84375, 237.6875};
  localparam real PSI_REST [8] = '{149.4375, 23.65625, 101.75, 130.71875, 21.84375, 237.6875,
                                   330.71875, 277.90625};
  localparam logic [23:0] SEEDS [8] = '{
    24'b100010101110010100100110, 24'b010111001001110010101101,
    24'b101101000111010110011100, 24'b101110011010011100100111,
    24'b001010110110101001010100, 24'b010010111010100111100011,
    24'b111010101101010101011010, 24'b101011110101010100010101 };

  function automatic void jakes_ref(int unsigned f, int unsigned tt, output real uc, output real us);
    uc = 0.0;
    us = 0.0;
    for (int n = 0; n <= 8; n++) begin
      real beta, a, b, c, cw;
      beta = (n == 0) ? PI / 4.0 : PI * n / 8.0;
      a    = (n == 0) ? $sqrt(2.0) * $cos(beta) : 2.0 * $cos(beta);
      b    = (n == 0) ? $sqrt(2.0) * $sin(beta) : 2.0 * $sin(beta);
      c    = (n == 0) ? 1.0 : q10($cos(2.0 * PI * n / 34.0));
      cw   = tab_cos(dop_deg(f, tt, c, 0.0));
      uc += a * cw;
      us += b * cw;
    end
    uc = uc * 2.0 / $sqrt(34.0);
    us = us * 2.0 / $sqrt(34.0);
  endfunction

  task automatic cmp(string what, coef_t r, coef_t i, real er, real ei);
    checks++;
    if (absr(real'(r) / 2048.0 - er) > TOL || absr(real'(i) / 2048.0 - ei) > TOL) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s got %f %f expected %f %f", what, real'(r) / 2048.0,
                 real'(i) / 2048.0, er, ei);
    end
  endtask

  typedef struct { int unsigned f; int unsigned tt; real psi [K][8]; } frame_t;
  typedef struct { int unsigned f; int unsigned tt; real psi [8]; } xs_t_s;

  initial begin
    frame_t fr, fq [$];
    xs_t_s  xr_s, xq [$];
    int unsigned jq_f [$], jq_t [$];
    real psi_cur [K][8], psi_nxt [K][8], xs_psi [8];
    logic [23:0] pn [8];
    bit pending = 0, rs_active = 0;
    int rs_frame = 0;
    int n_frames = 0, n_defer = 0, n_immediate = 0, n_during = 0, n_xs_reseed = 0;
    int n_jk = 0, n_xs = 0, jk_run = 0, xs_run = 0, jk_b2b = 0, xs_b2b = 0;

    for (int k = 0; k < K; k++) begin
      mp_theta[k] = deg_to_angle(TH[k]);
      mp_phi[k]   = deg_to_angle(PH[k]);
      for (int n = 0; n < 8; n++) psi_cur[k][n] = (n == 0) ? PSI1[k] : PSI_REST[n];
      psi_nxt[k] = psi_cur[k];
    end
    for (int n = 0; n < 8; n++) xs_psi[n] = PSI_REST[n];
    for (int n = 0; n < 8; n++) pn[n] = SEEDS[n];
    xs_theta = deg_to_angle(-20.0);
    xs_phi   = '0;
    mp_fd = 12'd200; jk_fd = 12'd200; xs_fd = 12'd200;
    mp_t = '0; jk_t = '0; xs_t = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;

    for (int c = 0; c < CYCLES; c++) begin
      int j;
      j = c % M + 1;
      // ---- stimulus for this edge
      if (j == 1) begin
        mp_t = (c == 0) ? 21'd10 : time_t'(c * 523);
        if (c >= 2000) mp_fd = fd_t'($urandom_range(1, 2000));
        for (int k = 0; k < K; k++) psi_cur[k] = psi_nxt[k];
        fr.f = mp_fd; fr.tt = mp_t; fr.psi = psi_cur;
        fq.push_back(fr);
      end
      mp_reseed = (c == 301 || c == 1600 || c == 1650); // mid-frame, frame start, during a sequence
      begin
        bit start_now, cont_now, eff_active;
        int eff_frame;
        start_now  = (j == 1) && !rs_active && (pending || mp_reseed);
        cont_now   = (j == 1) && rs_active && rs_frame != 2 * M - 1;
        eff_active = (j == 1) ? (start_now || cont_now) : rs_active;
        eff_frame  = (j == 1) ? (start_now ? 0 : rs_frame + 1) : rs_frame;
        if (eff_active && eff_frame % 2 == 0 && j - 1 == eff_frame / 2)
          for (int k = 0; k < K; k++) psi_nxt[k][j-1] = real'({1'b0, pn[k][16:0]}) / 32.0;
        if (start_now) begin
          if (pending) n_defer++; else n_immediate++;
        end
        if (mp_reseed && rs_active) n_during++;
        pending = (pending || mp_reseed) && !start_now;
        if (j == 1) begin rs_active = eff_active; rs_frame = eff_frame; end
      end

      jk_t = (c == 0) ? 21'b000000100111000100110 : time_t'(c * 2111);
      jq_f.push_back(jk_fd); jq_t.push_back(jk_t);
      xs_t = time_t'(c * 3001);
      xs_reseed = (c == 1234 || c == 3210);
      xr_s.f = xs_fd; xr_s.tt = xs_t; xr_s.psi = xs_psi;
      xq.push_back(xr_s);

      @(posedge clk);
      if (xs_reseed) begin
        n_xs_reseed++;
        for (int n = 0; n < 8; n++) xs_psi[n] = real'({1'b0, pn[n][16:0]}) / 32.0;
      end
      for (int n = 0; n < 8; n++) pn[n] = pn_next(pn[n]);
      #1;
      // ---- outputs after this edge
      if (mp_valid) begin
        frame_t o;
        n_frames++;
        o = fq.pop_front();
        for (int k = 0; k < K; k++) begin
          real er, ei;
          xiao_ref(o.f, o.tt, TH[k], PH[k], o.psi[k], er, ei);
          cmp($sformatf("six-ray path %0d", k), mp_coef[k].re, mp_coef[k].im, er, ei);
        end
      end
      if (c >= 4) begin                 // Jakes latency 5: input of edge c-4
        real er, ei;
        int unsigned f, tt;
        f = jq_f.pop_front(); tt = jq_t.pop_front();
        jakes_ref(f, tt, er, ei);
        if (!jk_valid) begin failures++; checks++; end
        else begin n_jk++; jk_run++; cmp("jakes", jk_re, jk_im, er, ei); end
        if (jk_run >= 2) jk_b2b++;
      end
      if (c >= 4) begin                 // single Xiao latency 5
        xs_t_s o;
        real er, ei;
        o = xq.pop_front();
        xiao_ref(o.f, o.tt, -20.0, 0.0, o.psi, er, ei);
        if (!xs_valid) begin failures++; checks++; end
        else begin n_xs++; xs_run++; cmp("single xiao", xs_re, xs_im, er, ei); end
        if (xs_run >= 2) xs_b2b++;
      end
      @(negedge clk);
    end
    mp_reseed = 1'b0;
    xs_reseed = 1'b0;

    $display("six-ray frames %0d, reseeds deferred %0d immediate %0d, requested during a sequence %0d",
             n_frames, n_defer, n_immediate, n_during);
    $display("jakes outputs %0d (back-to-back %0d), single xiao outputs %0d (back-to-back %0d), single reseeds %0d",
             n_jk, jk_b2b, n_xs, xs_b2b, n_xs_reseed);
    checks++;
    if (n_frames < CYCLES / M - 2 || n_defer == 0 || n_immediate == 0 || n_during == 0 || n_xs_reseed == 0 ||
        jk_b2b == 0 || xs_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
