`timescale 1ns/1ps
// tb_xiao_single: drives the single-ray Xiao generator with a new (fd, t)
// every clock, theta = -20 and phi = 0 degrees as in the document's example,
// and compares each coefficient, 5 clocks later, with the model
//   X = 2/sqrt(8) sum_n (cos psi_n + j sin psi_n) cos(w_d t cos alpha_n + phi)
// evaluated in floating point with the table cosines (tolerance 0.02).
// First with the initial phases psi_n of the document; then `reseed` is
// pulsed and the phases are taken from a model of the eight PN generators
// (17 low bits of generator n at the reseed clock). Also checks latency,
// one result per clock and `valid`.
module tb_xiao_single;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int  LAT = 5;
  localparam real TOL = 0.02;

  logic   clk = 1'b0, reset = 1'b1, reseed = 1'b0;
  fd_t    fd;
  time_t  t;
  angle_t theta, phi;
  coef_t  re, im;
  logic   valid;
  int checks = 0, failures = 0;

  xiao_single dut (.clk, .reset, .reseed, .fd, .t, .theta, .phi, .re, .im, .valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // psi in effect for the input of each clock
  real psi_now [8] = '{149.4375, 23.65625, 101.75, 130.71875, 21.84375, 237.6875,
                       330.71875, 277.90625};
  logic [23:0] pn [8];
  localparam logic [23:0] SEEDS [8] = '{
    24'b100010101110010100100110, 24'b010111001001110010101101,
    24'b101101000111010110011100, 24'b101110011010011100100111,
    24'b001010110110101001010100, 24'b010010111010100111100011,
    24'b111010101101010101011010, 24'b101011110101010100010101 };

  typedef struct { int unsigned f; int unsigned tt; real th; real ph; real psi [8]; } stim_t;
  stim_t q [$];
  int cyc = 0, first_valid = -1, nres = 0;

  initial begin
    stim_t s;
    fd    = '0;
    t     = '0;
    theta = deg_to_angle(-20.0);
    phi   = '0;
    for (int i = 0; i < 8; i++) pn[i] = SEEDS[i];
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 2400; i++) begin
      fd = (i < 800) ? 12'd200 : fd_t'($urandom);
      t  = (i == 0) ? 21'd10 : (i < 800) ? time_t'(i * 1311) : time_t'($urandom);
      if (i >= 1600) begin
        theta = angle_t'($urandom_range(0, 11520)) - angle_t'(5760);   // -180..180
        phi   = angle_t'($urandom_range(0, 11520)) - angle_t'(5760);
      end
      s.f = fd; s.tt = t; s.th = deg_of(theta); s.ph = deg_of(phi); s.psi = psi_now;
      q.push_back(s);
      // reseed pulses at two points; new phases apply from the next input
      reseed = (i == 1000 || i == 2000);
      @(posedge clk);
      if (reseed) begin
        nres++;
        for (int n = 0; n < 8; n++) psi_now[n] = real'({1'b0, pn[n][16:0]}) / 32.0;
      end
      for (int n = 0; n < 8; n++) pn[n] = pn_next(pn[n]);
      @(negedge clk);
    end
    reseed = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (first_valid != LAT || nres != 2) begin
      failures++;
      $display("FAIL first valid %0d (expected %0d)", first_valid, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!reset) begin
      cyc++;
      if (valid && first_valid < 0) first_valid = cyc;
      if (cyc >= LAT && q.size() > 0) begin
        stim_t s;
        real xr, xi;
        s = q.pop_front();
        xiao_ref(s.f, s.tt, s.th, s.ph, s.psi, xr, xi);
        checks++;
        if (!valid || absr(real'(re) / 2048.0 - xr) > TOL || absr(real'(im) / 2048.0 - xi) > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL fd=%0d t=%0d got %f %f expected %f %f", s.f, s.tt,
                     real'(re) / 2048.0, real'(im) / 2048.0, xr, xi);
        end
      end
    end
  end
endmodule
