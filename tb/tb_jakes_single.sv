`timescale 1ns/1ps
// tb_jakes_single: drives the Jakes generator with a new (fd, t) every
// clock and compares each coefficient, 5 clocks later, with the model
//   u_c = 2/sqrt(34) sum_{n=0..8} a_n cos(w_n t),
//   u_s = 2/sqrt(34) sum_{n=0..8} b_n cos(w_n t),
// evaluated in floating point with the documented number formats (table
// cosines, Doppler frequency ratios cos(2 pi n/34) rounded to 10 fraction
// bits). Inputs include the document's example, fd = 200 Hz and
// t = 21'b000000100111000100110. Tolerance: 0.01 (20 output LSB).
// It also checks the latency (5) and that `valid` rises after reset.
module tb_jakes_single;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 5;
  localparam real TOL = 0.01;

  logic  clk = 1'b0, reset = 1'b1;
  fd_t   fd;
  time_t t;
  coef_t re, im;
  logic  valid;
  int checks = 0, failures = 0;

  jakes_single dut (.clk, .reset, .fd, .t, .re, .im, .valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_jakes(int unsigned f, int unsigned tt, output real uc, output real us);
    uc = 0.0;
    us = 0.0;
    for (int n = 0; n <= 8; n++) begin
      real beta = (n == 0) ? PI / 4.0 : PI * n / 8.0;
      real a    = (n == 0) ? $sqrt(2.0) * $cos(beta) : 2.0 * $cos(beta);
      real b    = (n == 0) ? $sqrt(2.0) * $sin(beta) : 2.0 * $sin(beta);
      real c    = (n == 0) ? 1.0 : q10($cos(2.0 * PI * n / 34.0));
      real cw   = tab_cos(dop_deg(f, tt, c, 0.0));
      uc += a * cw;
      us += b * cw;
    end
    uc = uc * 2.0 / $sqrt(34.0);
    us = us * 2.0 / $sqrt(34.0);
  endfunction

  int unsigned in_fd [$], in_t [$];
  int cyc = 0, first_valid = -1;

  initial begin
    fd = '0;
    t  = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      if (i == 0) begin
        fd = 12'd200;
        t  = 21'b000000100111000100110;
      end else if (i < 1000) begin
        fd = 12'd200;
        t  = time_t'(i * 977);
      end else begin
        fd = fd_t'($urandom);
        t  = time_t'($urandom);
      end
      in_fd.push_back(fd);
      in_t.push_back(t);
      @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (first_valid != LAT) begin
      failures++;
      $display("FAIL valid first seen %0d clocks after reset, expected %0d", first_valid, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare: output at clock cyc belongs to the input of clock cyc - LAT
  always @(posedge clk) begin
    #1;
    if (!reset) begin
      cyc++;
      if (valid && first_valid < 0) first_valid = cyc;
      if (cyc >= LAT && in_fd.size() > 0 && cyc - LAT < 3000) begin
        real uc, us;
        int unsigned f, tt;
        f  = in_fd.pop_front();
        tt = in_t.pop_front();
        ref_jakes(f, tt, uc, us);
        checks++;
        if (!valid || absr(real'(re) / 2048.0 - uc) > TOL || absr(real'(im) / 2048.0 - us) > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL fd=%0d t=%0d got %f %f expected %f %f", f, tt,
                     real'(re) / 2048.0, real'(im) / 2048.0, uc, us);
        end
      end
    end
  end
endmodule
