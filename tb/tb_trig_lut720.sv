`timescale 1ns/1ps
// tb_trig_lut720: checks the cosine/sine table against real-number cosines.
// Every half-degree step of -4096..+4096 degrees is visited (plus random
// angles); each result must equal the table value floor(cos*1024) of the
// half-degree step and lie within 10 LSB of the exact cosine/sine. The
// document's example, cos(240 deg) = 12'b1101_1111_1111, is checked too.
// Latency: one clock.
module tb_trig_lut720;
  import rf_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 1'b0;
  angle_t angle;
  trig_t  cos_o, sin_o;
  int     checks = 0, failures = 0;

  trig_lut720 dut (.clk, .angle, .cos_o, .sin_o);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_angle(angle_t a);
    real d, ec, es;
    angle = a;
    @(posedge clk);
    #1;
    d  = deg_of(a);
    ec = tab_cos(d);
    es = tab_sin(d);
    checks++;
    if (absr(real'(cos_o) / 1024.0 - ec) > 1.5 / 1024.0 ||
        absr(real'(sin_o) / 1024.0 - es) > 1.5 / 1024.0 ||
        absr(real'(cos_o) / 1024.0 - $cos(d * PI / 180.0)) > 10.0 / 1024.0 ||
        absr(real'(sin_o) / 1024.0 - $sin(d * PI / 180.0)) > 10.0 / 1024.0) begin
      failures++;
      if (failures < 10)
        $display("FAIL angle=%f cos=%0d sin=%0d expected %f %f", d, cos_o, sin_o, ec, es);
    end
  endtask

  initial begin
    angle = '0;
    @(negedge clk);
    // document example: 240 degrees
    angle = 18'b0_000011110000_00000;
    @(posedge clk); #1;
    checks++;
    if (cos_o !== 12'b1101_1111_1111) begin
      failures++;
      $display("FAIL cos(240) = %b", cos_o);
    end
    for (int s = -8192; s < 8192; s++) check_angle(angle_t'(s * 16));
    for (int i = 0; i < 2000; i++) check_angle(angle_t'($urandom));
    // one result per clock: a stream of angles, each result one clock later
    begin
      angle_t q [$];
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        if (q.size() > 0) begin
          real d;
          d = deg_of(q.pop_front());
          checks++;
          if (absr(real'(cos_o) / 1024.0 - tab_cos(d)) > 1.5 / 1024.0) failures++;
        end
        angle = angle_t'(i * 977);
        q.push_back(angle);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
