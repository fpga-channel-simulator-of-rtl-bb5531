`timescale 1ns/1ps
// tb_pn_gen: checks the PN generator with seed PN1 against its output
// recurrence b(k) = b(k-24) xor b(k-6), for 5000 steps, checks that `en`
// low holds the state, that reset reloads the seed, and that the register
// never becomes all-zero. It also runs the generator with the other seven
// seeds of the document for 2000 steps each.
module tb_pn_gen;
  import tb_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic [23:0] state;
  logic        bit_o;
  int checks = 0, failures = 0;

  pn_gen dut (.clk, .reset, .en, .state, .bit_o);

  // The seven other seeds, each in its own generator, enable always on.
  localparam logic [23:0] SEEDS [8] = '{
    24'b100010101110010100100110, 24'b010111001001110010101101,
    24'b101101000111010110011100, 24'b101110011010011100100111,
    24'b001010110110101001010100, 24'b010010111010100111100011,
    24'b111010101101010101011010, 24'b101011110101010100010101 };
  logic [23:0] st [8];
  for (genvar i = 1; i < 8; i++) begin : g_other
    logic unused_bit;
    pn_gen #(.SEED(SEEDS[i])) u (.clk, .reset, .en(1'b1), .state(st[i]), .bit_o(unused_bit));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] model;
    logic [23:0] om [8];
    bit seq [$];
    repeat (2) @(negedge clk);
    reset = 1'b0;
    checks++;
    if (state !== SEEDS[0]) begin failures++; $display("FAIL seed %b", state); end
    for (int i = 1; i < 8; i++) om[i] = SEEDS[i];
    // output sequence of the seed: bit i of the seed entered i steps ago
    for (int i = 23; i >= 0; i--) seq.push_back(SEEDS[0][i]);
    en = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      seq.push_back(seq[seq.size()-24] ^ seq[seq.size()-6]);
      model = '0;
      for (int i = 0; i < 24; i++) model[i] = seq[seq.size()-1-i];
      checks++;
      if (state !== model || bit_o !== model[23] || state == '0) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d state %h model %h", k, state, model);
      end
      if (k < 2000)
        for (int i = 1; i < 8; i++) begin
          om[i] = pn_next(om[i]);
          checks++;
          if (st[i] !== om[i]) failures++;
        end
    end
    // hold with en low
    en = 1'b0;
    model = state;
    repeat (5) @(negedge clk);
    checks++;
    if (state !== model) begin failures++; $display("FAIL hold"); end
    // reset reloads the seed
    reset = 1'b1;
    @(negedge clk);
    checks++;
    if (state !== SEEDS[0]) begin failures++; $display("FAIL reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
