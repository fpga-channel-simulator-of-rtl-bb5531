// pn_gen: pseudo random binary sequence generator.
//
// A chain of N flip-flops (stages 1..N) shifts one place per enabled clock;
// stage 1 takes the exclusive-or of stage N and stage TAP+1, i.e. of
// register bits N-1 and TAP. With the document's choice, N = 24 and
// TAP = 5, this is the feedback (23, 5, 0) it lists for n = 24 and writes as
// X^23 + X^5 + 1; the 24-bit seeds are the document's. Which end of the
// seed word is stage 1 is not stated: here the seed's MSB is stage N, the
// output stage.
//
// Interface: `reset` (synchronous, active high) loads SEED; while `en` is
// high the register shifts every clock. `state` exposes all stages (bit
// N-1 = stage N) and `bit_o` the output stage.
module pn_gen #(
  parameter int            N    = 24,
  parameter int            TAP  = 5,
  parameter logic [N-1:0]  SEED = 24'b100010101110010100100110
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  output logic [N-1:0] state,
  output logic         bit_o
);

  always_ff @(posedge clk) begin
    if (reset)
      state <= SEED;
    else if (en)
      state <= {state[N-2:0], state[N-1] ^ state[TAP]};
  end

  assign bit_o = state[N-1];

  // An all-zero register would never leave that state.
  initial assert (SEED != '0) else $error("pn_gen: SEED must not be zero");

endmodule
