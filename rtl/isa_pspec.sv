// isa_pspec: pipelined speculator (PSPEC) of one adder block.
//
// It guesses the carry out of a block from the block's two most significant
// operand bit pairs only: the pair at msb generates a carry, or the pair at
// msb-1 generates one and the pair at msb propagates it,
//     cspec = g_msb | (p_msb & g_msb-1).
// The carry that could arrive at bit msb-1 from below is ignored, so the
// guess can only be too low, never too high. The first gate level (two
// generates and one propagate) is followed by a register, and the second
// level (the AND and the OR) drives cspec combinationally from it, as in the
// published pipelined speculator.
//
// Ports: clk (gated clock of the speculator's stage), a_hi/b_hi (operand
// bits {msb, msb-1} of the block), cspec (guessed carry, valid one clock
// after a_hi/b_hi are sampled).
module isa_pspec (
  input  logic       clk,
  input  logic [1:0] a_hi,
  input  logic [1:0] b_hi,
  output logic       cspec
);

  logic g_msb_q, g_msb1_q, p_msb_q;

  always_ff @(posedge clk) begin
    g_msb_q  <= a_hi[1] & b_hi[1];
    g_msb1_q <= a_hi[0] & b_hi[0];
    p_msb_q  <= a_hi[1] ^ b_hi[1];
  end

  assign cspec = g_msb_q | (p_msb_q & g_msb1_q);

endmodule
