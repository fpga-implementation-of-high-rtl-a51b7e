// isa_pcla: pipelined carry-lookahead adder (PCLA) of one X-bit block.
//
// The first level forms per-bit propagate p = a ^ b and generate g = a & b;
// these and the carry-in are registered (the published pipeline register
// level of the 4-bit PCLA). After the register every internal carry is
// formed directly as a sum of products of the registered p, g and cin,
//     c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[1]g[0] | p[i]..p[0]cin,
// and the sum bits are s[i] = p[i] ^ c[i]. The carry out is c[X]. The AND
// terms, the OR and the sum XOR after the register are the block's critical
// path, which is the critical path of the whole pipelined adder.
//
// Ports: clk (gated clock of the PCLA's stage), a, b (block operands), cin
// (block carry-in, the speculated carry for all but the lowest block),
// s (block sum) and cout (block carry out), both valid one clock after a, b
// and cin are sampled and combinational from the register.
module isa_pcla #(
  parameter int unsigned X = isa_pkg::BLOCK_W
) (
  input  logic         clk,
  input  logic [X-1:0] a,
  input  logic [X-1:0] b,
  input  logic         cin,
  output logic [X-1:0] s,
  output logic         cout
);

  logic [X-1:0] p_q, g_q;
  logic         cin_q;
  logic [X:0]   c;

  always_ff @(posedge clk) begin
    p_q   <= a ^ b;
    g_q   <= a & b;
    cin_q <= cin;
  end

  // Flat lookahead: each carry from the registered p/g terms only.
  always_comb begin
    c[0] = cin_q;
    for (int i = 0; i < int'(X); i++) begin
      logic term, prop;
      term = g_q[i];
      prop = p_q[i];
      for (int j = i - 1; j >= 0; j--) begin
        term = term | (prop & g_q[j]);
        prop = prop & p_q[j];
      end
      c[i+1] = term | (prop & cin_q);
    end
  end

  assign s    = p_q ^ c[X-1:0];
  assign cout = c[X];

endmodule
