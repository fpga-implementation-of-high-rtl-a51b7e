// isa_pcomp: pipelined compensator (PCOMP) at the boundary between block i
// (below) and block i+1 (above).
//
// A fault is flagged when the carry guessed for block i+1 differs from the
// real carry out of block i: f = cspec ^ cout_lo. Since the speculator can
// only guess too low, a fault means a carry of weight 2^(lowest bit of block
// i+1) is missing. A one-bit incrementor adds 1 to the LSB of block i+1's sum.
// If that increment does not overflow (the LSB was 0) the LSB becomes 1 and
// the sum is exact again ("correction"). If it would overflow (the LSB was 1)
// the upper block is left alone and the two MSBs of block i are forced to 11
// instead ("balancing"), which bounds the error. A demultiplexer, steered by
// the incrementor's carry, sends the fault flag to one of the two output
// multiplexers.
//
// Pipelining follows the published PCOMP: the fault XOR and the incrementor
// form the first level, then a register, then the demultiplexer and the two
// multiplexers drive the outputs combinationally.
//
// Ports: clk (gated clock of the compensator's stage), cspec (guessed carry-in
// of block i+1), cout_lo (real carry out of block i), s_lsb_hi (LSB of block
// i+1's sum), s_msb_lo (bits {msb, msb-1} of block i's sum); outputs
// s_lsb_corr and s_msb_bal replace those bits one clock later; fault, corr
// and bal report what was done, for observation.
module isa_pcomp (
  input  logic       clk,
  input  logic       cspec,
  input  logic       cout_lo,
  input  logic       s_lsb_hi,
  input  logic [1:0] s_msb_lo,
  output logic       s_lsb_corr,
  output logic [1:0] s_msb_bal,
  output logic       fault,
  output logic       corr,
  output logic       bal
);

  logic       f_q, inc_c_q, inc_s_q, lsb_q;
  logic [1:0] msb_q;

  always_ff @(posedge clk) begin
    f_q     <= cspec ^ cout_lo;
    inc_s_q <= s_lsb_hi ^ 1'b1;   // incrementor sum
    inc_c_q <= s_lsb_hi & 1'b1;   // incrementor carry
    lsb_q   <= s_lsb_hi;
    msb_q   <= s_msb_lo;
  end

  // Demultiplexer: the fault goes to the correction path unless the
  // increment overflows, then to the balancing path.
  assign corr  = f_q & ~inc_c_q;
  assign bal   = f_q &  inc_c_q;
  assign fault = f_q;

  assign s_lsb_corr = corr ? inc_s_q : lsb_q;
  assign s_msb_bal  = bal  ? 2'b11   : msb_q;

  // The speculator never guesses a carry that is not there.
  a_no_overestimate: assert property (@(posedge clk) cspec |-> cout_lo)
    else $error("isa_pcomp: speculated carry 1 with real carry out 0");

endmodule
