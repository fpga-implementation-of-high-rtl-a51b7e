// isa_pipelined: N-bit fine-grain pipelined, clock-gated inexact speculative
// adder (ISA) built from carry-lookahead blocks.
//
// The operands are cut into NB = N/X blocks of X bits. Instead of waiting for
// the carry to ripple from block to block, every block i+1 adds with a carry
// guessed by the speculator of block i from block i's two top operand bit
// pairs, so all blocks add in parallel. The compensator at each boundary
// compares the guess with block i's real carry out; on a miss it either sets
// the LSB of block i+1 (exact repair) or, when that LSB is already 1, forces
// block i's two MSBs to 11 (balancing). The lowest block adds with carry-in 0
// and the top block's real carry out is cout. The result is exact unless a
// carry into a block was produced below its top two bit pairs and the
// upper block's LSB was already 1.
//
// Pipeline (five register stages, each with its own gated clock):
//   1  PSPEC first level (generate/propagate of the two top bit pairs);
//      operands delayed alongside
//   2  PSPEC second level -> guessed carries; PCLA propagate/generate;
//      guessed carries delayed alongside
//   3  PCLA carry and sum logic -> block sums and carry outs
//   4  PCOMP fault XOR and incrementor; block sums delayed alongside
//   5  PCOMP demultiplexer and multiplexers -> output register
// The block structure, the speculator, CLA and compensator logic and the
// register levels inside them follow the published design. The stage
// numbering around them, the valid handshake that drives the clock gating,
// the cout output and the zero carry-in of the lowest block are this
// design's choices.
//
// Interface: present a, b with valid_in high for one clock per operand pair
// (back to back is allowed: one result per clock). The result appears on
// sum/cout with valid_out high five rising edges after the edge that
// sampled the operands, and stays there until the next result arrives.
// stage_busy[k] shows whether stage k+1 is clocked at the next edge.
// fault_seen/corr_seen/bal_seen[i] travel with the result and tell, per
// block boundary i, whether the guess missed and whether the miss was
// repaired in block i+1's LSB or balanced in block i's MSBs.
module isa_pipelined #(
  parameter int unsigned N = 32,
  parameter int unsigned X = isa_pkg::BLOCK_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         valid_in,
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic                         valid_out,
  output logic [N-1:0]                 sum,
  output logic                         cout,
  output logic [isa_pkg::ISA_STAGES-1:0] stage_busy,
  output logic [N/X-2:0]               fault_seen,
  output logic [N/X-2:0]               corr_seen,
  output logic [N/X-2:0]               bal_seen
);

  import isa_pkg::*;

  localparam int unsigned NB = N / X;

  if (N % X != 0 || X < 3 || NB < 2) begin : g_bad_size
    $error("isa_pipelined: N must be a multiple of X, X >= 3 and N/X >= 2");
  end

  // ---------------------------------------------------------------- gating
  logic [ISA_STAGES-1:0] gclk;

  isa_gate_ctrl #(.STAGES(ISA_STAGES)) u_gate (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (valid_in),
    .stage_en  (stage_busy),
    .gclk      (gclk),
    .valid_out (valid_out)
  );

  // ---------------------------------------------------- stage 1: operands
  logic [N-1:0] a_s1, b_s1;

  always_ff @(posedge gclk[ST_SPEC]) begin
    a_s1 <= a;
    b_s1 <= b;
  end

  // Speculators of blocks 0..NB-2 (the top block needs none).
  logic [NB-2:0] cspec;   // cspec[i]: guessed carry into block i+1

  for (genvar i = 0; i < int'(NB) - 1; i++) begin : g_spec
    isa_pspec u_spec (
      .clk   (gclk[ST_SPEC]),
      .a_hi  (a[i*X + X-1 -: 2]),
      .b_hi  (b[i*X + X-1 -: 2]),
      .cspec (cspec[i])
    );
  end

  // ------------------------------------------- stage 2: CLA p/g, guesses
  logic [NB-2:0] cspec_s2;

  always_ff @(posedge gclk[ST_PG]) cspec_s2 <= cspec;

  logic [N-1:0]  bsum;    // raw block sums (stage 3 logic)
  logic [NB-1:0] bcout;   // real block carry outs (stage 3 logic)

  for (genvar i = 0; i < int'(NB); i++) begin : g_cla
    isa_pcla #(.X(X)) u_cla (
      .clk  (gclk[ST_PG]),
      .a    (a_s1[i*X +: X]),
      .b    (b_s1[i*X +: X]),
      .cin  ((i == 0) ? 1'b0 : cspec[(i == 0) ? 0 : i-1]),
      .s    (bsum[i*X +: X]),
      .cout (bcout[i])
    );
  end

  // ------------------------------------------ stage 3: block sum register
  logic [N-1:0]  bsum_s3;
  logic [NB-1:0] bcout_s3;
  logic [NB-2:0] cspec_s3;

  always_ff @(posedge gclk[ST_SUM]) begin
    bsum_s3  <= bsum;
    bcout_s3 <= bcout;
    cspec_s3 <= cspec_s2;
  end

  // ------------------------------------------- stage 4: compensators
  logic [N-1:0] bsum_s4;
  logic         cout_s4;

  always_ff @(posedge gclk[ST_FAULT]) begin
    bsum_s4 <= bsum_s3;
    cout_s4 <= bcout_s3[NB-1];
  end

  logic [NB-2:0] lsb_corr;
  logic [1:0]    msb_bal [NB-1];
  logic [NB-2:0] fault, corr, bal;

  for (genvar i = 0; i < int'(NB) - 1; i++) begin : g_comp
    isa_pcomp u_comp (
      .clk        (gclk[ST_FAULT]),
      .cspec      (cspec_s3[i]),
      .cout_lo    (bcout_s3[i]),
      .s_lsb_hi   (bsum_s3[(i+1)*X]),
      .s_msb_lo   (bsum_s3[i*X + X-1 -: 2]),
      .s_lsb_corr (lsb_corr[i]),
      .s_msb_bal  (msb_bal[i]),
      .fault      (fault[i]),
      .corr       (corr[i]),
      .bal        (bal[i])
    );
  end

  // ---------------------------------------------- stage 5: output register
  logic [N-1:0] sum_next;

  always_comb begin
    sum_next = bsum_s4;
    for (int i = 0; i < int'(NB) - 1; i++) begin
      sum_next[(i+1)*X]      = lsb_corr[i];
      sum_next[i*X + X-1 -: 2] = msb_bal[i];
    end
  end

  always_ff @(posedge gclk[ST_OUT]) begin
    sum        <= sum_next;
    cout       <= cout_s4;
    fault_seen <= fault;
    corr_seen  <= corr;
    bal_seen   <= bal;
  end

endmodule
