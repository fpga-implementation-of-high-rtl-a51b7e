// isa_pkg: constants shared by the pipelined inexact speculative adder (ISA).
//
// The adder splits an N-bit addition into blocks of BLOCK_W bits. Each block
// adds with a carry-in that is guessed from the top SPEC_BITS operand bit
// pairs of the block below, and a compensator at every block boundary repairs
// a wrong guess. The datapath is cut into ISA_STAGES register stages, each
// with its own gated clock. The 4-bit block and the two-bit speculator window
// are the published design's; the stage numbering below is this design's.
package isa_pkg;

  // Block width x of the published design.
  parameter int unsigned BLOCK_W = 4;

  // Register stages of the pipelined adder, and their roles:
  //   stage 1  speculator first gate level     -> PSPEC register
  //   stage 2  speculator second gate level,
  //            CLA propagate/generate          -> PCLA register
  //   stage 3  CLA carry and sum logic         -> block-sum register
  //   stage 4  fault detect and incrementor    -> PCOMP register
  //   stage 5  compensator demux and muxes     -> output register
  parameter int unsigned ISA_STAGES = 5;

  typedef enum logic [2:0] {
    ST_SPEC  = 3'd0,
    ST_PG    = 3'd1,
    ST_SUM   = 3'd2,
    ST_FAULT = 3'd3,
    ST_OUT   = 3'd4
  } isa_stage_e;

endpackage
