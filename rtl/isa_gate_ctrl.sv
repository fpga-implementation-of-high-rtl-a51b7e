// isa_gate_ctrl: stage-occupancy tracking and clock gating for the pipelined
// inexact speculative adder.
//
// A valid bit travels beside the data through the STAGES register stages.
// Stage k is clocked on a rising edge only when the stage in front of it
// holds an operand pair (stage 1 only when valid_in is high), so at the start
// of a burst the later stages are idle and gated, and at its end the earlier
// ones are. While a continuous stream flows every stage is clocked each
// cycle. Gating every stage's clock is the published design's idea; the
// valid-bit control that decides it is this design's.
//
// Ports: clk, rst_n (asynchronous, active low, clears the valid chain),
// valid_in (operand pair presented this cycle), stage_en[k] (stage k+1 will
// be clocked at the next rising edge), gclk[k] (gated clock of stage k+1),
// valid_out (the last stage holds a result). While rst_n is low every stage
// clock is held off, so no stage loads data before the valid chain is clear.
//
// Timing: valid_in sampled at edge t appears on valid_out after edge
// t+STAGES-1, i.e. together with the result in the last stage.
module isa_gate_ctrl #(
  parameter int unsigned STAGES = isa_pkg::ISA_STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_in,
  output logic [STAGES-1:0] stage_en,
  output logic [STAGES-1:0] gclk,
  output logic              valid_out
);

  // stage_valid[k]: the register of stage k+1 holds an operand pair.
  logic [STAGES-1:0] stage_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_valid <= '0;
    else        stage_valid <= {stage_valid[STAGES-2:0], valid_in};
  end

  // No stage is clocked while reset is held.
  assign stage_en  = rst_n ? {stage_valid[STAGES-2:0], valid_in} : '0;
  assign valid_out = stage_valid[STAGES-1];

  for (genvar k = 0; k < STAGES; k++) begin : g_cg
    isa_clock_gate u_cg (
      .clk  (clk),
      .en   (stage_en[k]),
      .gclk (gclk[k])
    );
  end

endmodule
