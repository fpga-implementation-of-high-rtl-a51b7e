// isa_clock_gate: glitch-free clock gate for one pipeline stage.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the latched enable is ANDed with the clock. An enable that changes
// anywhere in the low phase therefore never chops a high pulse: when en is 1
// during the low phase before a rising edge, gclk repeats that clock pulse;
// when it is 0, gclk stays low for the whole cycle and the stage's flip-flops
// see no edge. This is the usual integrated clock-gating cell. The gating of
// every stage follows the published design; the latch-and-AND form of the
// gate is this design's choice (on an FPGA a tool may map it to a clock
// enable instead).
//
// Ports: clk (free-running clock), en (enable for the next rising edge,
// produced from clk-domain flops), gclk (gated clock).
//
// The level-sensitive latch is intended: it is what makes the gate glitch-free.
module isa_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
