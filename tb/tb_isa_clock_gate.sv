// tb_isa_clock_gate: self-checking test of the latch-based clock gate.
//
// The enable is changed at random points in both clock phases. Every rising
// edge of clk must produce a rising edge of gclk exactly when the enable was
// high at the end of the preceding low phase; enable changes in the high
// phase must not change gclk, and gclk must never be high while clk is low.
module tb_isa_clock_gate;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0, failures = 0;
  int   gedges = 0, exp_gedges = 0;

  isa_clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) gedges++;

  // gclk never high while clk is low
  always @(gclk) if (gclk && !clk) begin
    failures++;
    $display("FAIL: gclk high while clk low at %0t", $time);
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_at_edge;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: 10 time units, enable set at a random point in it
      #($urandom_range(1, 8));
      en = $urandom_range(0, 1) == 1;
      en_at_edge = en;
      #(10 - 1 - 0);
      clk = 1'b1;
      #1;
      checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("FAIL cyc %0d: gclk=%0b expected %0b", cyc, gclk, en_at_edge);
      end
      if (en_at_edge) exp_gedges++;
      // high phase: toggle the enable; gclk must hold
      #($urandom_range(1, 5));
      en = ~en;
      #1;
      checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("FAIL cyc %0d: gclk followed en in high phase", cyc);
      end
      #2;
      clk = 1'b0;
      #1;
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL cyc %0d: gclk not low in low phase", cyc);
      end
    end
    checks++;
    if (gedges != exp_gedges) begin
      failures++;
      $display("FAIL: %0d gated edges, expected %0d", gedges, exp_gedges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
