// tb_isa_gate_ctrl: self-checking test of the per-stage clock-gating control.
//
// valid_in is driven with bursts, gaps and random patterns. A reference
// shift register in the testbench predicts which stages must be clocked at
// every edge; the test counts rising edges of every gated clock and checks
// stage_en, valid_out and the edge counts against it. It also checks that
// gating actually happened (some cycles with idle stages) and that in a
// continuous stream every stage is clocked.
module tb_isa_gate_ctrl;
  localparam int S = 5;
  logic         clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic [S-1:0] stage_en, gclk;
  logic         valid_out;
  int           checks = 0, failures = 0;
  int           edges    [S];
  int           expected [S];
  logic [S-1:0] ref_valid = '0;
  int           partial_cycles = 0, full_cycles = 0;

  isa_gate_ctrl #(.STAGES(S)) dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in),
    .stage_en(stage_en), .gclk(gclk), .valid_out(valid_out)
  );

  always #5 clk = ~clk;

  for (genvar k = 0; k < S; k++) begin : g_cnt
    always @(posedge gclk[k]) edges[k]++;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v);
    logic [S-1:0] exp_en;
    @(negedge clk);
    valid_in = v;
    #1;
    exp_en = {ref_valid[S-2:0], v};
    checks++;
    if (stage_en !== exp_en || valid_out !== ref_valid[S-1]) begin
      failures++;
      $display("FAIL t=%0t stage_en=%b exp %b valid_out=%b exp %b",
               $time, stage_en, exp_en, valid_out, ref_valid[S-1]);
    end
    if (exp_en == '1) full_cycles++;
    else if (exp_en != '0) partial_cycles++;
    for (int k = 0; k < S; k++) if (exp_en[k]) expected[k]++;
    @(posedge clk);
    ref_valid = {ref_valid[S-2:0], v};
  endtask

  initial begin
    for (int k = 0; k < S; k++) begin edges[k] = 0; expected[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < S; k++) edges[k] = 0;  // ignore power-up activity
    // one isolated operation
    step(1'b1);
    repeat (7) step(1'b0);
    // a continuous stream
    repeat (12) step(1'b1);
    repeat (6) step(1'b0);
    // random traffic
    repeat (300) step($urandom_range(0, 2) != 0);
    repeat (6) step(1'b0);
    @(negedge clk);
    for (int k = 0; k < S; k++) begin
      checks++;
      if (edges[k] != expected[k]) begin
        failures++;
        $display("FAIL: stage %0d clocked %0d times, expected %0d", k + 1, edges[k], expected[k]);
      end
    end
    checks++;
    if (partial_cycles == 0 || full_cycles == 0) begin
      failures++;
      $display("FAIL: partial=%0d full=%0d", partial_cycles, full_cycles);
    end
    $display("cycles with idle (gated) stages: %0d, with every stage busy: %0d",
             partial_cycles, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
