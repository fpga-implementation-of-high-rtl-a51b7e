// tb_isa_pspec: exhaustive self-checking test of the pipelined speculator.
//
// For all 16 combinations of the two top operand bit pairs the guessed carry
// must equal the carry out of the 2-bit sum a_hi + b_hi (no carry-in), and it
// must appear one clock after the operands are sampled.
module tb_isa_pspec;
  logic       clk = 1'b0;
  logic [1:0] a_hi = '0, b_hi = '0;
  logic       cspec;
  int         checks = 0, failures = 0;

  isa_pspec dut (.clk(clk), .a_hi(a_hi), .b_hi(b_hi), .cspec(cspec));

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] s;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      a_hi = v[3:2];
      b_hi = v[1:0];
      s = {1'b0, a_hi} + {1'b0, b_hi};
      @(posedge clk);
      #1;
      checks++;
      if (cspec !== s[2]) begin
        failures++;
        $display("FAIL a_hi=%b b_hi=%b cspec=%b expected %b", a_hi, b_hi, cspec, s[2]);
      end
      // holds while the clock is stopped between edges
      a_hi = ~a_hi;
      #1;
      checks++;
      if (cspec !== s[2]) begin
        failures++;
        $display("FAIL: cspec changed without a clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
