// tb_isa_pcla: self-checking test of the pipelined carry-lookahead block.
//
// The 4-bit block is checked exhaustively (all a, b, cin) and an 8-bit
// instance with random operands: one clock after the operands are sampled,
// {cout, s} must equal a + b + cin.
module tb_isa_pcla;
  logic       clk = 1'b0;
  logic [3:0] a4 = '0, b4 = '0, s4;
  logic [7:0] a8 = '0, b8 = '0, s8;
  logic       cin = 1'b0, cout4, cout8;
  int         checks = 0, failures = 0;

  isa_pcla #(.X(4)) dut4 (.clk(clk), .a(a4), .b(b4), .cin(cin), .s(s4), .cout(cout4));
  isa_pcla #(.X(8)) dut8 (.clk(clk), .a(a8), .b(b8), .cin(cin), .s(s8), .cout(cout8));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp4, exp8;
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      a4  = v[3:0];
      b4  = v[7:4];
      cin = v[8];
      a8  = 8'($urandom);
      b8  = 8'($urandom);
      exp4 = int'(a4) + int'(b4) + int'(cin);
      exp8 = int'(a8) + int'(b8) + int'(cin);
      @(posedge clk);
      #1;
      checks += 2;
      if ({cout4, s4} !== 5'(exp4)) begin
        failures++;
        $display("FAIL X=4 %0d+%0d+%0d -> %0d", a4, b4, cin, {cout4, s4});
      end
      if ({cout8, s8} !== 9'(exp8)) begin
        failures++;
        $display("FAIL X=8 %0d+%0d+%0d -> %0d", a8, b8, cin, {cout8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
