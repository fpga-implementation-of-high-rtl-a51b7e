// tb_isa_configs: the 8-, 16- and 32-bit configurations of the pipelined
// inexact speculative adder, run side by side on the same operand stream
// (each takes the low bits it needs). Each result is checked against the
// arithmetic reference model and for the five-clock latency; each width must
// see at least one repaired and one balanced miss.
module tb_isa_configs;
  logic        clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic [63:0] a = '0, b = '0;
  int checks = 0, failures = 0;
  int c [3], f [3], s [3], cr [3], ba [3];

  always #5 clk = ~clk;

  tb_isa_size_checker #(.N(8))  u8  (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .a(a), .b(b),
    .checks(c[0]), .failures(f[0]), .sent(s[0]), .corrected(cr[0]), .balanced(ba[0]));
  tb_isa_size_checker #(.N(16)) u16 (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .a(a), .b(b),
    .checks(c[1]), .failures(f[1]), .sent(s[1]), .corrected(cr[1]), .balanced(ba[1]));
  tb_isa_size_checker #(.N(32)) u32 (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .a(a), .b(b),
    .checks(c[2]), .failures(f[2]), .sent(s[2]), .corrected(cr[2]), .balanced(ba[2]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (600) begin
      @(negedge clk);
      valid_in = $urandom_range(0, 3) != 0;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      $display("N=%0d: %0d additions, %0d repaired misses, %0d balanced misses",
               8 << i, s[i], cr[i], ba[i]);
      if (cr[i] == 0 || ba[i] == 0 || c[i] != 2 * s[i]) begin
        failures++;
        $display("FAIL N=%0d: results missing or a mechanism not exercised", 8 << i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
