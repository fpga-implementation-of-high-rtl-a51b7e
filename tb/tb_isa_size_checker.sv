// tb_isa_size_checker: one N-bit pipelined adder with its own result checker,
// used by tb_isa_configs to test several adder widths side by side.
//
// The low N bits of the shared operands are fed to the adder; every result is
// compared with the arithmetic reference model and must arrive five clocks
// after its operands. Counts of checks, failures, repaired and balanced
// misses are exported for the parent testbench.
module tb_isa_size_checker #(
  parameter int N = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output int          checks,
  output int          failures,
  output int          sent,
  output int          corrected,
  output int          balanced
);
  import tb_isa_ref_pkg::*;

  localparam int X  = 4;
  localparam int NB = N / X;

  logic [N-1:0]  sum;
  logic          valid_out, cout;
  logic [4:0]    stage_busy;
  logic [NB-2:0] fault_seen, corr_seen, bal_seen;

  isa_pipelined #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .a(a[N-1:0]), .b(b[N-1:0]),
    .valid_out(valid_out), .sum(sum), .cout(cout), .stage_busy(stage_busy),
    .fault_seen(fault_seen), .corr_seen(corr_seen), .bal_seen(bal_seen)
  );

  typedef struct {
    logic [N-1:0] a, b;
    time          t;
  } op_t;
  op_t q [$];

  initial begin
    checks = 0; failures = 0; sent = 0; corrected = 0; balanced = 0;
  end

  always @(posedge clk) if (rst_n && valid_in) begin
    q.push_back('{a: a[N-1:0], b: b[N-1:0], t: $time});
    sent++;
  end

  always @(negedge clk) if (rst_n && valid_out) begin
    op_t      op;
    isa_ref_t r;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL N=%0d: result without operands", N);
    end else begin
      op = q.pop_front();
      r  = isa_ref(64'(op.a), 64'(op.b), N, X);
      if (sum !== r.sum[N-1:0] || cout !== r.cout) begin
        failures++;
        $display("FAIL N=%0d %h + %h: got %b_%h expected %b_%h", N, op.a, op.b,
                 cout, sum, r.cout, r.sum[N-1:0]);
      end
      checks++;
      if (($time - op.t + 5) / 10 != 5) begin
        failures++;
        $display("FAIL N=%0d: latency %0d", N, ($time - op.t + 5) / 10);
      end
      corrected += r.corrected;
      balanced  += r.balanced;
    end
  end
endmodule
