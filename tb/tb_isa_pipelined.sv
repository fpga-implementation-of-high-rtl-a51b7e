// tb_isa_pipelined: end-to-end self-checking test of the pipelined,
// clock-gated inexact speculative adder at its default size (32 bits,
// 4-bit blocks).
//
// Operand pairs are sent as a single isolated addition, a continuous stream
// and random traffic with gaps. Every result is compared with the arithmetic
// reference model; it must appear exactly five clocks after its operands and
// results must come out in order. The test also checks what the inexactness
// means: when no guess missed, or every miss was repaired, the sum equals
// the exact sum; each balanced miss at boundary i leaves it short by exactly
// 2^(4i+2), a quarter of the carry that was missed. It counts, and requires at least once: an exact
// guess, a repaired miss, a balanced miss, a cycle with gated (idle) stages
// and a cycle with every stage clocked. Each stage's gated clock must tick
// exactly once per addition.
module tb_isa_pipelined;
  import tb_isa_ref_pkg::*;

  localparam int N = 32;
  localparam int X = 4;
  localparam int NB = N / X;
  localparam int LAT = 5;

  logic           clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic [N-1:0]   a = '0, b = '0, sum;
  logic           valid_out, cout;
  logic [4:0]     stage_busy;
  logic [NB-2:0]  fault_seen, corr_seen, bal_seen;

  int checks = 0, failures = 0;
  int n_exact_guess = 0, n_corrected = 0, n_balanced = 0;
  int n_partial_gated = 0, n_all_busy = 0, n_results = 0, n_sent = 0;
  int gclk_ticks [5];

  isa_pipelined dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .a(a), .b(b),
    .valid_out(valid_out), .sum(sum), .cout(cout), .stage_busy(stage_busy),
    .fault_seen(fault_seen), .corr_seen(corr_seen), .bal_seen(bal_seen)
  );

  always #5 clk = ~clk;

  for (genvar k = 0; k < 5; k++) begin : g_tick
    always @(posedge dut.gclk[k]) if (rst_n) gclk_ticks[k]++;
  end

  typedef struct {
    logic [N-1:0] a, b;
    time          t;      // time of the edge that sampled the pair
  } op_t;
  op_t q [$];

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record each operand pair at the edge that samples it.
  always @(posedge clk) if (rst_n && valid_in) begin
    q.push_back('{a: a, b: b, t: $time});
    n_sent++;
  end

  // Check each result after the edge that writes it.
  always @(negedge clk) if (rst_n) begin
    if (stage_busy == '1) n_all_busy++;
    else if (stage_busy != '0) n_partial_gated++;
    if (valid_out) begin
      op_t      op;
      isa_ref_t r;
      logic [N:0] exact;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result without operands");
      end else begin
        op    = q.pop_front();
        r     = isa_ref(64'(op.a), 64'(op.b), N, X);
        exact = {1'b0, op.a} + {1'b0, op.b};
        n_results++;
        checks++;
        if (sum !== r.sum[N-1:0] || cout !== r.cout) begin
          failures++;
          $display("FAIL %h + %h: got %b_%h expected %b_%h", op.a, op.b,
                   cout, sum, r.cout, r.sum[N-1:0]);
        end
        checks++;
        // operands driven half a clock before their sampling edge, result
        // read half a clock after its writing edge: count whole clocks
        if (int'(($time - op.t + 5) / 10) != LAT) begin
          failures++;
          $display("FAIL: latency %0d cycles, expected %0d", ($time - op.t + 5) / 10, LAT);
        end
        checks++;
        if ($countones(fault_seen) != r.faults || $countones(corr_seen) != r.corrected ||
            $countones(bal_seen) != r.balanced) begin
          failures++;
          $display("FAIL %h + %h: fault/corr/bal flags %b %b %b", op.a, op.b,
                   fault_seen, corr_seen, bal_seen);
        end
        checks++;
        if (r.faults == 0 && {cout, sum} !== exact) begin
          failures++;
          $display("FAIL %h + %h: no miss but inexact", op.a, op.b);
        end
        if ({cout, sum} > exact) begin
          failures++;
          $display("FAIL %h + %h: result above exact sum", op.a, op.b);
        end
        if (r.balanced == 0 && {cout, sum} !== exact) begin
          failures++;
          $display("FAIL %h + %h: repaired misses must give the exact sum", op.a, op.b);
        end
        // A miss means the carry ran through both top bit pairs of block i,
        // so their sum bits were 00; forcing 11 leaves the result short by
        // exactly a quarter of the missing carry, 2^(i*X + X - 2).
        checks++;
        begin
          logic [N:0] err;
          err = '0;
          for (int i = 0; i < NB - 1; i++) if (bal_seen[i]) err += (N+1)'(1) << (i * X + X - 2);
          if (exact - {cout, sum} !== err) begin
            failures++;
            $display("FAIL %h + %h: error %h, expected %h", op.a, op.b, exact - {cout, sum}, err);
          end
        end
        if (r.faults == 0) n_exact_guess++;
        n_corrected += r.corrected;
        n_balanced  += r.balanced;
      end
    end
  end

  task automatic send(input logic v, input logic [N-1:0] av, input logic [N-1:0] bv);
    @(negedge clk);
    valid_in = v;
    a = av;
    b = bv;
  endtask

  initial begin
    for (int k = 0; k < 5; k++) gclk_ticks[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // one isolated addition: every carry ripples, all guesses miss
    send(1'b1, 32'hFFFF_FFFF, 32'h0000_0001);
    repeat (8) send(1'b0, '0, '0);
    // directed cases: exact guess, repaired miss, balanced miss
    send(1'b1, 32'h0000_0080, 32'h0000_0080);  // carry from top pair: guessed
    send(1'b1, 32'h0000_000C, 32'h0000_0004);  // carry from bit 2: miss, LSB 0 -> set
    send(1'b1, 32'h0000_001C, 32'h0000_0004);  // miss, LSB 1 -> balance to 11
    send(1'b1, 32'h1234_5678, 32'h0000_0000);
    repeat (8) send(1'b0, '0, '0);
    // continuous stream of random operands
    repeat (200) send(1'b1, $urandom, $urandom);
    repeat (8) send(1'b0, '0, '0);
    // random traffic with gaps
    repeat (400) send($urandom_range(0, 2) != 0, $urandom, $urandom);
    repeat (10) send(1'b0, '0, '0);

    checks++;
    if (q.size() != 0 || n_results != n_sent) begin
      failures++;
      $display("FAIL: %0d sent, %0d results", n_sent, n_results);
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (gclk_ticks[k] != n_sent) begin
        failures++;
        $display("FAIL: stage %0d clocked %0d times for %0d additions", k + 1,
                 gclk_ticks[k], n_sent);
      end
    end
    $display("additions %0d: exact guesses %0d, repaired misses %0d, balanced misses %0d",
             n_results, n_exact_guess, n_corrected, n_balanced);
    $display("cycles with idle stages gated %0d, with all stages busy %0d",
             n_partial_gated, n_all_busy);
    checks++;
    if (n_exact_guess == 0 || n_corrected == 0 || n_balanced == 0 ||
        n_partial_gated == 0 || n_all_busy == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
