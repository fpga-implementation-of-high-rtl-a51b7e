// tb_isa_pcomp: self-checking test of the pipelined compensator.
//
// All legal input combinations are applied (a guessed carry of 1 always
// comes with a real carry out of 1). The three output bits are read as a
// small number: the upper block's LSB has weight 4 and the lower block's
// two MSBs weights 2 and 1. With no fault it must be unchanged; on a fault
// with LSB 0 it must grow by exactly the missing carry (4); on a fault with
// LSB 1 the LSB must stay and the MSBs must read 11.
module tb_isa_pcomp;
  logic       clk = 1'b0;
  logic       cspec = 1'b0, cout_lo = 1'b0, s_lsb_hi = 1'b0;
  logic [1:0] s_msb_lo = '0;
  logic       s_lsb_corr, fault, corr, bal;
  logic [1:0] s_msb_bal;
  int         checks = 0, failures = 0;
  int         n_ok = 0, n_corr = 0, n_bal = 0;

  isa_pcomp dut (
    .clk(clk), .cspec(cspec), .cout_lo(cout_lo), .s_lsb_hi(s_lsb_hi),
    .s_msb_lo(s_msb_lo), .s_lsb_corr(s_lsb_corr), .s_msb_bal(s_msb_bal),
    .fault(fault), .corr(corr), .bal(bal)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int in_val, out_val;
    for (int v = 0; v < 32; v++) begin
      if (v[4] && !v[3]) continue;  // guess 1 with real carry 0 cannot occur
      @(negedge clk);
      cspec    = v[4];
      cout_lo  = v[3];
      s_lsb_hi = v[2];
      s_msb_lo = v[1:0];
      in_val   = 4 * int'(s_lsb_hi) + int'(s_msb_lo);
      @(posedge clk);
      #1;
      out_val = 4 * int'(s_lsb_corr) + int'(s_msb_bal);
      checks++;
      if (cspec == cout_lo) begin
        n_ok++;
        if (out_val != in_val || fault || corr || bal) begin
          failures++;
          $display("FAIL no fault: in %0d out %0d", in_val, out_val);
        end
      end else if (!s_lsb_hi) begin
        n_corr++;
        if (out_val != in_val + 4 || !fault || !corr || bal) begin
          failures++;
          $display("FAIL correction: in %0d out %0d", in_val, out_val);
        end
      end else begin
        n_bal++;
        if (s_lsb_corr !== 1'b1 || s_msb_bal !== 2'b11 || !fault || corr || !bal) begin
          failures++;
          $display("FAIL balancing: in %0d out %0d", in_val, out_val);
        end
      end
    end
    checks++;
    if (n_ok == 0 || n_corr == 0 || n_bal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
