// tb_isa_ref_pkg: arithmetic reference model of the inexact speculative
// adder, for the testbenches.
//
// It computes the adder's result from whole-number arithmetic rather than
// gates: the guessed carry out of a block is the carry of the 2-bit sum of
// its two top operand bit pairs; each block adds its operands and the guess
// from below; and a block whose real carry out was not guessed sets the
// upper block's LSB when that LSB is 0, or otherwise forces its own two top
// sum bits to 11. Operands up to 64 bits.
package tb_isa_ref_pkg;

  typedef struct {
    logic [63:0] sum;
    logic        cout;
    int          faults;     // boundaries whose guess missed
    int          corrected;  // misses repaired in the upper block's LSB
    int          balanced;   // misses balanced in the lower block's MSBs
  } isa_ref_t;

  function automatic isa_ref_t isa_ref(input logic [63:0] a, input logic [63:0] b,
                                       input int n, input int x);
    isa_ref_t    r;
    int          nb;
    longint unsigned mask, ab, bb, t;
    longint unsigned bsum [16];
    logic        bcout [16];
    logic        guess [16];
    nb   = n / x;
    mask = (64'd1 << x) - 1;
    r.faults = 0; r.corrected = 0; r.balanced = 0;
    for (int i = 0; i < nb; i++) begin
      ab = (a >> (i * x)) & mask;
      bb = (b >> (i * x)) & mask;
      guess[i] = (((ab >> (x - 2)) + (bb >> (x - 2))) >> 2) != 0;
      t = ab + bb + ((i == 0) ? 0 : longint'(guess[i-1]));
      bsum[i]  = t & mask;
      bcout[i] = (t >> x) != 0;
    end
    r.sum = '0;
    for (int i = 0; i < nb; i++) r.sum |= 64'(bsum[i]) << (i * x);
    for (int i = 0; i < nb - 1; i++) begin
      if (bcout[i] && !guess[i]) begin
        r.faults++;
        if ((bsum[i+1] & 1) == 0) begin
          r.corrected++;
          r.sum[(i+1)*x] = 1'b1;
        end else begin
          r.balanced++;
          r.sum[i*x + x - 1] = 1'b1;
          r.sum[i*x + x - 2] = 1'b1;
        end
      end
    end
    r.cout = bcout[nb-1];
    return r;
  endfunction

endpackage
