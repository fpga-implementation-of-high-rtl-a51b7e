# Pipelined, clock-gated inexact speculative adder

A ripple of carries from the least to the most significant bit is what makes
a wide adder slow. This adder does not wait for it. The operands are cut into
4-bit blocks that all add at the same time. The carry into each block is a
*guess* made from only the two top operand bit pairs of the block below. A
small compensator at every block boundary then compares the guess with the
carry that the lower block really produced. When the guess was wrong, the
compensator either repairs the result exactly or, when that is not possible
cheaply, "balances" it so that the error stays small and of known size. The
result is therefore usually exact and, when it is not, a little too low.

On top of this, the whole datapath is cut into five register stages (fine
grain pipelining), so the clock period is set by one 4-bit carry-lookahead
block. Each stage has its own gated clock, and a stage is clocked only when
it has work. That is what saves power at the start and end of a burst of
additions.

The default configuration is 32 bits (eight 4-bit blocks). 8- and 16-bit
versions are the same RTL with `N` changed.

## Block structure

```
            block 7            block 1              block 0
   a[31:28] b[31:28]  ...  a[7:4] b[7:4]        a[3:0] b[3:0]
        |                     |      \              |      \
        |                     |    PSPEC 1           |    PSPEC 0
        |                     |       \ cspec[1]     |       \ cspec[0]
      PCLA 7  <-- cspec[6]  PCLA 1 <------------- PCLA 0 <- 0 |
        |                     |     <-- cspec[0] ----------------'
        |                     |                      |
        +---- PCOMP 6 ... ----+------ PCOMP 0 -------+
        |                     |                      |
   sum[31:28]  ...       sum[7:4]               sum[3:0]
```

* **PSPEC** (`isa_pspec`), one per block except the top one. It looks at
  bits `{msb, msb-1}` of both operands of its block and computes
  `cspec = g_msb | (p_msb & g_msb-1)`: the carry out of the two top bit pairs
  alone. That guess becomes the carry-in of the next block up.
* **PCLA** (`isa_pcla`), one per block: a 4-bit carry-lookahead adder whose
  carries are each formed directly from propagate/generate terms, with no
  ripple inside the block. The lowest block adds with carry-in 0.
* **PCOMP** (`isa_pcomp`), one per boundary between block `i` and `i+1`.
  It needs the guess `cspec[i]`, block `i`'s real carry out, block `i`'s two
  top sum bits and block `i+1`'s sum LSB.

## When the guess is wrong, and what the compensator does

The guess ignores the carry that may arrive at bit `msb-1` from further
down. Because of that it can only be too low: if the top two bit pairs
produce a carry on their own, the real carry is also 1. A miss therefore
always means "the real carry out of block `i` was 1 but block `i+1` added
with 0". It happens only when both top bit pairs of block `i` *propagate*
(one operand bit is 1, the other 0) and a carry arrived from below. In that
case block `i`'s two top sum bits are necessarily `00`.

The compensator flags the miss as `f = cspec ^ cout_lo` and feeds block
`i+1`'s sum LSB to a 1-bit incrementor:

| miss | LSB of block i+1 | action | effect on the result |
|------|------------------|--------|----------------------|
| no   | –                | none   | exact |
| yes  | 0                | **repair**: LSB of block i+1 set to 1 | exact: the missing carry is added, and since the LSB was 0 it cannot ripple further |
| yes  | 1                | **balance**: top two sum bits of block i forced to `11` | short by exactly `2^(4i+2)` |

The incrementor's carry (set when the LSB is already 1, so that adding the
missing carry would have to ripple into block `i+1`'s higher bits) steers a
demultiplexer that routes the fault flag either to the LSB multiplexer
(repair) or to the MSB multiplexer (balance). Balancing turns the `00` that
the top bits of block `i` always hold after a miss into `11`, which recovers
three quarters of the lost carry `2^(4(i+1))`; the remaining error is the
quarter, `2^(4i+2)`. Errors from several boundaries add up. The result is
never above the exact sum. Because the repair, balance and no-miss cases
touch disjoint bits (a block's LSB versus its two MSBs), all boundaries work
independently and in parallel. This needs blocks of at least 3 bits.

With uniformly random 32-bit operands each boundary misses with a
probability of about 1/8 (both top pairs propagate, and a carry arrives), and
about half of those misses can be repaired. In the end-to-end test a little
under half of the additions had no miss at all.

## Pipeline

| stage | logic between registers | register written at the end of the stage |
|-------|-------------------------|-----------------------------------------|
| 1 | PSPEC first gate level (two generates, one propagate) | PSPEC register; operands delayed |
| 2 | PSPEC second level (guess), PCLA propagate/generate | PCLA register (p, g, carry-in); guesses delayed |
| 3 | PCLA lookahead carries and sum XORs | block sums and real block carry outs |
| 4 | PCOMP fault XOR and incrementor | PCOMP register; block sums delayed |
| 5 | PCOMP demultiplexer and multiplexers | output register (`sum`, `cout`) |

The register levels *inside* PSPEC, PCLA and PCOMP are the ones the design is
built around. The register after the PCLA and the output register complete the
five stages. The longest path is in stage 3: the AND-OR lookahead of the top
carry of a block followed by the sum XOR.

Timing: operands presented with `valid_in` high before rising edge `t` are
sampled at `t`. The result is written at edge `t+4` and read as "five
clocks after the operands were presented". One new pair may enter every
clock, and results come out in order. `sum`/`cout` hold the last result
until the next one is written.

## Clock gating

`isa_gate_ctrl` keeps one valid bit per stage. Stage 1 is clocked when
`valid_in` is high, and stage `k` when stage `k-1` holds a pair. At the start
of a burst only the early stages run; at its end only the late ones do; in a
continuous stream all five run every cycle; with no traffic none do. Each
stage clock comes from `isa_clock_gate`: the enable is captured in a latch
that is transparent while `clk` is low, and ANDed with `clk`. An enable that
changes during the low phase cannot clip a clock pulse. The latch is
intentional, and lint tools report it as a latch. On an FPGA the synthesis
tool may turn the gate into flip-flop clock enables, which saves less power
but behaves the same.

The valid chain is the only state that is reset (`rst_n`, asynchronous,
active low). While reset is held, every stage clock is off. Data registers
are not reset; their content only matters when the matching valid bit is set.

An 8- or 16-bit addition can also run on the 32-bit adder with zero-extended
operands. The zero block above the operands adds only the guessed carry, and
a miss at that boundary is always repaired, because that block's LSB is 0. So
bits 7:0 (or 15:0) match the narrow adder's sum, and bit 8 (or 16) matches its
carry out.

## Interface of `isa_pipelined`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid chain |
| `valid_in` | in | 1 | `a`, `b` hold a pair this cycle |
| `a`, `b` | in | N | operands |
| `valid_out` | out | 1 | a new result was written at the last edge |
| `sum` | out | N | speculative sum |
| `cout` | out | 1 | real carry out of the top block |
| `stage_busy` | out | 5 | bit k: stage k+1 is clocked at the next edge (bit 0 is `valid_in` itself) |
| `fault_seen`, `corr_seen`, `bal_seen` | out | N/4-1 | per boundary, travelling with the result: guess missed / repaired / balanced |

Parameters: `N` (default 32, must be a multiple of `X` and at least `2X`) and
`X` (block width, default 4 from `isa_pkg::BLOCK_W`, at least 3).
`isa_pcla` accepts any `X`. The speculator always looks at two bit pairs.

## Files

| file | contents |
|------|----------|
| `rtl/isa_pkg.sv` | block width, number of stages, stage names |
| `rtl/isa_clock_gate.sv` | latch-based clock gate |
| `rtl/isa_gate_ctrl.sv` | per-stage valid chain and gated clocks |
| `rtl/isa_pspec.sv` | pipelined speculator |
| `rtl/isa_pcla.sv` | pipelined X-bit carry-lookahead adder |
| `rtl/isa_pcomp.sv` | pipelined compensator |
| `rtl/isa_pipelined.sv` | the N-bit adder (top) |
| `tb/tb_isa_ref_pkg.sv` | arithmetic reference model of the adder |
| `tb/tb_isa_*.sv` | one self-checking testbench per module; `tb_isa_pipelined` is the end-to-end test at 32 bits, `tb_isa_configs` runs 8, 16 and 32 bits side by side |

## Verification

Every testbench compares the module with values computed independently and
prints `TB_RESULT checks=<n> failures=<m>`:

* `tb_isa_pspec`: all 16 input combinations against the carry of a 2-bit sum.
* `tb_isa_pcla`: the 4-bit block exhaustively (512 cases) and an 8-bit
  instance with random operands, against `a + b + cin`, one clock later.
* `tb_isa_pcomp`: every legal input combination. It checks repair
  (+1 in the upper LSB), balancing (`11` in the lower MSBs) and no change.
* `tb_isa_clock_gate`: enable changes in both clock phases. It checks that
  no pulse is clipped and that gclk is never high while clk is low.
* `tb_isa_gate_ctrl`: bursts, gaps and random traffic against a reference
  shift register, plus the number of edges of every gated clock.
* `tb_isa_pipelined` (32 bits, default parameters): about 470 additions.
  It covers an isolated one, directed repair and balance cases, a
  200-addition stream and random traffic with gaps. It checks every sum and
  carry against the reference model, the five-clock latency and ordering,
  the miss/repair/balance flags, exactness whenever nothing was balanced,
  the exact error `2^(4i+2)` per balanced boundary, and one gated-clock tick
  per stage per addition. It fails if any of these never occurs: an exact
  guess, a repair, a balance, a cycle with gated stages, or a cycle with all
  stages busy.
* `tb_isa_configs`: the 8-, 16- and 32-bit adders on one operand stream.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/isa_pkg.sv tb/tb_isa_ref_pkg.sv tb/tb_isa_pipelined.sv \
    --top-module tb_isa_pipelined -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## How far this follows the published design, and where it departs

Taken from the published design: the split into 4-bit blocks; a
carry-lookahead adder per block; a speculator using the two top bit pairs of
the block below; the compensator's fault detection, its 1-bit incrementor,
demultiplexer and the repair/balance multiplexers with the constant `11`;
one register level inside each of the speculator, the CLA and the
compensator; five pipeline stages; a gated clock for every stage; and the 8-,
16- and 32-bit sizes.

Choices made here, where the published description is silent or not
specific:

* Which logic sits in which of the five stages. The register after the CLA
  and the output register are placed here so that the internal register
  levels line up.
* The exact gates of the speculator. The function, the carry of the top two
  bit pairs, is what matters; an OR or an XOR propagate gives the same guess.
* The compensator's LSB path being one bit wide, and the incrementor's carry
  steering the demultiplexer.
* Carry-in 0 for the lowest block; no carry-in port.
* The `cout` output, the `fault_seen`/`corr_seen`/`bal_seen` observation
  outputs, the valid handshake, the valid-driven gating rule, the latch-based
  clock gate and the reset scheme.

Not reproduced: the FPGA results reported for the design (about 127 MHz on a
Spartan-3E class device, LUT counts and power) need a vendor flow and cannot
be checked by simulation. The non-pipelined version of the adder, which serves
only as the point of comparison, is not included.
