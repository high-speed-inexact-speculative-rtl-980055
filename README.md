# Fine-grain pipelined inexact speculative adder

A normal adder's delay grows with its width because a carry can ripple from bit 0 to the top
bit. An inexact speculative adder (ISA) caps that chain. It cuts the operands into 4-bit
blocks and adds all blocks at the same time. It guesses each block's carry in from a few bits
just below the block, and then repairs most wrong guesses afterwards. No carry crosses more than
one block, so the critical path stays the same as the adder gets wider. The price is a sum that
is sometimes slightly wrong. This version goes further and pipelines every sub-block. The
result is five short pipeline stages with one addition accepted per clock.

Two versions of the 4-bit block adder are provided:

* a **Brent-Kung** parallel-prefix adder (`pbka4`). This is the default, and it is the final
  version of the architecture.
* a **carry look-ahead** adder (`pcla4`). This is the earlier version. It is selected with
  `ADDER = ADDER_CLA` and is tested at 32 bits.

## How a sum is formed

Take an `N`-bit addition `a + b + cin`, with `N` a multiple of 4 (16 by default). It is split
into blocks `k = 0 .. N/4-1`, each covering bits `4k+3 .. 4k`.

1. **Speculation** (`pspec`, one per block boundary, `k >= 1`). The carry into block `k` is
   guessed from the two top bit pairs of block `k-1` alone, with the carry into those two bits
   taken as 0:

       c_spec(k) = g(4k-1) | p(4k-1) & g(4k-2)      g = a & b,  p = a ^ b

   If these two bits generate a carry, that carry is certain, so a guess of 1 is never wrong.
   A guess of 0 is wrong when a carry starts lower in block `k-1` and passes through both bits.
   So with this speculator the adder can only miss carries. It never adds a carry that
   should not be there.

2. **Block addition** (`pbka4` or `pcla4`). Block 0 adds with the real `cin`. Every other block
   adds with its guessed carry. Each block also produces its own carry out.

3. **Compensation** (`pcomp`, one per boundary). The XOR of block `k-1`'s carry out and the
   carry guessed into block `k` is the error flag. When it is set, the compensator does one of
   two things:
   * **Correction.** Block `k`'s sum is stepped by one towards the true value: +1 for a missed
     carry, -1 for a carry that was wrongly assumed. If the step stays inside the block, the
     result is exact.
   * **Reduction (balancing).** If the block sum is already `1111`, a +1 would leave the block.
     In that case block `k-1` is forced to `1111` instead (or to `0000` in the -1 case). This
     moves the result as close to the true sum as block `k-1` allows.

   Both directions are built. With the speculator above, only the +1 / `1111` direction ever
   occurs inside the ISA. The unit test of `pcomp` exercises all four cases.

4. **Merging.** Block `k` can receive a correction from the compensator below it and a forced
   value from the compensator above it in the same cycle. When both happen, the forced value
   wins.

Example: `0x00FF + 0x0001`. Block 0 carries out, but its bits 3:2 (`11` + `00`) only propagate,
so block 1 was given carry 0. Block 1 is `F + 0 = 1111`, which cannot take +1. So block 0 is
forced to `1111`. The result is `0x00FF` against the exact `0x0100`.

### Accuracy

A result can be wrong only through a reduction. The error then comes from the values before
compensation, not from a further carry chain. For a single reduction at boundary `k`, the result
is below the exact sum by `(s + 1) * 16^(k-1)`, where `s` is block `k-1`'s uncompensated sum.
This is never more than `16^k`. The `fault`, `corrected` and `reduced` outputs show which blocks
were affected.

The following figures come from running the reference model of the testbench on 200,000 uniform
random operand pairs:

| N  | additions with a mis-speculated carry | additions with an inexact result |
|----|---------------------------------------|----------------------------------|
| 16 | 32 %                                  | 2.2 %                            |
| 32 | 60 %                                  | 5.0 %                            |

Operands whose carries seldom travel far are exact far more often.

## Pipeline

There are five stages between six register levels, and the adder accepts one operand pair
per clock:

| level / stage | what happens |
|---|---|
| L1 | input register: `a`, `b`, `cin` |
| S1 | speculators, first half (`g`, `p` of the two bits) -> register inside `pspec` (L2) |
| S2 | speculators, second half (`c_spec`), and, in parallel, block adders' first half on the operands delayed to L2 -> L3 |
| S3 | block adders' second half: the carry in (`cin` or `c_spec`) is folded in, giving block sums and carry outs -> L4 |
| S4 | compensators, first half: error flag, direction, the stepped sum, and whether the step fits -> register inside `pcomp` (L5) |
| S5 | compensators, second half (multiplexers) and the per-block merge -> L6 output register |

A result is in the output register `LATENCY = 6` clock edges after its operands were sampled.
`out_valid` is `in_valid` delayed by the same amount. Each block adder has its internal register
placed *before* the carry in. This lets the speculated carry, which itself needs one register
stage, enter in the next cycle, and it is what makes five stages possible rather than six.

## Modules

| file | module | role |
|---|---|---|
| `rtl/isa_pkg.sv` | package | `BLK = 4`, `LATENCY = 6`, the `adder_kind_e` enum, the `gp_t` generate/propagate pair, and the black and gray prefix cells |
| `rtl/bk_prefix.sv` | `bk_prefix #(W = 8)` | Brent-Kung prefix network (combinational). A forward tree builds the 2-, 4-, 8-bit prefixes, and a reverse tree fills in the rest: `2*log2(W)-1` cell levels, fan-out at most 2. `W` must be a power of two |
| `rtl/pspec.sv` | `pspec` | two-stage carry speculator |
| `rtl/pbka4.sv` | `pbka4` | 4-bit two-stage Brent-Kung adder: `bk_prefix #(4)`, then a register, then gray cells for the carry in and the sum XORs |
| `rtl/pcla4.sv` | `pcla4` | 4-bit two-stage carry look-ahead adder: flat sum-of-products group terms, then a register, then the carry in and the sum XORs |
| `rtl/pcomp.sv` | `pcomp` | two-stage compensator |
| `rtl/isa_top.sv` | `isa_top #(N = 16, ADDER = ADDER_BKA)` | the whole adder |

Ports of `isa_top`:

* inputs: `clk`, `rst_n` (active-low, asynchronous), `in_valid`, `a[N-1:0]`, `b[N-1:0]`, `cin`
* outputs: `out_valid`, `sum[N-1:0]`, `cout`
* per-block flags, bits `N/4-1 .. 1`, aligned with the result on the outputs:
  * `fault` – the carry guessed into the block was wrong
  * `corrected` – the block was stepped by one
  * `reduced` – the error was balanced into the block below

`cout` is the carry out of the top block before compensation. Only the valid pipeline is reset;
the datapath registers are not.

## Where this RTL makes its own choices

The published architecture fixes the following:

* the 4-bit block size
* the 16-bit main configuration and the 32-bit carry look-ahead version
* the speculator's two-bit look-ahead window and its carry look-ahead function
* the XOR error flag and the correct-or-reduce choice made through a de-multiplexer and
  multiplexers
* two pipeline halves per sub-block, five stages and six register levels

The following are choices made for this RTL:

* **Where each register sits inside a sub-block.** In both adders the carry in enters after the
  register. The look-ahead drawing of the original appears to feed the carry in before its
  register level. This RTL does not reproduce the original's claim that the critical path is
  four two-input gates (one XOR, three AND). The flat look-ahead terms here are up to
  4-input AND/OR functions before the register, and the synthesis tool maps them as it likes.
* **How the stages overlap** (the table above).
* **When to reduce rather than correct:** exactly when the ±1 step would leave the block.
* **How much is balanced:** the whole lower block.
* **Merge priority:** a forced value beats a correction.
* **Other additions:** the valid pipeline, the reset, the flag outputs, and `cout` taken before
  compensation.
* **Prefix cells:** every prefix cell is a full black cell, so that the group propagate is
  available for a later carry in. The buffers of the textbook Brent-Kung drawing are left out.

Not built:

* the conventional (unpipelined) ISA, which serves only as the baseline
* the transistor-level CMOS and transmission-gate cells and their layout
* the FPGA synthesis results

## Testbenches

Every testbench checks against values computed independently of the RTL. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_bk_prefix.sv` | exhaustive 8-bit and random 16-bit checks of every prefix generate and propagate against integer carries |
| `tb/tb_pspec.sv` | all 16 input combinations and random inputs; one-cycle latency |
| `tb/tb_pcla4.sv`, `tb/tb_pbka4.sv` | all 512 combinations of `a`, `b`, `cin` back to back, with `cin` arriving one cycle after the operands; latency |
| `tb/tb_pcomp.sv` | all 1,024 input combinations; requires each of +1, -1, reduce to `1111` and reduce to `0000` to occur |
| `tb/tb_isa_top.sv` | default 16-bit Brent-Kung adder end to end (see below) |
| `tb/tb_isa_cla32.sv` | the same test on the 32-bit carry look-ahead version |

`tb/isa_ref_pkg.sv` is the integer reference model that both end-to-end tests use.

Each end-to-end test starts with directed pairs that force an exact sum, a correction and a
reduction. It then sends 20,000 random pairs, with idle gaps and long back-to-back runs. It
checks:

* every sum, carry and flag
* the 6-edge latency and the order of results
* one result per clock
* that a result with no fault flag is exact

It fails if any of faults, corrections, reductions, exact results, inexact results or
back-to-back results never occurred.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/isa_pkg.sv tb/isa_ref_pkg.sv \
        tb/tb_isa_top.sv --top-module tb_isa_top -Mdir obj_isa -o sim
    ./obj_isa/sim

The unit testbenches need only `rtl/isa_pkg.sv` and their own file on the command line; `-Irtl`
finds the rest. To try another width or the other adder, override `N` (a multiple of 4, at
least 8) and `ADDER` on `isa_top`. The reference model handles `N` up to 64.
