# CRT residue-to-binary converter with a memoryless modulo-M reduction

A residue number system (RNS) holds an integer X in [0, M) as its remainders
x_j = X mod m_j for pairwise co-prime moduli m_1..m_n, M = m_1·…·m_n.
Arithmetic in an RNS is fast because every digit is processed on its own,
but turning the digits back into a binary number is expensive. This design
does that reverse conversion with the Chinese Remainder Theorem (CRT):

    X = | X_1 + X_2 + ... + X_n |_M ,   X_j = | x_j · N_j |_{m_j} · M_j ,
    M_j = M / m_j ,   N_j = M_j^{-1} mod m_j .

The costly part of the CRT is the final "mod M" of a sum that can reach n·M.
The converter never builds a full-width adder and comparator for it. Instead
it keeps the sum in carry-save form, cuts both vectors into a low part that
is always below M and a short high part, reduces only the high part with a
tiny table, and ends with one subtraction of M that is chosen or discarded.
All tables are made of logic, not memory, and every step is at most one
full-adder delay deep between registers. As a result the converter accepts
one new residue word per clock.

The default configuration is the 8-moduli base

    {32, 31, 29, 27, 25, 23, 19, 17},  M = 144 259 293 600  (37.07 bits)

with 5-bit residue digits (A = 5) and a 38-bit result (B = ceil(log2 M) = 38).
The RTL is generic in the base (see *Other bases*).

## Datapath

```
 x_n ... x_1 (A bits each)
   |        |
 LT_n ... LT_1          projections X_j, B bits each          (lt_projection)
   \        /
     CSA1               n-operand Wallace tree -> save S, carry C, W bits (csa_tree)
   /    |    \
 C_H+S_H  C_L   S_L      split of both vectors at bit B-2
   |      |     |
 CPA1     |     |       5-bit ripple-carry add of the high parts   (rca)
   |      |     |
 LT_N+1   |     |       |(C_H+S_H)·2^(B-2)|_M                      (lt_modm)
    \     |     /
      CSA2              S4 + C4 = S3 + C_L + S_L  (< 2M)           (csa_3to2)
     /     \
   CPA2    CSA3         CSA3 adds 2^B - M                          (csa_add_const)
    |        |
    |      CPA3         S6 = S4 + C4 + 2^B - M  (B+1 bits)         (cpa_prefix)
    |        |          S7 = S4 + C4            (B bits, CPA2)     (cpa_prefix)
     \      /
      MUX1              X = S6[B] ? S6[B-1:0] : S7                 (mux2)
```

### Why the reduction works

For the default base the numbers are:

| quantity | value |
|---|---|
| W, Wallace tree width = ceil(log2(n·M)) | 41 |
| split point B-2 | 36 |
| C_L, S_L | 36 bits each, C_L + S_L ≤ 2^37 - 2 < M |
| C_H, S_H | bits 36..40, 5 bits each |
| CPA1 width (l_CPA + 1 with l_CPA = ceil(log2 nM) - ceil(log2 M) + 1) | 5 |

1. **The low parts cannot exceed M.** M > 2^(B-1) because B is the
   rounded-up log2 of M. Two (B-2)-bit numbers add up to less than 2^(B-1).
   So C_L + S_L < M.
2. **The high parts need only a 5-bit adder.** C + S equals the projection
   sum, which is below n·M < 2^W. Therefore (C_H + S_H)·2^(B-2) ≤ C + S < 2^W,
   so C_H + S_H < 2^(W-B+2) = 2^5. CPA1 never carries out. The top module
   asserts this in simulation.
3. **The high part is reduced by a 32-entry table.** LT_N+1 maps the 5-bit
   sum v to |v·2^36|_M < M. In this way a large modulo-M generator on the
   high bits of C and S becomes a 5-input logic function.
4. **One conditional subtraction finishes the job.** S3 + C_L + S_L < 2M, so
   X is either that sum or that sum minus M. CSA3 adds 2^B - M, and the
   (B+1)-bit CPA3 then forms S6 = S4 + C4 - M + 2^B. Bit B of S6 is 1 exactly
   when S4 + C4 ≥ M. In that case the low B bits of S6 are X. Otherwise CPA2's
   S7 = S4 + C4 is X. The two adders work in parallel.

CSA2, CSA3 and CPA3 are B+1 bits wide. S4 + C4 can reach 2M, which for this
base is above 2^38, so B bits would lose information.

## Look-up tables without memory (LF blocks)

Every table (LT_1..LT_n and LT_N+1) is a bank of *LF blocks*
(`lf_block`). Each LF block holds L logic functions of the same Q input
variables. A projection table with A = 5 input bits and B = 38 output bits
is ceil(38/5) = 8 LF blocks of five 5-variable functions. The top two outputs
of the last block are constant 0.

Inside an LF block each function is split by Shannon expansion:

* a shared *implicant generator* decodes the low Q-2 variables into their
  2^(Q-2) minterms (8 for Q = 5). All functions of the block share it;
* each output has four (Q-2)-variable functions, one per value of the two top
  variables. Each is the OR of the minterms where its truth table holds a 1;
* x[Q-2] selects between pairs of them (giving two (Q-1)-variable
  functions), and x[Q-1] selects the final value.

The truth tables are computed at elaboration from the moduli. No table data
is stored in the source: LT_j uses the projection formula above, with N_j
found by searching for the inverse, and LT_N+1 uses |v·2^(B-2)|_M. A residue
value at or above its modulus is not a valid digit. The table reduces it
modulo m.

## Pipeline and timing

With `PIPE = 1` (default) there is a register after every step of about one
full-adder delay:

| stage | registers | cycles (default base) |
|---|---|---|
| LT_1..LT_n | after the (Q-2)-variable functions and after the muxes | 2 |
| CSA1 | after each 3:2 layer (8 → 6 → 4 → 3 → 2) | 4 |
| CPA1 | after each full adder (bit-level pipelined ripple adder) | 5 |
| LT_N+1 | as LT_j | 2 |
| CSA2 | output | 1 |
| CSA3 | output | 1 |
| CPA3 / CPA2 | after each Kogge-Stone prefix level, ceil(log2 39) = ceil(log2 38) | 6 |
| MUX1 | output | 1 |
| **total** | | **22** |

Values that bypass a pipelined block are delayed by `delay_line` so they stay
in step:

* C_L and S_L wait for CPA1 and LT_N+1 (7 cycles).
* CPA2's result waits one cycle, CSA3's register, to meet CPA3's result.

The converter takes one word per cycle and has no back-pressure.

With `PIPE = 0` the whole datapath is combinational, `out_valid` equals
`in_valid` and `clk` is not used.

### Interface (`crt_r2b_converter`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | synchronous, active-low; clears only the valid pipeline |
| in_valid | in | 1 | a residue word is present this cycle |
| residue | in | N × A (8 × 5) | `residue[j]` = X mod `MODULI[j]` |
| out_valid | out | 1 | `x` holds a result, LATENCY cycles after its input |
| x | out | B (38) | X in [0, M) |

Datapath registers have no reset. Only the valid flag is reset. A result is
therefore meaningful only when `out_valid` is 1.

## Other bases

Parameters of the top: `N`, `MODULI[N]`, `A`, `B`, `PIPE`. A and B are
derived quantities: A = ceil(log2 of the largest modulus) and
B = ceil(log2 M). They are parameters only because port widths depend on
them. Elaboration fails with an error if they do not match `MODULI`.
Everything else is derived from these parameters:

* M;
* the tree width W = ceil(log2(N·M));
* the CPA1 width W - B + 2;
* the constant 2^B - M;
* all tables and latencies.

The latency functions are in `crt_pkg`.

Limits of the generic form:

* N ≥ 3.
* The CPA1 width W - B + 2 must be at least 3, because that is the input
  count of LT_N+1's LF blocks.
* M must fit in 64 bits together with the table arithmetic.
* The moduli must be pairwise co-prime. This is not checked.

The test suite also runs {7,5,3,2} (M = 210, combinational) and
{31,29,27,25,23} (M = 13 956 975, pipelined, latency 20).

## Modules

| file | role |
|---|---|
| `rtl/crt_pkg.sv` | default base, constants, Wallace-tree sizing, latency functions, modular inverse |
| `rtl/crt_r2b_converter.sv` | top: wires the datapath, bypass delays, valid pipeline, CPA1 overflow assertion |
| `rtl/lt_projection.sv` | LT_j, projection table of one modulus |
| `rtl/lt_modm.sv` | LT_N+1, modulo-M generator for the high-segment sum |
| `rtl/lf_block.sv` | LF block: Q-variable logic functions with shared implicant generator |
| `rtl/csa_tree.sv` | CSA1, N-operand Wallace tree |
| `rtl/rca.sv` | CPA1, ripple-carry adder, optionally bit-level pipelined |
| `rtl/csa_3to2.sv` | CSA2, one 3:2 layer |
| `rtl/csa_add_const.sv` | CSA3, carry-save addition of a constant, using simplified full adders |
| `rtl/cpa_prefix.sv` | CPA2/CPA3, Kogge-Stone adder, optionally pipelined per prefix level |
| `rtl/mux2.sv` | MUX1, final selection |
| `rtl/delay_line.sv` | alignment delays and the valid pipeline |

## Simulation

Each testbench in `tb/` checks its results against values it computes itself
and prints `TB_RESULT checks=<n> failures=<n>`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/crt_pkg.sv tb/tb_crt_r2b_converter.sv --top-module tb_crt_r2b_converter
./obj_dir/Vtb_crt_r2b_converter
```

* `tb_crt_r2b_converter` checks the default configuration end to end. It runs
  20,000 random values plus edge values (0, 1, M-1, …), mostly back to back
  with random idle cycles. Each result must be exact and must arrive after
  exactly 22 cycles. The test also requires each of the following to have
  happened at least once:
  * both outcomes of the final selection (M subtracted or not);
  * a non-zero high-segment sum;
  * back-to-back inputs;
  * idle cycles.
* `tb_crt_r2b_bases` runs the two other bases described above.
* `tb_lf_block`, `tb_lt_projection`, `tb_lt_modm`, `tb_csa_tree`, `tb_rca`,
  `tb_csa_3to2`, `tb_csa_add_const`, `tb_cpa_prefix` and `tb_mux2` test the
  blocks. Each covers pipelined and combinational instances where the block
  has both, and checks latencies.

All of them finish in well under a second.

## Design choices and departures

* **Register placement.** The structure calls for pipelining at the
  full-adder level with registers inside the look-up blocks. The exact
  placement used here (table above), the valid flag and the lack of
  back-pressure are this design's choices.
* **LF block internals.** The arrangement follows the description: two
  multiplexed 4-variable functions per 5-variable function, each made of two
  multiplexed 3-variable functions over a shared implicant generator. The
  implicant generator as a full minterm decoder and the gate-level form are
  this design's own.
* **CPA2/CPA3.** These are meant to be log-depth "column compression" adders
  with size about k·log2 k full adders. Their construction is not given, so
  a Kogge-Stone prefix adder of the same orders is used.
* **CPA1** is a ripple-carry adder as intended. Its bit-level pipelining is
  this design's choice.
* **Widths.** The Wallace tree, CSA2, CSA3 and CPA3 are wider than the b bits
  a block diagram of this converter would suggest: W = 41 for the tree and
  B+1 = 39 for the final stages. The arithmetic needs these widths (see
  *Why the reduction works*).
* **Final selection.** X is taken as the low B bits of S6 when its bit B is
  set. That is S4 + C4 - M, the two's-complement reading of "select the CPA3
  result when it carries out".
* **Not modelled.** The ROM-based variant of the same algorithm and the
  earlier ROM-based converter it is compared with are not part of this
  design. Area and delay figures in standard-cell or FPGA terms are estimates
  and are not reproduced. The full-adder counts of this RTL differ from such
  estimates; synthesise it to measure them.
