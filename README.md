# Bit-level systolic modular multiplier

This RTL computes **P = A·B mod N** for n-bit operands. A new operand set
(A, B, N) can enter every clock cycle, and each set may use a different
modulus. The arithmetic is Blakley's interleaved shift-add-reduce method. Every
intermediate value stays in carry-save form, so no carry ever ripples across
the word inside the array. To decide whether to subtract, the array estimates
the sign of a carry-save number from its five top bit positions only.

Two arrays are provided. Both implement the design of *Bit-Level Systolic
Arrays for Modular Multiplication* (Koç and Hung):

* a **semi-systolic array**: 3n rows of n+3 one-bit cells, latency 3n. Each
  row sends a bit of A and an estimated sign bit to all of its cells in the
  same cycle.
* a **systolic array**: 3n rows of w = ⌈n/2⌉ nodes, latency 6n + w − 2. Every
  wire is short and goes to a neighbour, so nothing is broadcast. This one is
  the default.

Both produce the same carry-save pair (C, S), bit for bit. A small
final-reduction stage turns that pair into P.

## The arithmetic

Take n = ⌊log2 N⌋ + 1, so that 2^(n−1) ≤ N < 2^n. Require B < N, and let
M = −N. Start with C = S = 0. Then, for each bit of A, from the most
significant bit A_(n−1) down to A_0:

| step | operation | cells |
|---|---|---|
| 2a | (C, S) := 2C + 2S + A_k·B | X |
| 2b | trial (Ĉ, Ŝ) := C + S − 2N; keep it if its estimated sign is ≥ 0 | Y (top 5 positions), Z (rest) |
| 2c | trial (Ĉ, Ŝ) := C + S − N; keep it if its estimated sign is ≥ 0 | U (top 5 positions), W (rest) |

All three steps are single carry-save additions: three words in, a carry word
and a sum word out. Words are n+3 bits wide, in two's complement. That width
holds every intermediate value, which lies in [−2^(n+2), 2^(n+2)). Anything
carried out of the top bit is dropped, so the arithmetic is modulo 2^(n+3).

**Sign estimation.** Let T(X) be X with its low t = n−1 bits cleared. The
estimate is the sign of T(Ĉ) + T(Ŝ):

* T never increases a value, so a trial value that is really ≥ 0 is never
  rejected.
* The estimate can only be wrong by calling a small positive value negative,
  one in [0, 2^t). That error leaves C + S at most 2^t above the exact
  reduction, and the next iteration absorbs it.

After step 2c, C + S < N + 2^(n−1) ≤ 2N. After the last bit of A, the array
therefore delivers 0 ≤ C + S < 2N.

**The L cell (sign estimator).** The cell at position p produces its carry at
weight p+1, so the bits added at weight i are Ĉ_(i−1) and Ŝ_i. The sign bit
R (1 = negative) is

```
P_i = Ĉ_(i−1) | Ŝ_i        G_i = Ĉ_(i−1) & Ŝ_i
R   = Ŝ_(n+2) ^ Ĉ_(n+1) ^ ( G_(n+1) | G_n·P_(n+1) | G_(n−1)·P_n·P_(n+1) )
```

This is a 3-bit carry look-ahead over weights n−1 .. n+1 that feeds the sign
position n+2. It reads Ĉ from positions n−2 .. n+1 and Ŝ from positions
n−1 .. n+2, so its delay does not depend on n.

**Keeping or rejecting a trial sum.** When R = 1, a cell does not simply keep
its old (S, C) bits. It re-encodes them as (S^C, S&C), which has the same
value. This lets the Z and W cells be ordinary full adders whose M input is
gated by ¬R:

| cell | outputs |
|---|---|
| X | S' = AB ⊕ S ⊕ C, C' = maj(AB, S, C) |
| Y, U | Ĉ = maj(M, S, C), Ŝ = M ⊕ S ⊕ C; C' = R ? S·C : Ĉ, S' = R ? S⊕C : Ŝ |
| Z, W | S' = (¬R·M) ⊕ S ⊕ C, C' = maj(¬R·M, S, C) |

In 2b rows the M input of a cell at position p is bit p−1 of M, because that
row subtracts 2N. In 2c rows it is bit p.

**Final reduction.** Two carry-propagate additions give P = C + S and
P̂ = C + S + M = C + S − N. P̂ is chosen when it is non-negative, otherwise P.
The stage registers its output, which adds one cycle.

Worked example, n = 6: 47·48 mod 50. The array returns C = 100000000 and
S = 100111000, that is −256 + (−200) = 56 in 9-bit two's complement.
56 − 50 = 6 is non-negative, so 6 is selected.

## Semi-systolic array (`mm_semi_array`, `mm_semi_stage`)

Each stage handles one bit of A and consists of three rows of n+3 cells: X,
then Y/Z, then U/W. Each row ends in a register. The L cell of a row reads
that row's five Y (or U) cells. Its R goes to every cell of the row in the
same cycle, and so does the bit of A in the X row. n stages are cascaded.

Stage k uses A_(n−1−k) three cycles after stage k−1 used its bit, so the bits
of A pass through a triangle of 0, 3, 6, … delay registers on their way in.
B and M move down the array with the data. The latency is 3n, and a new
operand set can enter every cycle. The cost is that A and R must reach n+3
cells within one clock.

## Systolic array (`mm_sys_array`)

This is the part that needs the most care to follow.

**Grouping into nodes.** The five top positions of each row become one
supercell:

* X^5 in X rows;
* LY^5 in 2b rows: five Y cells plus L;
* LU^5 in 2c rows: five U cells plus L.

The remaining n−2 positions are paired into X^2, Z^2 and W^2 nodes. Each row
then has w = ⌈n/2⌉ nodes. Column i counts from the least significant end, and
column w−1 is the supercell.

With this grouping, every value one row passes to the next lands in the same
column or in the column one step more significant:

* sums and carries shifted by one or two positions;
* M shifted by one position to make 2N;
* carries of the doubled partial product.

**Schedule.** Node (i, j), in column i and row j, computes in cycle

```
t(i, j) = 2j − i + w − 1
```

Each node registers its outputs. Reading off the time differences gives the
register counts:

| path | cycles | registers |
|---|---|---|
| A (X rows) and R (2b and 2c rows), one column toward the LSB | +1 | the node's own register |
| straight down to the same column (B, M, sums) | +2 | node register + one delay |
| down and one column toward the MSB (carries, M shifted for 2N) | +1 | node register only |

So the supercell computes R, and R then walks toward the least significant
end one column per cycle, reaching each Z^2/W^2 node exactly when that node
runs. A behaves the same way in X rows. The last node finishes at
t(0, 3n−1) = 6n + w − 3, giving a latency of **6n + w − 2** cycles: 37 for
n = 6. Throughput is still one operand set per cycle.

Cycle in which each node of the n = 6 array computes (w = 3):

| row j | column 2 (supercell) | column 1 | column 0 |
|---|---|---|---|
| 0 | 0 | 1 | 2 |
| 1 | 2 | 3 | 4 |
| … | +2 per row | | |
| 17 | 34 | 35 | 36 |

**Plain-word ports.** Inside the module, delay lines skew the operands on the
way in:

* B and M of column i wait w−1−i cycles;
* A_(n−1−k) waits 6k cycles.

On the way out, output bit positions held by column i are delayed by i more
cycles. As a result, the systolic array has the same port-level behaviour as
the semi-systolic one, differing only in its latency.

**Odd n.** The n−2 low positions cannot all be paired. Column 0 then holds
bit 0 alone, and the pairs are (1,2), (3,4), and so on. This keeps every arc
within one column step. Odd sizes are tested (n = 7).

## Interface of `mm_modmul_top`

| parameter | default | meaning |
|---|---|---|
| `N_BITS` | 6 | n, the size of the modulus (the worked-example size) |
| `SYSTOLIC` | 1 | 1: systolic array; 0: semi-systolic array |

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the valid flags only) |
| `in_valid` | in | 1 | an operand set is present this cycle |
| `a`, `b` | in | n | A (any n-bit value) and B (< N) |
| `m` | in | n | low n bits of −N, i.e. 2^n − N; the three bits above are always 1 and are added inside |
| `cs_valid`, `c`, `s` | out | 1, n+3, n+3 | carry-save result, C aligned by weight (c[0] = 0) |
| `p_valid`, `p` | out | 1, n | A·B mod N |

**Timing.** An operand set captured at clock edge 0 appears on `c`/`s` after
edge L, where L = 6n + ⌈n/2⌉ − 2 (systolic) or L = 3n (semi-systolic). It
appears on `p` one edge later.

**Operand rules.** Require 2^(n−1) ≤ N < 2^n and B < N. An assertion in
`mm_final_reduce` checks the 0 ≤ C + S < 2N guarantee on every valid result.

The arrays have the same ports, minus `p`, plus `m_out`: the M of the
finished operand set, which the final stage uses.

## Files

| file | contents |
|---|---|
| `rtl/mm_pkg.sv` | widths, latencies, column mapping of the systolic array, row kinds |
| `rtl/mm_cell_x.sv`, `mm_cell_y.sv`, `mm_cell_z.sv`, `mm_sign_est.sv` | X, Y/U, Z/W and L cells (combinational) |
| `rtl/mm_super_x.sv`, `mm_super_z.sv`, `mm_super_ly.sv` | X^K, Z^K/W^K and LY^5/LU^5 nodes of the systolic array |
| `rtl/mm_semi_stage.sv`, `mm_semi_array.sv` | semi-systolic stage and array |
| `rtl/mm_sys_array.sv` | systolic array with its input/output delay lines |
| `rtl/mm_delay.sv` | register chain used for skewing |
| `rtl/mm_final_reduce.sv` | C+S vs C+S−N selection |
| `rtl/mm_modmul_top.sv` | array + final reduction |
| `tb/tb_*.sv` | one self-checking testbench per module; `mm_tb_array_run.sv` is a reusable driver/checker for the arrays |

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Expected values
are computed in the testbench with plain integer arithmetic, not by a model of
the cells.

* **Cells, L, supercells:** exhaustive over all input combinations (LY^5:
  all 2^15), or random where the input space is larger.
* **`tb_mm_semi_stage`:** one stage, fully pipelined. Each output must equal
  2(C+S) + A_k·B − kN for some k in 0..3 and lie in [0, N + 2^(n−1)). Every
  k occurs.
* **`tb_mm_semi_array`, `tb_mm_sys_array`:** random streams with idle gaps, at
  n = 4, 6, 7, 8, 16 and 32 (systolic) and up to n = 64 (semi-systolic).
  They check the residue and range of C + S, the exact latency, and that
  every operand set produces exactly one result.
* **`tb_mm_modmul_top`:** both variants of the top run side by side on one
  stream that starts with the worked example. It checks P, the range of C+S,
  both latencies, and that the two arrays agree bit for bit. It also counts
  the design's mechanisms and fails if any never occurs: both sign-estimate
  outcomes in the supercells, both final selections, back-to-back operands,
  idle gaps, and a change of modulus between consecutive operands.
* **`tb_mm_modmul_sizes`:** the whole multiplier, final reduction included,
  at other sizes: n = 4 and 8 (semi-systolic), n = 8 and 32 (systolic), and
  n = 64 (semi-systolic).
* **`tb_mm_modmul_full`:** the top with no parameter overridden, on the
  worked example plus 1000 back-to-back random products.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mm_pkg.sv tb/tb_mm_modmul_top.sv --top-module tb_mm_modmul_top
./obj_dir/Vtb_mm_modmul_top
```

## Departures and choices not fixed by the algorithm

* **Input form of N.** The modulus enters as the low n bits of −N. The top
  three bits of −N are constant 1 for any n-bit N, so they are generated
  inside.
* **M at the output.** M travels down with the data and leaves with the
  result, so the final reduction always uses the right modulus, even when N
  changes every cycle.
* **Control added for usability.** A valid flag travels with each operand set
  and is the only reset state. The data registers are not reset.
* **Final reduction.** It is written with plain `+` operators and registered.
  Its adder structure is left to synthesis.
* **Skew inside the systolic array.** The skew and de-skew delay lines are
  part of `mm_sys_array`, so its ports take and return aligned words.
* **Bit-level differences from a literal reading of the algorithm.** When a
  trial subtraction is rejected, the cells re-encode (S, C) instead of
  holding it. The value of C + S is unchanged, but individual C and S bits can
  differ from a step-by-step hand calculation of the algorithm. For
  47·48 mod 50, a literal step-by-step run keeps (C, S) = (184, −128). The
  cells return (−256, −200) instead, and both sum to 56.
* **Size.** n is a parameter with no built-in limit. Verilator build time
  grows roughly with n² for the systolic array: about 13 s at n = 16 and
  36 s at n = 32. RSA-sized moduli (n ≥ 664, which means 1992 rows of 332
  nodes) have not been simulated.
