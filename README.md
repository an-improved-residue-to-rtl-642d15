# Residue-to-binary converter for the moduli {2^k+1, 2^k, 2^k−1}

In residue number system (RNS) arithmetic, a number X is stored as its
remainders r1 = X mod (2^k+1), r2 = X mod 2^k and r3 = X mod (2^k−1). Adding and
multiplying are cheap in this form. Converting back to binary is the expensive
step. This RTL does that conversion for any k ≥ 2 with one carry-save row and
one modulo 2^(2k)−1 adder. Everything before the adder is wiring, inverters
and k OR gates.

The dynamic range is M = (2^k+1)·2^k·(2^k−1) = 2^(3k) − 2^k. The output is X
itself, 0 ≤ X < M, as a 3k-bit number.

## The idea

For this moduli set the Chinese remainder theorem simplifies to

    X = floor(X / 2^k) · 2^k + r2

So the low k bits of X are r2, unchanged. Only the upper 2k bits, H = floor(X / 2^k),
need arithmetic. H is less than 2^(2k)−1, so computing it modulo 2^(2k)−1
gives it exactly:

    H = | (C − r1) + B + A |  mod 2^(2k)−1
    A = (2^(2k−1) + 2^(k−1)) · r3
    B = (2^(2k) − 2^k − 1) · r2  ≡ −2^k · r2
    C − r1 = (2^(2k−1) + 2^(k−1) − 1) · r1

Two facts about arithmetic modulo 2^(2k)−1 turn all of this into wiring:

* 2^(2k) ≡ 1, so multiplying by 2^m is a cyclic left rotation by m bits of a
  2k-bit word.
* −v is the ones complement of v.

The terms C − r1 and B, which would be three 2k-bit numbers, are folded into two
words. Their bits do not overlap except in known positions. Also, r1 ≤ 2^k, so
its top bit c_k is never set together with any other bit of r1. With
r1 = c_k…c_0, r2 = b_(k−1)…b_0, r3 = s_(k−1)…s_0 and ĉ_i = c_i OR c_k, the three
operands are (most significant bit first):

| word   | bits (2k in total)                                        | from |
|--------|-----------------------------------------------------------|------|
| `op_c` | ~c_0, ĉ_(k−1)…ĉ_0, ~c_(k−1)…~c_1                         | r1   |
| `op_b` | b_(k−1), ~b_(k−2)…~b_0, ~b_(k−1), b_(k−1) repeated k−1 times | r2   |
| `op_a` | s_0, s_(k−1)…s_0, s_(k−1)…s_1                             | r3   |

`op_c + op_b` is congruent to (C − r1) + B, and `op_a` equals A. `op_a` is r3
rotated left by k−1 places; inside a 2k-bit word that rotation is just the
concatenation shown.

Worked example, k = 3, modulus 63: for r1 = 3 and r2 = 3, op_c = 001110 = 14 and
op_b = 000100 = 4. Their sum, 18, equals |(2^5 + 2^2 − 1)·3 − 2^3·3| mod 63. The
testbench checks exactly this.

## Datapath

    r1 ─┐                 ┌──────────┐   ┌────────────┐   ┌─────────┐
    r2 ─┼─► operand_gen ─►│ csa_eac  │──►│  eac_cpa   │──►│zero_fix │──► x[3k-1:k]
    r3 ─┘   (3 × 2k bits) │ 2k FAs   │s,c│ 2k-bit CPA │   │         │
                          └──────────┘   └────────────┘   └─────────┘
    r2 ─────────────────────────────────────────────────────────────► x[k-1:0]

**Carry-save row with end-around carry (`csa_eac`).** There are 2k full adders,
one per bit position. Each takes the same-weight bit of the three operands.
The carry out of adder i has weight 2^(i+1). The carry out of the top adder
has weight 2^(2k) ≡ 1, so it goes to bit 0. The carry vector is therefore the
full-adder carries rotated left by one.

**Carry-propagate adder with end-around carry (`eac_cpa`).** This adder adds
the sum and carry vectors modulo 2^(2k)−1. In principle this is a binary adder
whose carry-out is wired to its own carry-in. That wire would be a
combinational loop, so the RTL computes the value the loop settles to:

* The end-around carry is the group generate G[2k−1:0] of the whole word.
* The carry into bit i is G[i−1:0] | (P[i−1:0] & G[2k−1:0]).

The group terms come from a Kogge-Stone parallel-prefix tree with ⌈log2 2k⌉
levels. If a + b = 2^(2k)−1 exactly, every bit propagates and none generates,
so no carry circulates. The result is then all ones, the same as a wired loop
would give.

**Zero removal (`zero_fix`).** A 2k-bit modulo 2^(2k)−1 result has two codes
for zero: all zeros and all ones. An AND of all bits detects the all-ones
word, and d_i = ~(AND of all bits) & a_i clears it. Any other word passes
through unchanged. In the converter, the all-ones code comes out exactly when
X < 2^k, i.e. when H = 0.

**Output.** x = {H, r2}.

## Cost model

The converter's cost is estimated in full-adder units (delay D_FA, area
A_FA). A k-bit carry look-ahead adder is assumed to have delay (log2 k + 1)·D_FA
and area k·log2 k·A_FA. A modulo adder is charged (1 + β) times the delay of a
2k-bit adder. On that basis:

* delay D = [(1 + β)(log2 k + 2) + 1]·D_FA;
* area A = 2k(log2 k + 2)·A_FA.

Zero removal is left out of both figures. With β = 0.7 the tabulated figures are (the area formula gives one unit less than the table):

| k  | delay (D_FA) | area (A_FA), as tabulated |
|----|--------------|-------------|
| 4  | 7.8          | 33          |
| 8  | 9.5          | 81          |
| 16 | 11.2         | 193         |

Compared with the same model applied to two earlier three-modulus converters,
this is at least a 40 % area saving and about 45 % less delay. These are model
figures, not measurements of this RTL. The Kogge-Stone adder used here is
larger than the k·log2 k model: it has about 2k·log2(2k) prefix cells.

## Files

| file | module | role |
|------|--------|------|
| `rtl/r2b_pkg.sv` | package | default sizes `K_DEFAULT = 8`, `W_DEFAULT = 16` |
| `rtl/r2b_converter.sv` | `r2b_converter #(K)` | top: residues in, X out |
| `rtl/operand_gen.sv` | `operand_gen #(K)` | the three 2k-bit operands |
| `rtl/mod_add3.sv` | `mod_add3 #(W)` | modulo 2^W−1 three-operand adder |
| `rtl/csa_eac.sv` | `csa_eac #(W)` | carry-save row with end-around carry |
| `rtl/full_adder.sv` | `full_adder` | one-bit full adder |
| `rtl/eac_cpa.sv` | `eac_cpa #(W)` | prefix adder with end-around carry |
| `rtl/zero_fix.sv` | `zero_fix #(W)` | all-ones-to-zero correction |

Top-level ports of `r2b_converter`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `r1` | in  | K+1 | X mod (2^K+1), 0…2^K |
| `r2` | in  | K   | X mod 2^K |
| `r3` | in  | K   | X mod (2^K−1), 0…2^K−2 |
| `x`  | out | 3K  | X, 0…M−1 |

Every block is combinational. There is no clock and no reset. The critical
path is one inverter/OR level, one full adder, the prefix adder and the
2k-input AND of the zero removal. To pipeline the converter, registers can be
inserted between `csa_eac` and `eac_cpa`, or around the whole converter. The
design has no input validation: r1 > 2^K or r3 = 2^K−1 give meaningless
output.

## Where this RTL makes its own choices

* **Adder type.** The converter only asks for a fast carry look-ahead adder
  with end-around carry. The Kogge-Stone tree and the loop-free computation of
  the end-around carry are choices made here.
* **Bit layout of `op_a`.** The layout of A = (2^(2k−1) + 2^(k−1))·r3 is worked
  out here from the rotation rule. The layouts of `op_c` and `op_b` follow the
  converter's derivation. All three are simulated on every residue triple for
  k = 3, 4 and 8.
* **Zero removal.** The AND form d_i = ~a & a_i is the one implemented. It
  clears the word only when every bit is one.
* **Operand-to-input assignment.** The order in which the operands enter the
  carry-save row does not matter.
* **Default size.** K = 8 is the default. k = 4, 8 and 16 are the sizes the cost
  model is tabulated for, and k = 3 is the worked example; all of these are
  simulated.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
modular arithmetic done in the testbench, ends with a
`TB_RESULT checks=… failures=…` line, and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_r2b_converter` | default K = 8, every X in 0…16,776,959 (every valid residue triple). It also counts the r1 = 2^K case, the end-around carries of both adders and the zero removal, and fails if any never happens. |
| `tb_r2b_workloads` | K = 3 and K = 4 on every X; K = 16 on corners, 65,536 values with r1 = 2^16 and 200,000 random values |
| `tb_operand_gen` | K = 8, every (r1, r2) and every r3, checked arithmetically; the k = 3 worked example |
| `tb_csa_eac` | W = 16: parity, rotated majority and modular sum on corner and random vectors |
| `tb_eac_cpa` | W = 4 exhaustive; W = 16 corners and random, including the all-ones case |
| `tb_mod_add3` | W = 4 exhaustive; W = 16 corners and random |
| `tb_zero_fix` | W = 16 exhaustive |

`r2b_harness.sv` in `tb/` is a helper used by `tb_r2b_workloads`.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        -y rtl -y tb +libext+.sv rtl/r2b_pkg.sv tb/tb_r2b_converter.sv \
        --top-module tb_r2b_converter -o sim
    ./obj_dir/sim

The exhaustive K = 8 run takes a few seconds. To build the converter at
another size, override `K` on `r2b_converter`; the harness shows how. K up to
20 works with the testbench's 64-bit reference arithmetic.
