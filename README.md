# Residue magnitude comparator for the moduli set {2^n−1, 2^n, 2^n+1}

A residue number system (RNS) holds an integer X as its remainders
(x3, x2, x1) = (X mod 2^n−1, X mod 2^n, X mod 2^n+1). Addition and
multiplication then work channel by channel with no carries between channels,
but the representation carries no magnitude information: you cannot tell
whether X > Y by looking at the residues. The usual fixes are slow. The
Chinese remainder theorem (CRT) needs an operation modulo the whole range
M = (2^n−1)·2^n·(2^n+1). Mixed-radix conversion (MRC) is a strictly
sequential chain of operations.

This RTL compares two residue numbers using a *mixed-radix form of the CRT*.
Every X in [0, M) is written as

    X = (2^n+1)·2^n·A_X + (2^n+1)·B_X + x1,      0 <= A_X <= 2^n−2,
                                                 0 <= B_X <= 2^n−1,
                                                 0 <= x1  <= 2^n

The triple (A_X, B_X, x1) is the *kernel* of X. It is a positional number, most
significant digit first, so X and Y compare like their kernels compare
lexicographically. The key property is that every kernel digit is computed
directly from the residues, in parallel. The only modular arithmetic needed is
modulo 2^n−1: an n-bit one's complement addition. No modulo-M or modulo
2^2n−1 operation is needed, and no lookup table.

The comparator is combinational. Two variants are provided: a faster one that
spends a second adder, and a smaller one that uses a decrementer instead.

## Computing the kernel

Let x1' be the low n bits of x1; x1 = 2^n exactly when its top bit x1[n] is set.
Define three n-bit terms, all taken modulo 2^n−1. Each is only wiring or
inversion:

| term | value mod 2^n−1 | hardware |
|------|-----------------|----------|
| T1 | 2^(n−1)·x1' | x1' rotated right by one bit |
| T2 | −x2 | x2 inverted bit by bit |
| T3 | 2^(n−1)·x3 | x3 rotated right by one bit |

These identities use the fact that 2^n ≡ 1 (mod 2^n−1). The all-ones word is a
second code for zero: ~0 is all-ones, and so is the rotation of an all-ones x1'.

With Z = T1 + T2 + T3 and Z' = (2^(n−1)−1) + T2 + T3, all modulo 2^n−1:

    A_X = |Z − 1|   if x1 < 2^n and x2 < x1      (case "borrow")
        = |Z|       if x1 < 2^n and x2 >= x1
        = |Z'|      if x1 = 2^n
    B_X = (x2 − x1') mod 2^n

All the case logic comes from one n-bit subtractor, x2 − x1'. Its difference is
B_X. Its borrow is set exactly in the "borrow" case; when x1 = 2^n, x1' is 0, so
there is never a borrow. The borrow then drives the final multiplexer for A_X.
The constant 2^(n−1)−1 replaces T1 through a row of muxes controlled by x1[n]
(`operand_mux`).

`kernel_generator_par` and `kernel_generator_cas` were checked against the
reference A_X = ⌊X / (2^n(2^n+1))⌋, B_X = ⌊X / (2^n+1)⌋ mod 2^n. This was done
for every X at n = 4, and for random and corner values at n = 8 and n = 16.

### Generator 1: parallel (`kernel_generator_par`)

Two adder paths run side by side:

* **|Z| or |Z'|:** the muxed T1 (or the constant), T2 and T3 go through one
  carry-save stage with end-around carry (`csa_eac`). That stage feeds n-bit
  one's complement adder 1 (`ones_comp_adder`).
* **|Z − 1|:** subtracting 1 modulo 2^n−1 is the same as adding 11…10₂. The
  constant folds into the first carry-save stage (`csa_eac_dec`). Bit 0 sees a
  constant 0 and becomes XOR/AND. Every other bit sees a constant 1 and becomes
  XNOR/OR. A second end-around-carry stage adds T3, and one's complement adder 2
  finishes the sum.

The borrow picks adder 2's result or adder 1's. The critical path is about one
XOR, one full adder, one n-bit one's complement adder and one mux.

### Generator 2: cascade (`kernel_generator_cas`)

This variant has only the first path. A modulo 2^n−1 decrementer
(`mod_decrementer`) follows adder 1 and produces |Z − 1| from |Z|. The borrow
again chooses between the two. This saves one adder and one carry-save stage
at the cost of the decrementer's delay.

### The mux-based decrementer

For an n-bit z, y = (z − 1) mod 2^n−1 is given bit by bit:

    y[j] = ~(z[j] XOR OR(z[j−1:0]))     for j >= 1
    y[0] =   z[0] XOR OR(z[n−1:0])

Each output bit is therefore a 2:1 mux between z[j] and ~z[j]. The selects are
prefix ORs, computed by a log2(n)-level Sklansky prefix-OR tree. For example, at
n = 4, 0100 → 0011 and 0000 → 1110 (0 − 1 = 14 mod 15). The output is never
all-ones. An all-ones input (zero) gives 11…10, as it should.

## One's complement adders and the double zero

A plain end-around-carry adder returns all-ones when the true sum is a non-zero
multiple of 2^n−1. For arithmetic that is harmless. Here, however, A_X is
compared as an ordinary binary number, and an all-ones A_X would compare as the
largest value instead of zero. `ones_comp_adder` therefore adds a last step
that maps an all-ones result to zero. Every A_X that reaches a comparator is
thus in [0, 2^n−2]. This normalisation is a choice of this implementation;
without it the comparator gives wrong answers. The adder itself is a ripple
carry-propagate adder with end-around carry. A parallel-prefix modulo 2^n−1
adder can replace it without changing anything else.

## Comparing the kernels (`residue_comparator`)

Two generators produce (A_X, B_X) and (A_Y, B_Y). Three binary comparators
(`binary_comparator`) give (C1, E1) for A, (C2, E2) for B and (C3, E3) for
x1 against y1. The outputs are:

    exy = E1 & E2 & E3                      X = Y
    cxy = E1 ? (E2 ? C3 : C2) : C1          X > Y   (two cascaded muxes)

The `GEN` parameter (type `rns_pkg::gen_kind_e`) chooses `GEN_PARALLEL` or
`GEN_CASCADE`.

## Top level (`rns_comparator_top`)

The top holds both comparators on the same operands: `c2_*` uses the parallel
generator and `c3_*` the cascade one. Their outputs must always agree. Use
whichever one you need, or take `residue_comparator` alone.

| port | dir | width | meaning |
|------|-----|-------|---------|
| x1, y1 | in | N+1 | residue modulo 2^N+1 (0 … 2^N) |
| x2, y2 | in | N | residue modulo 2^N |
| x3, y3 | in | N | residue modulo 2^N−1 (0 … 2^N−2; all-ones is also read as 0) |
| c2_cxy, c3_cxy | out | 1 | X > Y |
| c2_exy, c3_exy | out | 1 | X = Y |

Parameter `N` (default 8) is the channel width n. The same RTL was simulated at
N = 3, 4, 5, 8, 16, 32 and 64. The design is purely combinational, with no
clock or reset. Register the inputs and outputs around it to measure a clock
rate. Residues outside their ranges (x1 > 2^N, x3 = 2^N−1 used as a nonzero
value) are not detected.

Coarse synthesis of the top at N = 8 (both comparators) gives about 115
word-level cells and no flip-flops.

## Files

| file | contents |
|------|----------|
| `rtl/rns_pkg.sv` | `gen_kind_e`, the generator selector |
| `rtl/operand_mux.sv` | T1, T2, T3 and the x1 = 2^N mux |
| `rtl/csa_eac.sv` | 3:2 carry-save stage modulo 2^N−1 |
| `rtl/csa_eac_dec.sv` | carry-save stage adding a, b and −1 (11…10) |
| `rtl/ones_comp_adder.sv` | modulo 2^N−1 adder with zero normalisation |
| `rtl/mod_decrementer.sv` | mux-based modulo 2^N−1 decrementer |
| `rtl/borrow_subtractor.sv` | x2 − x1' giving B_X and the borrow |
| `rtl/kernel_generator_par.sv` | Generator 1 (parallel) |
| `rtl/kernel_generator_cas.sv` | Generator 2 (cascade) |
| `rtl/binary_comparator.sv` | W-bit magnitude comparator |
| `rtl/residue_comparator.sv` | one complete comparator |
| `rtl/rns_comparator_top.sv` | both comparators side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_rns_workloads.sv`, `tb/rns_cmp_checker.sv` | the comparator at N = 8, 16, 32, 64 |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its
own. A watchdog ends a run that hangs. Expected values are computed
independently of the RTL. Leaf blocks are checked with integer arithmetic,
exhaustively where the input space allows (the adders, the decrementer and the
subtractor at N = 8). Kernels and comparisons are checked against the binary
values X and Y themselves: the test draws X, converts it to residues and
compares X with Y as integers.

* `tb_rns_comparator_top` runs the top at its default N = 8 with 200,000 operand
  pairs. It counts, and requires to be non-zero:
  * operands in each of the three A_X cases (Z, Z−1, Z');
  * results decided by the A digit, by the B digit and by x1;
  * equal pairs, X > Y and X < Y.
* `tb_residue_comparator` runs every pair of the 504-value range at n = 3
  (moduli 7, 8, 9) and random pairs at n = 8, for both generators.
* `tb_rns_workloads` covers the widths 8, 16, 32 and 64 with 256-bit reference
  arithmetic.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv \
        tb/tb_rns_comparator_top.sv --top-module tb_rns_comparator_top -Mdir obj -o sim
    ./obj/sim

The same command works for any `tb/tb_*.sv`. Each testbench builds and runs in
seconds.

## Departures and choices

* **Zero normalisation** in `ones_comp_adder` (see above): needed for a correct
  binary comparison of A digits. It adds an n-input AND and a row of AND
  gates after the adder.
* **Ripple one's complement adder**: the cost-effective form is chosen; a
  parallel-prefix adder is the faster alternative.
* **Decision module of the decrementer**: built as a Sklansky prefix-OR tree,
  ceil(log2 n) levels of n/2 OR gates each. For an n that is not a power of two
  the tree is sized for the next power of two, and synthesis trims the unused
  part.
* **|Z − 1| path of Generator 1**: takes T1 directly, not the muxed operand. The
  result only matters when x1 < 2^n, and then the two are equal.
* **Comparator widths**: the A and B comparators are N bits wide and the x1
  comparator N+1 bits.
* **Both generators in one top**, and the enum-typed `GEN` parameter, are
  packaging choices of this implementation.
* **Three moduli only**: the mixed-radix form of the CRT holds for any moduli
  set, and the kernel comparison works for any set too. This RTL implements
  only the set {2^n−1, 2^n, 2^n+1}, where every kernel digit reduces to
  arithmetic modulo 2^n−1.
