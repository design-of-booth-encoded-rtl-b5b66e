# Radix-8 Booth encoded modulo 2^n-1 multiplier

A residue number system (RNS) splits a very long integer multiplication, as
used in RSA or elliptic-curve cryptography, into several short, independent
multiplications, one per modulus. With a high-dynamic-range moduli set, the
channel for the modulus 2^n-1 is usually not the slowest one. This design
spends that timing slack on area and power instead of speed.

It is a combinational multiplier for one modulo 2^n-1 channel. It uses
radix-8 Booth recoding, which needs about n/3 partial products where radix-4
needs about n/2. Radix-8 needs the "hard" multiple 3X, which normally costs a
full-length carry-propagate addition. Here 3X is built by short k-bit
ripple-carry adders that work in parallel. Their carries are not
propagated: each one is left as a separate bit in the partial product
matrix. The chunk width k therefore tunes the delay of the multiplier, so
that it can be matched to the slowest channel of the RNS multiplier.

```
p = x * y  (mod 2^N - 1)          N = 8 by default (the modulo 255 multiplier)
```

## Why modulo 2^n-1 is cheap

Two facts about modulo 2^n-1 arithmetic do most of the work:

* 2^n ≡ 1. Multiplying by 2^r is a left rotation by r bits. So 2X and 4X,
  and the weight 8^i of Booth digit i, are only wiring. A carry out of the
  top bit re-enters at bit 0. This is the end-around carry.
* The bitwise complement of a word is its negative: ~A = (2^n-1) - A ≡ -A.
  So a negative multiple costs one inverter per bit, with no "+1".

Zero has two forms, all zeros and all ones.

## Booth digits

The multiplier y is read in overlapping 4-bit groups
{y[3i+2], y[3i+1], y[3i], y[3i-1]}. Each group gives a digit
d_i = -4·y[3i+2] + 2·y[3i+1] + y[3i] + y[3i-1], in the range -4..+4
(`booth_encoder`).

* If 3 does not divide n, y is zero-extended and there are floor(n/3)+1
  digits. For n = 8 that is 3 digits.
* If 3 divides n, the bit below y[0] is taken to be y[n-1]. This is exact
  modulo 2^n-1, and n/3 digits are enough.

The group 1111 is a "negative zero". It selects the all-ones word, which is
also zero.

For each digit, `booth_selector` picks a multiple of X:

| digit | word                     | sparse bits     |
|-------|--------------------------|-----------------|
| 0, ±1, ±2, ±4 | X rotated by 0, 1 or 2 bits, complemented if negative (0 for zero) | all ones |
| +3    | sum word of 3X + B       | carries of 3X + B |
| -3    | ~(sum word of 3X)        | ~(carries of 3X)  |

Partial product i is then rotated left by 3i.

## The partially redundant hard multiple (`hard_multiple_gen`)

3X = X + rot(X, 1). The word is cut into M = n/k chunks of k bits, and each
chunk is added by its own k-bit ripple-carry adder (`rca`). The carry out
of chunk j is worth the lowest bit of chunk j+1. The carry out of the top
chunk is worth bit 0, because 2^n ≡ 1. Each carry is kept as a separate
"sparse" bit at position (j+1)k mod n. So the hard multiple is a pair: an
n-bit sum word plus M sparse bits. Its longest carry chain is k bits. The
usual approach is an n-bit addition followed by an end-around increment,
which is a chain of up to 2n bits.

Set k with these rules in mind:

* k must divide n, and k must be greater than 1.
* k must not be a multiple of 3. Partial product i is rotated by 3i, so its
  sparse bits land on positions (jk + 3i) mod n. With 3 ∤ k they interleave
  with those of the other digits instead of piling up. For n = 8 and k = 4
  the positions are {0,4}, {3,7} and {6,2}: all 3×2 sparse bits fit into one
  extra row.
* Smaller k gives a shorter carry chain but more sparse bits, which means
  more rows in the tree. Large k gives fewer rows but a longer chain.
* Good choices are k = n (or n/3 when 3 divides n) when the multiplier has
  lots of slack. When it has little, use k = n/4 (or n/6).
* If sparse bits still collide, as for n = 8 and k = 2, more sparse rows are
  generated automatically at elaboration.

## Bias and the compensation constant

This is the subtle part. Negation by complement does not work cleanly on a
pair (word, sparse bits). Complementing the n-bit sparse row would also turn
all its unused zero positions into ones. Those ones are worth
(2^n-1) - B ≡ -B, where

```
B = sum_j 2^(j*k)     (ones at the chunk boundaries; B = 0x11 for n=8, k=4)
```

If only the M real sparse bits are complemented, the result is too large
by exactly B:

```
~S + ~C (sparse bits only) = -(S + C) + B
```

The design makes every partial product carry this same bias B, whatever its
digit:

* **Easy multiples.** The sparse bits are all set to 1, which adds B.
* **+3X.** A second set of k-bit adders has carry-in 1 in every chunk, so
  its pair is worth 3X + B.
* **-3X.** The pair of the carry-in-0 adders (worth 3X) is complemented.
  This gives -3X + B.

Because the bias does not depend on the data, the total is a constant that
can be cancelled with one hardwired row:

```
CC = -( sum_i 2^(3i) · B )  mod 2^n-1        (bitwise complement of the sum)
```

For n = 8 and k = 4, sum_i 2^(3i)·B = 17 + 136 + 68 = 221, so CC = 34
(0b00100010). `mod_mul_pkg::comp_const` computes CC from n and k at
elaboration. The same package holds the placement of the sparse bits, the
number of digits and the check that k is legal.

Having the carry-in-1 copy of the adders doubles the hard-multiple adders.
That is the price of a bias that is the same for positive and negative
digits.

## Summation

All rows go to `csa_tree`:

* the P partial product words,
* the R sparse rows,
* CC.

For n = 8 and k = 4 that is 3 + 1 + 1 = 5 rows. The tree is built from
`csa32` 3:2 compressors, Wallace style. Each compressor's carry word is
rotated by one bit, so no carry ever leaves the n-bit rows. The last two
rows are added by `mod_adder`, a Kogge-Stone parallel-prefix adder. Its
global carry out is fed back into every bit carry, so the end-around carry
does not need a second pass.

## Output convention (`radix8_mod_mul`)

The output is the least positive remainder:

| product x·y | p |
|-------------|---|
| below 2^n-1 | x·y itself |
| a nonzero multiple of 2^n-1 | all ones (255 for n = 8) |
| 0 (an operand is the integer 0) | 0 |

The residue datapath cannot tell a zero product from other multiples of
2^n-1, so a small zero-operand detector sets the last case. The design has
no clock, no registers and no reset: a product is ready one combinational
delay after the operands change.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | operand width; the modulus is 2^N-1 |
| `K` | 4 | width of the ripple-carry chunks of the hard multiple |

An elaboration-time assertion rejects a K that breaks the rules above.
Derived sizes:

* P = number of digits
* R = number of sparse rows (1 for the usual K)
* NOPS = P + R + 1 rows into the tree

## Files

| file | content |
|------|---------|
| `rtl/mod_mul_pkg.sv` | digit type, elaboration-time helpers (CC, sparse-bit placement, tree sizing) |
| `rtl/radix8_mod_mul.sv` | top level |
| `rtl/partial_product_gen.sv` | encoders, selectors, rotations, sparse-row packing |
| `rtl/booth_encoder.sv`, `rtl/booth_selector.sv` | radix-8 digit recoding and multiple selection |
| `rtl/hard_multiple_gen.sv`, `rtl/rca.sv` | chunked 3X generation |
| `rtl/csa_tree.sv`, `rtl/csa32.sv` | end-around-carry carry-save tree |
| `rtl/mod_adder.sv` | final modulo 2^N-1 parallel-prefix adder |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## Verification

Every testbench computes its expected values with plain integer arithmetic
and prints `TB_RESULT checks=<n> failures=<n>`.

* `tb_radix8_mod_mul` applies all 65,536 operand pairs to the default
  (N = 8, K = 4) multiplier. It also checks that every Booth digit, the
  negative zero, both signs of 3X, the end-around carry and both special
  outputs actually occurred.
* `tb_radix8_mod_mul_configs` covers these configurations:
  * N = 8 with K = 8 and K = 2, all operand pairs;
  * N = 12 with K = 4, random operands;
  * N = 16 with K = 4 and K = 16, random operands;
  * N = 24 with K = 8, random operands;
  * N = 32 with K = 8, random operands.
* The block testbenches check the algebraic identity of each block. For
  example, word + sparse bits = d·X + B for the selector, and
  sum + carry ≡ Σ rows for the tree.

Each block testbench was also run against a copy of its block with a
deliberate bug, and each one reported failures.

To simulate with Verilator, pass the package first:

```
verilator --binary --timing --assert -Wno-fatal rtl/mod_mul_pkg.sv \
  $(ls rtl/*.sv | grep -v mod_mul_pkg) tb/tb_radix8_mod_mul.sv \
  --top-module tb_radix8_mod_mul
./obj_dir/Vtb_radix8_mod_mul
```

## Where this design makes its own choices

The published description of this multiplier gives the algorithm, the
chunked hard multiple, the bias and the rules for k. It does not give the
gate-level diagrams or the closed form of the compensation constant. These
parts are therefore this design's own:

* the carry-in-1 copy of the chunk adders that makes the bias the same for
  every digit;
* the derivation of CC given above;
* the use of n/3 digits (rather than n/3+1) when 3 divides n;
* the Wallace-style tree shape;
* the Kogge-Stone final adder;
* K = 4 as the default chunk width;
* the zero-operand rule at the output.

The design is not pipelined, and nothing in it has been timed or
synthesized to gates. It has no area, delay or power figures. Any claims
about the delay or power of a given k have to be checked by synthesis.
