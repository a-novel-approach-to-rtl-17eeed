# RNS multiply/add unit with the channel adders merged into the reverse converter

A residue number system (RNS) splits a wide integer operation into several
narrow, independent ones: each operand is replaced by its residues modulo a
set of pairwise co-prime moduli, each residue channel computes on its own, and
a reverse converter rebuilds the binary result. The cost of an RNS is mostly
in the converters and in the modular carry-propagate adders (CPAs) that end
every channel.

This design removes two of those channel-final adders. For the moduli set

    { 2^n,  2^(2n+1) - 1,  2^n + 1,  2^n - 1 }

the reverse converter (a New CRT-II converter) starts with modular adders modulo
2^(2n+1)-1 and 2^n-1, the same moduli as two of the channels. Those two
channels therefore stop at the carry-save stage and pass a redundant
(sum, carry) pair to the converter. The converter absorbs the pair with one
extra carry-save adder (CSA) in front of the modular adder it already has. Two
cascaded modular CPAs become one CSA plus one modular CPA.

The RTL is purely combinational and parameterised by `n` (`N`, default 12)
and by the CPA implementation (`CPA_STYLE`: ripple full adders or Kogge-Stone
parallel prefix, default prefix).

## Data flow

```
 a ─► rns_forward_converter ─┬─ x1 (n)    ─► ch_pow2          ─► r1 ────────────┐
 b ─► rns_forward_converter ─┼─ x2 (2n+1) ─► ch_mersenne_csa  ─► (s2, c2) ──────┤
                             ├─ x3 (n+1)  ─► ch_fermat        ─► r3 ────────────┼─► rns_reverse_converter ─► x
                             └─ x4 (n)    ─► ch_mersenne_csa  ─► (s4, c4) ──────┘
```

`rns_top` computes `x = |a * b| mod M` (op = `OP_MUL`) or `x = |a + b| mod M`
(op = `OP_ADD`), where

    M = 2^n (2^(2n+1) - 1) (2^(2n) - 1)      (just under 2^(5n+1))

and `a`, `b`, `x` are 5n+1 bits wide (61 bits at n = 12).

## The reverse converter

The conversion takes three steps. Each step merges two moduli:

    Z = x1 + 2^n · V1,              V1 = | 2^(n+1) · (x2 − x1) |  mod 2^(2n+1) − 1
    Y = x3 + (2^n + 1) · V2,        V2 = | 2^(n−1) · (x4 − x3) |  mod 2^n − 1
    X = Z + 2^n (2^(2n+1) − 1) · V3, V3 = | 2^n · (Y − Z) |        mod 2^(2n) − 1

Each power of two is the inverse of the modulus already combined, modulo the
new one. The weight in V1 must be 2^(n+1): 2^n · 2^(n+1) = 2^(2n+1) ≡ 1
(mod 2^(2n+1)−1). The weight 2^n that is sometimes written for this step gives
a wrong Z.

All three moduli are of the form 2^k − 1, and that makes the arithmetic cheap:

* Multiplying by 2^j is a left rotation by j bits (because 2^k ≡ 1). It is
  only wiring.
* Negation is bit inversion (−v ≡ ~v).
* A carry out of the top bit re-enters at bit 0 (end-around carry, EAC).

**Where the carry-save pairs go.** x2 is only known as s2 + c2, so
`2^(n+1)(x2 − x1)` becomes `rot(s2) + rot(c2) + rot(~x1)`. These three (2n+1)-bit
rotated words pass one row of EAC full adders (`csa_array`). The row's output
pair then goes to the stage's single modular CPA (`mod_add_mersenne`). V2 is
built the same way from s4, c4 and −x3. x3 is in 0..2^n, so it is first
brought to n bits: 2^n ≡ 1 mod 2^n−1, and x3 = 2^n only when its low bits are
zero, so the top bit is ORed into bit 0.

**The rest of the converter.**

* Z needs no adder, because V1 < 2^(2n+1)−1 sits directly above x1: Z = {V1, x1}.
* Y = {V2, V2} + x3 is one 2n-bit CPA. {V2,V2} is V2·(2^n+1), and the sum
  never carries out.
* The third stage reduces Y − Z modulo 2^(2n)−1. Z is 3n+1 bits, so −Z splits
  into two inverted 2n-bit words (low part and high part). Those two words and
  the rotated Y go through a 3-operand EAC CSA and then one modular CPA.
* The final value is X = 2^n·(V3·(2^(2n+1)−1) + V1) + x1 = {({V3,V1} − V3), x1}.
  It is one (4n+1)-bit CPA that subtracts. The result is always in 0..M−1.

**Zero in modulo 2^k−1 arithmetic.** Modulo 2^k−1 there are two codes for zero:
all-zeros and all-ones. Channel pairs and CSA outputs may use either code.
`mod_add_mersenne` always returns a result in 0..2^k−2. It computes a+b and
a+b+1 in parallel and takes the second when it carries out. It forces zero when
both inputs are all-ones. This keeps V1..V3 canonical, so X is never off by a
multiple of a modulus.

## Arithmetic channels

| module | modulus | output | final adder |
|---|---|---|---|
| `ch_pow2` | 2^n | r1, n bits | n-bit CPA (carry dropped) |
| `ch_mersenne_csa` (K = 2n+1) | 2^(2n+1)−1 | (s2, c2) | none: done in the converter |
| `ch_fermat` | 2^n+1 | r3, n+1 bits (0..2^n) | CPA + modular correction |
| `ch_mersenne_csa` (K = n) | 2^n−1 | (s4, c4) | none: done in the converter |

Each channel multiplies or adds, selected by `op`.

* **Multiply.** The partial products are reduced by a linear carry-save array.
  In the 2^k−1 channels, partial product i is `a` rotated left by i, gated by
  `b[i]`, and the array uses end-around carry.
* **Add.** The operands go straight to the final adder. In the 2^k−1 channels
  they become the redundant pair unchanged, so in add mode those channels
  contain no logic at all.
* **2^n+1 channel.** This channel forms the full product P (at most 2^(2n)).
  `fermat_fold` then returns |L − H| mod 2^n+1, where L is the low n bits of P
  and H is the rest. This works because 2^n ≡ −1.

## Forward converter

`rns_forward_converter` splits a (5n+1)-bit value into chunks as wide as the
modulus, and reduces them:

* **2^n:** the low bits.
* **2^k−1:** the chunks are added by an EAC CSA and a modular adder.
* **2^n+1:** the chunks are summed with alternating signs. A subtracted n-bit
  chunk c is added as ~c + 2. The sum is formed by CSA and CPA, then folded by
  `fermat_fold`.

It accepts any input value and returns that value's residues.

## Adder styles

`cpa` is used for every carry-propagate addition, and `CPA_STYLE` sets its
style across the whole design:

* `CPA_RIPPLE`: a full-adder chain.
* `CPA_PREFIX`: a Kogge-Stone network of ⌈log2(W+1)⌉ levels, with the carry-in
  handled as the generate of an extra bit below bit 0.

The technique is meant to pay off in both styles. It pays off most with ripple
adders, where each removed modular CPA is a long carry chain.

## Timing and interfaces

There is no clock, no reset and no handshake. Every output is a combinational
function of the inputs, so the latency is zero cycles. Anyone who wants
registers can add them around `rns_top`. Residues use plain binary codes:

* 2^n+1 residues are n+1 bits in 0..2^n (no diminished-1 code).
* 2^k−1 residues may arrive as either code of zero.

The `op` encoding is `rns_pkg::rns_op_e`.

## What is this design's own

The scheme comes from the published RNS technique. That covers the moduli set,
the three conversion formulas, removing the final adder of the 2^(2n+1)−1 and
2^n−1 channels, and the extra CSA in the converter.

These parts are choices made here:

* the multiply/add select;
* the linear (rather than tree) carry-save arrays;
* the Kogge-Stone topology;
* the two-adder modulo 2^k−1 CPA;
* the 2^n+1 channel (full product, then fold);
* the forward converter;
* the CSA in the third converter stage;
* the {V3,V1} − V3 output arrangement.

Delay, area and power have not been measured for this RTL. The reported
benefit is roughly a 20–27 % lower delay and 6–9 % less area against a design
that keeps all four channel adders, from a 180 nm standard-cell synthesis.
Treat that as the expectation, not as something this code demonstrates. The
baseline design with the full channel adders is not included.

## Files

`rtl/`
* `rns_pkg.sv`: CPA style and op enums.
* `cpa.sv`, `csa_array.sv`, `mod_add_mersenne.sv`, `fermat_fold.sv`: adder building blocks.
* `ch_pow2.sv`, `ch_mersenne_csa.sv`, `ch_fermat.sv`: arithmetic channels.
* `rns_forward_converter.sv`, `rns_reverse_converter.sv`: converters.
* `rns_top.sv`: the complete unit.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_rns_configs.sv`. Every testbench compares the design against integer
arithmetic done in the testbench (`%` on 128-bit values). Each ends with one
`TB_RESULT checks=<n> failures=<n>` line.

* `tb_rns_top` runs the default configuration (n = 12, prefix) end to end with
  20,000 directed and random operations. It also checks that the special cases
  actually occur: both ops, channel pairs whose sum wraps past the modulus, a
  2^n+1 residue of 2^n, and a zero result.
* `tb_rns_configs` runs n = 10 (ripple and prefix) and n = 12 (ripple).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv tb/tb_rns_top.sv \
          --top-module tb_rns_top -Mdir obj_top
./obj_top/Vtb_rns_top
```

Replace `tb_rns_top` with any other testbench name. The package must be read
first; every other module is found through `-Irtl`. To change the size, set
`N` on `rns_top`; `N >= 3` is required. To change the adder style, set
`CPA_STYLE`.
