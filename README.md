# Programmable power-of-two scaler for the RNS {2^(n+p), 2^n-1, 2^(n+1)-1}

A residue number system (RNS) holds an integer X as its remainders modulo
several co-prime moduli. Addition and multiplication then run in short,
independent channels. Division does not work that way, because the channels
cannot see each other. But DSP datapaths have to shrink their numbers again
and again to avoid overflow.

This design divides by a power of two chosen at run time. It takes the
residues (x1, x2, x3) of X for the moduli

    m1 = 2^(n+p),   m2 = 2^n - 1,   m3 = 2^(n+1) - 1,     0 <= p <= n,

and an exponent `lambda`. It returns the residues (s1, s2, s3) of
S = floor(X / 2^lambda). It is exact and uses no lookup tables. It is pure
combinational logic: shifters, carry-save adders and modulo 2^k-1 adders.
Every multiplication by a power of two modulo 2^k-1 becomes a rotation, and
every negation becomes a bitwise complement.

The dynamic range is M = 2^(n+p)(2^n-1)(2^(n+1)-1). `lambda` may take any
value from 0 to n+p. With p = n this covers about half the bits of X.

## Overview

```
 x3 (n+1) x2 (n)  x1 (n+p)                      lambda
   |        |       |                              |
   +--> y_gen <-----+                        lambda_decode
   |   (v2_gen, v3_gen, y_operand_prep,       |  lam1..lam4
   |    y_adder)                              |
   |        | Y (2n+1)                        |
   |      s1_gen <--- x1, lambda              |
   |        |                                 |
   |     s1 (n+p)                             |
   |      s2_gen <--- x2, x1, lam1, lam2 -----+
   |        s2 (n)                            |
   +----> s3_gen <--- x1, lam3, lam4 ---------+
            s3 (n+1)
```

The three output channels work in parallel. Only s1 needs the
mixed-radix value Y. So the longest path is Y generation followed by one
shifter. The s2 and s3 channels use only x1 and their own input residue.

## The s1 channel: mixed-radix conversion

Mixed-radix conversion writes X as

    X = x1 + 2^(n+p) * Y,     Y = v2 + (2^n - 1) * v3,

where v2 and v3 are the mixed-radix digits. Then S = (Y || x1) >> lambda.
Its n+p low bits are s1 (`s1_gen`, one (3n+p+1)-bit logical right shifter).
Making Y cheaply is the central part of the design (`y_gen`).

**v2** (`v2_gen`). The inverse of 2^(n+p) modulo 2^n-1 is 2^(n-p). This gives

    v2 = < 2^(n-p) (x2 - x1) >_(2^n-1).

- For p = 0 this is simply x2 + ~x1, added modulo 2^n-1.
- For p > 0, three n-bit operands go through a carry-save adder with
  end-around carry (EAC CSA): CLS(x2, n-p), ~x1[n+p-1:p] and
  ~x1[p-1:0] || 1...1. The last two are the two n-bit halves of
  -(x1·2^(n-p)). A modulo 2^n-1 adder then adds the two CSA outputs, S and C.

**v3** (`v3_gen`) is

    v3 = < 2^(n-p+3) (x1 - x3) + 2 v2 >_(2^(n+1)-1).

Waiting for v2 would put two modulo adders in series. Instead, v3 takes S and
C directly. It uses the identity

    < 2 v2 >_(2^(n+1)-1) = S||0 + C||b,   b = c0 OR xi.

Here c0 is the carry out of S + C, and xi means S and C are bitwise
complements (S + C = 2^n-1, so v2 = 0). `v2_gen` supplies b as `lsb2v2`.

- Every other term is a fixed rotation by K = <n-p+3>_(n+1) of x1 or of ~x3.
  When p > 1, x1 is wider than n+1 bits. Its high part then enters as a
  separate operand, because 2^(n+1) = 1 modulo 2^(n+1)-1.
- An EAC CSA tree reduces the four or five operands to two vectors.
- Two modulo 2^(n+1)-1 adders run side by side, one with an extra +1 folded
  in by one more CSA row.
- A multiplexer driven by b picks the result. So b arrives late without
  delaying v3.

**Y** (`y_operand_prep`, `y_adder`). Y = v3||v2 - v3 is built as
Yx + Yy + 1 in 2n+1 bits, with Yx = v3||v2 and Yy = 1...1||~v3.

Both modulo adders must give the single-zero form (never all ones). The
reason is that v2 and v3 enter Y as ordinary integers. `mod_adder_m1`
therefore maps the all-ones code to zero.

## The s2 and s3 channels: one datapath for every lambda

For the modulo 2^k-1 channels:

    s = < (x - <x1>_(2^lambda)) * 2^-lambda >_(2^k-1).

Here 2^-lambda is a rotation, and -<x1>_(2^lambda) is the complemented low
bits of x1, padded with ones. The formula has two cases:

- If lambda <= k, the x1 term fits in one k-bit word.
- If lambda > k, it spans two k-bit words that must be added.

To avoid a circuit per case, the first case gets a dummy third term of
k ones, which is zero modulo 2^k-1. Both cases then become:

- the input residue rotated left by <2k - lambda>_k (a type-II shifter);
- ~x1, shifted left by 2k-lambda inside a 2k-bit word with ones shifted in
  at the bottom (a type-III shifter). Its upper and lower halves are the
  other two terms.

An EAC CSA and a modulo 2^k-1 adder finish the sum. No multiplexer on
lambda is needed.

When lambda can never exceed k, the two-word form is not needed:

- For s2 (k = n) this is the case p = 0.
- For s3 (k = n+1) this is the case p <= 1.

Then the generator uses only a k-bit rotation, a k-bit type-III shifter
(shift k - lambda) and one modulo adder. `s2_gen` and `s3_gen` pick their
variant from `P` at elaboration.

`lambda_decode` computes the four shift values from lambda:

| output | used by                          | value                    |
|--------|----------------------------------|--------------------------|
| lam1   | s2 rotation                      | n-lambda (p=0), <2n-lambda>_n (p>0) |
| lam2   | s2 type-III shifter              | n-lambda (p=0), 2n-lambda (p>0)     |
| lam3   | s3 rotation                      | n+1-lambda (p<=1), <2n+2-lambda>_(n+1) (p>1) |
| lam4   | s3 type-III shifter              | n+1-lambda (p<=1), 2n+2-lambda (p>1) |

## Shifters and adders

| module          | function |
|-----------------|----------|
| `shifter_type1` | logical right shift, zeros in at the top |
| `shifter_type2` | circular left shift by 0..W |
| `shifter_type3` | complement, shift left, ones in at the bottom |
| `eac_csa`       | 3:2 carry-save adder, top carry wrapped to bit 0 |
| `mod_adder_m1`  | <a+b> modulo 2^W-1, single zero; also gives carry-out and all-propagate |
| `y_adder`       | (2n+1)-bit adder with carry-in 1 |

These blocks are written in behavioural form (`+`, `<<`, `>>`), and synthesis
chooses the structure. The published cost figures assume parallel-prefix
modulo adders and logarithmic shifters.

## Interface and parameters

`rns_pow2_scaler #(N, P)`:

| port     | dir | width            | meaning |
|----------|-----|------------------|---------|
| `x1`     | in  | N+P              | residue modulo 2^(N+P) |
| `x2`     | in  | N                | residue modulo 2^N-1, must be < 2^N-1 |
| `x3`     | in  | N+1              | residue modulo 2^(N+1)-1, must be < 2^(N+1)-1 |
| `lambda` | in  | clog2(N+P+1)     | scaling exponent, 0..N+P |
| `s1`     | out | N+P              | floor(X/2^lambda) mod 2^(N+P) |
| `s2`     | out | N                | floor(X/2^lambda) mod 2^N-1 |
| `s3`     | out | N+1              | floor(X/2^lambda) mod 2^(N+1)-1 |

Defaults are N = P = 16. That is the largest size in the published
evaluation (n = 4, 8, 16 with p = 0 and p = n), with p at its upper
bound. Any 2 <= N and 0 <= P <= N can be built. The configurations listed
under Verification have been simulated.

Outside the interface rules the outputs are undefined:

- residues given in their all-ones form;
- `lambda > N+P`.

A deferred assertion in `rns_pow2_scaler` reports such inputs in simulation.

There is no clock, no reset and no register. Latency is the combinational
delay. To pipeline the scaler, add registers around it, or between `y_gen`
and `s1_gen`. The width helpers `lam_w` and `sh_w` live in
`rns_scaler_pkg`.

## How far it follows the published design, and where it departs

Built as published:

- the three-channel split;
- the v2 datapath;
- the Y operand formulation;
- Shifters 1-9 and their shift values;
- the dummy-term trick;
- the p-dependent generator variants.

The v3 unit follows the published multiplexer-based idea: 2·v2 is formed
from S and C with the c0/xi bit. Its carry-save operand list, the duplicated
final adder and the place of the multiplexer are this design's own. It meets
the published equations, but its gate count and delay may differ from the
published unit.

Also this design's own:

- the single-zero modulo adders;
- the `lambda_decode` circuit;
- accepting lambda = 0.

Three details of the equations, as implemented:

- The x1 term of s2 and s3 uses the low lambda bits of x1.
- The adder for Y works modulo 2^(2n+1).
- In the worked example (moduli {64, 15, 31}, X = 23456, lambda = 6),
  S = 366, so s1 = 46 (366 = 5·64 + 46).

Area, delay and power figures of the published evaluation (130 nm ASIC) were
not reproduced.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=<n> failures=<n>` and has a time-based watchdog.
Reference values come from plain integer arithmetic up to 128 bits, not
from the RTL's formulas.

The end-to-end test is `tb_rns_pow2_scaler`. It covers these (N,P):

- (4,0), (4,1), (4,2), (4,4)
- (5,3)
- (8,0), (8,1), (8,8)
- (16,0)
- (2,2), (3,3), the smallest sizes
- the default build with no parameter override

For each, it draws X at random, from mixed-radix digits with v2 = 0 (to
force the xi correction), and at the ends of the range. It then compares all
three outputs with the residues of floor(X/2^lambda). It also replays the
{64, 15, 31} worked example. The test fails if any of these never happens:

- the xi correction;
- the c0 carry;
- the +1 candidate of v3;
- lambda > n in s2;
- lambda > n+1 in s3;
- lambda = n+p;
- lambda = 0.

About 181,000 checks pass.

`tb_rns_pow2_scaler_full` runs the default build (n = p = 16) alone, with
no parameter override. It checks 2,000,000 random scalings.

To run a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rns_scaler_pkg.sv tb/tb_rns_pow2_scaler.sv --top-module tb_rns_pow2_scaler
./obj_dir/Vtb_rns_pow2_scaler
```

Replace the testbench name to run a block-level test. `scaler_harness.sv`
is the per-configuration checker used by the end-to-end test. Add a line to
`tb_rns_pow2_scaler.sv` to test another (N, P).
