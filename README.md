# Reverse converter for the two-part RNS {2^n + 1, 2^n − 1, 2^n}

A residue number system (RNS) stores a number as its remainders modulo a few
coprime moduli. Arithmetic then runs on each remainder independently, with no
carries between them. The price is the *reverse* conversion back to binary,
which usually needs modular adders and multipliers. This design is a
combinational reverse converter for the moduli set {2^n + 1, 2^n − 1, 2^n}
in its **two-part** form. It needs only one n-bit adder and one 2n-bit adder
built from plain full and half adders, plus n inverters and one XOR.

The RTL is parameterised by `N` (the n above). The default is `N = 86`,
which gives a 258-bit result.

## The number format

In the two-part representation a 3n-bit number `X` is split into two parts:

* the low n bits are kept in binary: `x3 = X mod 2^n`;
* only the upper part `Xh = X >> n` (2n bits, `0 ≤ Xh ≤ 2^2n − 2`) is held
  in residues: `x1 = Xh mod (2^n + 1)` (n+1 bits) and
  `x2 = Xh mod (2^n − 1)` (n bits).

So the converter recovers `Xh` from `(x1, x2)` and appends `x3`:
`X = Xh || x3`. The dynamic range is `(2^n+1)(2^n−1)·2^n = 2^3n − 2^n`.

Example, n = 3 (moduli 9, 7, 8): X = 503 = 0b111110_111, so Xh = 62,
x1 = 62 mod 9 = 8, x2 = 62 mod 7 = 6, x3 = 7.

## How Xh is recovered

Two-modulus mixed-radix conversion gives

    Xh = x1 + S · (2^n + 1),    S = | (x2 − x1) · |(2^n+1)^-1|_(2^n−1) |_(2^n−1)

Because 2^n + 1 ≡ 2 (mod 2^n − 1), the inverse is 2^(n−1). Arithmetic
modulo 2^n − 1 turns everything into wiring:

* Multiplying by 2^(n−1) is a rotation left by n − 1, i.e. **right by one
  bit**: `S1 = x2 · 2^(n−1) = {x2[0], x2[n−1:1]}`.
* Negation is the **one's complement**, so
  `S2 = −x1 · 2^(n−1) = {~x1[0], ~x1[n−1:1]}` when `x1[n] = 0`.
* `x1` has n+1 bits, but `x1[n] = 1` only for `x1 = 2^n`, whose low bits
  are all zero. Its term is `0111…1`. A single XOR covers both cases:
  `S2 = {~x1[0] ^ x1[n], ~x1[n−1:1]}`.

Then `S = |S1 + S2|_(2^n−1)`. A modulo 2^n − 1 adder would need an
end-around carry, which doubles the carry path. Instead a plain n-bit adder
produces `S'` and `Cout`. The final value `S = S' + Cout` is never formed:
`Cout` is added in the last adder instead.

Multiplying by 2^n + 1 means writing S twice side by side, so

    Xh = (S' || S')  +  (0…0 || x1)  +  Cout · (2^n + 1)
         `---S3---'     `----S4---'     Cout at bit 0 and at bit n

## Datapath

    x2 (n) ──┐      x1 (n+1) ─────────────────┐
             v         v                      |
           ┌────────────┐                     |
           │   OPU1     │  n INV + 1 XOR      |
           └────────────┘                     |
          S1 (n) │   │ S2 (n)                 |
                 v   v                        |
           ┌────────────┐                     |
           │ n-bit CPA  │── Cout ──────────┐  |
           └────────────┘                  |  |
                 │ S' (n)                  |  |
                 v                         |  v
           ┌────────────────────────────────────┐
           │ OPU2   S3 = S'||S',  S4 = x1        │  wiring (+ zero fix)
           └────────────────────────────────────┘
               S3 (2n) │    │ S4 (2n)      |
                       v    v              v
           ┌────────────────────────────────────┐
           │ modified adder  (n+1) FA + (n−1) HA │
           └────────────────────────────────────┘
                       │ Xh (2n)      x3 (n)
                       └──── concatenate ──┘──> X (3n)

| File | Module | Role |
|---|---|---|
| `rtl/reverse_converter.sv` | `reverse_converter` | top: the four stages above and the concatenation |
| `rtl/opu1.sv` | `opu1` | S1, S2 by rotation, inversion, one XOR |
| `rtl/cpa.sv` | `cpa` | n-bit ripple adder: one HA at bit 0, n − 1 FAs |
| `rtl/opu2.sv` | `opu2` | forms S3 and S4; holds the zero fix |
| `rtl/modified_adder.sv` | `modified_adder` | 2n-bit adder that also adds Cout at bits 0 and n |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | | FA and HA cells used by both adders |

The instance names inside the top (`OPU1`, `CPAcout`, `OPU2`, `Adder1`) and
the port widths at n = 86 (`x1[86:0]`, `x2[85:0]`, `x3[85:0]`, `x[257:0]`,
172-bit S3/S4) follow a published RTL view of the converter.

## The modified adder, bit by bit

This is the least obvious part. The sum has three addends: S3 (2n bits),
S4 (only bits n..0 can be non-zero) and Cout, which has weight 1 and weight
2^n. The adder is one ripple chain:

| bits | cell | inputs |
|---|---|---|
| 0 | FA | S'[0], x1[0], carry-in = Cout |
| 1 … n−1 | FA | S'[i], x1[i], carry |
| n | FA | S'[0], (x1[n] OR carry), Cout |
| n+1 … 2n−1 | HA | S'[i−n], carry |

Bit n receives four bits: S'[0], x1[n], Cout and the carry from bit n − 1.
They fit one FA because x1[n] and that carry are never 1 together. If
x1[n] = 1 then x1 = 2^n and x1[n−1:0] = 0, so a carry out of bit n − 1 would
need S' = all ones *and* Cout = 1. The CPA cannot produce that: its largest
sum is 2^(n+1) − 3, because S1 is never all ones. The merge costs one OR
gate. The upper n − 1 bits need only half adders because S4 is zero there.
The carry out of bit 2n − 1 is dropped, since Xh < 2^2n − 1.

This holds only for **canonical residues**: `x1 ≤ 2^n` and `x2 ≤ 2^n − 2`.
The input ranges are not checked in hardware, and other input values give
undefined results. In simulation, a deferred assertion in `modified_adder`
reports the one case the OR merge cannot handle.

## The second zero, and `FIX_ZERO`

The plain CPA can return `S' = 2^n − 1` with `Cout = 0`. That is the
all-ones second representation of zero modulo 2^n − 1. Taken literally, the
sum above then adds `(2^n − 1)(2^n + 1) = 2^2n − 1`, and the 2n-bit result
wraps to `Xh − 1` (and to all ones for Xh = 0). This happens exactly when

* `x1 = x2 ≤ 2^n − 2` (that is Xh ≤ 2^n − 2), or
* `x1 = 2^n, x2 = 1` (Xh = 2^n).

That is 2^n upper parts in total, all of them small numbers. For example,
with n = 3, X = 24 (residues ⟨3, 3, 0⟩) would come out as 16, and X = 0 as
504.

The adder structure above gives no way to correct this, so the design adds
a fix, controlled by the parameter `FIX_ZERO`:

* `FIX_ZERO = 1` (default): OPU2 detects `S' = all ones` with an n-input
  AND and then drives S3 = 0. This costs the detector and n AND gates. It
  also lengthens the critical path by an AND tree of depth log2(n) plus one
  gate level, between the CPA and the modified adder. The converter is then
  exact over the whole dynamic range.
* `FIX_ZERO = 0`: OPU2 is pure wiring, exactly the circuit without the fix,
  including the wrong results listed above. The testbench checks that it is
  wrong for exactly those 2^n inputs and correct everywhere else.

## Cost and timing

Everything is combinational: there is no clock, register or reset. With
`FIX_ZERO = 0` the circuit has n inverters, 2n FAs, n HAs and one XOR, plus
the single OR at bit n of the modified adder. The longest path is
`t_INV + t_XOR + n·t_HA + 2n·t_FA`: through OPU1, the n-bit CPA, and then
the 2n-bit chain of the modified adder. In the unit-gate model
(INV = XOR = 1, FA = 7/4, HA = 4/2 for area/delay) that is area 19n + 1 and
delay 10n + 2, without the OR. `FIX_ZERO = 1` adds the n-input AND and n
2-input ANDs (or a 2:1 mux per bit) in series before the modified adder.

If a clocked version is needed, register the inputs and `x`. Splitting the
path between the CPA and the modified adder is the natural pipeline cut.

## Parameters and ports

`reverse_converter #(N = 86, FIX_ZERO = 1)`

| port | dir | width | meaning |
|---|---|---|---|
| `x1` | in | N+1 | `(X >> N) mod (2^N + 1)`, must be ≤ 2^N |
| `x2` | in | N | `(X >> N) mod (2^N − 1)`, must be ≤ 2^N − 2 |
| `x3` | in | N | `X mod 2^N` |
| `x` | out | 3N | X |

Sizes of interest: n = 11, 22, 43, 86 give dynamic ranges of about 32, 64,
128 and 256 bits. All four are simulated (see below).

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Reference values come from plain
division and remainder in wide integers (`tb/tb_rns_pkg.sv`), never from
the converter's own shortcuts. End-to-end tests start from a binary X,
forward-convert it, and compare the converter's output with X.

| testbench | what it covers |
|---|---|
| `tb_full_adder`, `tb_half_adder` | exhaustive |
| `tb_opu1` | n = 3 exhaustive, n = 86 corners + random; S1, S2 as residues, S2 = 0111…1 for x1 = 2^n |
| `tb_cpa` | n = 4 exhaustive, n = 86 random |
| `tb_opu2` | n = 3 exhaustive with and without the fix, n = 86 random |
| `tb_modified_adder` | n = 3 exhaustive over reachable inputs, n = 86 random; counts the bit-n cases |
| `tb_reverse_converter` | the n = 3 example (503, with all intermediate values); n = 3 and n = 8 exhaustive; n = 3 without the fix (exactly 8 wrong, as predicted) |
| `tb_converter_sizes` | n = 11, 22, 43, corners + random |
| `tb_reverse_converter_full` | defaults (n = 86): 20 000 random numbers + corners |

The end-to-end tests count the CPA carry-out, x1 = 2^n, the corrected
second zero and a carry into bit n. If any of these never occurs, the test
fails. `tb/tb_rc_harness.sv` is the shared driver for one converter size.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        --top-module tb_reverse_converter_full \
        tb/tb_rns_pkg.sv tb/tb_reverse_converter_full.sv
    ./obj_dir/Vtb_reverse_converter_full

All testbenches finish in well under a second once built.

## Changing it

* `N` sets the moduli and all widths. `tb/tb_rns_pkg.sv` computes its
  references in 320-bit integers, so the testbenches work up to n = 100.
* Both adders are explicit ripple chains of `full_adder`/`half_adder` cells,
  so the cell counts can be read directly from the code. To speed up the
  design, replace `cpa` and the lower n+1 bits of `modified_adder` with
  faster adders; the bit-n merge and the half-adder upper part stay valid.
* Keep the full adder's carry written as `(a & b) | (ci & (a ^ b))`, with
  the carry input used once. The equivalent three-product majority form
  makes Verilator's generated C++ for the 258-bit chain take many minutes
  to compile.

## Where this design goes beyond the published converter

* **`FIX_ZERO`** (default on) corrects the second-zero error described
  above. The published circuit corresponds to `FIX_ZERO = 0`.
* **One OR gate** at bit n of the modified adder. The published cell count
  is n+1 FAs and n−1 HAs, but bit n has four inputs; the OR merge is this
  design's way of meeting that count.
* **OPU2's inputs.** OPU2 is fed with S' and x1, which is what the equation
  for S4 needs. In one published drawing OPU2 appears to receive S' and Cout
  instead.
* **Defaults.** N = 86 is the largest size evaluated. The converter is
  specified only as a combinational path with gate-delay sums, so there are
  no registers.
* **Input ranges** are not checked; only canonical residues give correct
  results.
