# Radix-2 DIT FFT built from programmable reversible gates

This is a combinational N-point radix-2 decimation-in-time (DIT) FFT. It is
8 points by default and also builds at 16 and 32 points. Every addition and
subtraction in its butterflies is a ripple chain of *reversible* logic gates.
A reversible gate has as many outputs as inputs and maps input codes
one-to-one onto output codes. The central cell is the 4-input/4-output **DKG
gate**. One of its inputs is a mode pin: the same gate is a full adder when
that pin is 0 and a full subtractor when it is 1. A chain of DKG gates is
therefore a programmable adder/subtractor. A butterfly uses one chain set to
add for `a + W·b` and one set to subtract for `a − W·b`.

A second gate family can be chosen with a parameter. It builds the additions
from Peres gates and the subtractions from TR gates. Both families give
bit-identical results and differ only in the gate netlist.

The RTL follows a published architecture: the gate equations, the 4-bit DKG
adder/subtractor, the Peres full adder, the DIT butterfly network and its
butterfly hierarchy, the 8/16/32-point sizes and the 8-bit input width. The
number format, the twiddle multiplication and the interface details are this
design's own. They are listed in
[Choices not taken from the source](#choices-not-taken-from-the-source).

## The gates

| gate | inputs | outputs | role here |
|------|--------|---------|-----------|
| DKG (`dkg_gate`) | p, q, r, s | a = q; b = ¬p·r + p·¬s; c = (p⊕q)(r⊕s) ⊕ rs; d = q⊕r⊕s | p=0: full adder of q, r, s (c = carry, d = sum). p=1: full subtractor q − r − s (c = borrow, d = difference) |
| Peres (`peres_gate`) | a, b, c | p = a; q = a⊕b; r = ab ⊕ c | half adder when c = 0; two make a full adder |
| TR (`tr_gate`) | a, b, c | p = a; q = a⊕b; r = a·¬b ⊕ c | fed (b, a, 0), it is the half subtractor a − b |

The mode behaviour of the DKG gate follows from its `c` output. With p = 0,
`c` is the majority of q, r and s, which is the carry. With p = 1 the q term
is inverted, which turns the majority into the borrow of q − r − s. `d` is the
same XOR in both modes. Outputs `a` and `b` carry no result. They are the
"garbage" outputs that keep the gate reversible, and the adder brings them out
on a `garbage` port.

## From gates to adders

* **`dkg_addsub`**: a WIDTH-bit ripple chain of DKG gates. Bit i gets
  `(mode, x[i], y[i], carry[i])`. Its `c` output is `carry[i+1]` and its `d`
  output is `sd[i]`. With mode 0 it computes `sd = x + y + cin`, and with
  mode 1 `sd = x − y − cin`, where `cin` acts as a borrow-in. Both results are
  modulo 2^WIDTH, and `cout` is the last carry or borrow. The default width is
  the source's 4 bits. The butterflies use the same chain at the full word
  width.
* **`peres_full_adder`**: two Peres gates. The first computes a⊕b and ab.
  The second takes (cin, a⊕b, ab) and gives sum = a⊕b⊕cin and
  carry = cin(a⊕b) ⊕ ab.
* **`peres_ripple_adder`**: a ripple chain of those full adders.
* **`tr_ripple_subtractor`**: two TR gates per bit. `TRG(b, a, 0)` gives a⊕b
  and the borrow ¬a·b. `TRG(bin, a⊕b, borrow1)` subtracts the incoming
  borrow. Its third input folds the first borrow into the second, which is
  correct because the two partial borrows are never both 1. No XOR or OR gate
  is needed.

## The butterfly and the twiddle

`butterfly` computes, on complex W-bit two's-complement words:

```
x0 = a + W_M^K · b
x1 = a − W_M^K · b          W_M^K = exp(−j·2πK/M) = C − j·S
```

The four real additions and subtractions (real and imaginary parts of `x0`
and `x1`) are reversible-gate chains. With `METHOD_DKG` they are four
`dkg_addsub` chains: two with mode 0 and two with mode 1. With
`METHOD_PERES_TR` they are two Peres adders and two TR subtractors.

The source writes the twiddle only as "W". Here `twiddle_mult` fixes each
butterfly's twiddle at elaboration time. It has three cases:

| twiddle | realisation | error |
|---------|-------------|-------|
| W^0 = 1 | wires | exact |
| W_M^(M/4) = −j | swap real and imaginary parts, negate one | exact |
| any other | `t_re = round((b_re·C + b_im·S)/2^TW_FRAC)`, `t_im = round((b_im·C − b_re·S)/2^TW_FRAC)` | C and S are rounded to TW_FRAC fractional bits, and the product is rounded to nearest |

`fft_pkg::tw_cos` and `fft_pkg::tw_sin` compute the constants C and S from
`$cos`/`$sin` at elaboration time, so there is no coefficient table. For
N = 8 only W_8^1 and W_8^3 need constant products. W_8^0 and W_8^2 = −j are
free.

**Word width.** Inputs are DATA_W = 8 bits. Inside, every word is
`OUT_W = DATA_W + log2(N) + 1` bits (12 at N = 8), and the outputs keep that
full width. log2(N) bits absorb the growth of a DFT sum. The extra bit
absorbs the √2 by which a rotated component can exceed the magnitude bound of
its inputs. The largest output component is N·128·√2 ≈ 1448 at N = 8, so no
stage can overflow. The tests drive a vector that puts more than 1024 into
X(1), which needs the top bit. The results are not scaled:
`X(k) = Σ x(n)·exp(−j2πnk/N)` up to twiddle rounding.

**Accuracy.** Against the exact DFT, the measured worst-case component error
with TW_FRAC = 8 is 0.54 LSB at N = 8, 2.6 LSB at N = 16 and 4.0 LSB at
N = 32. The larger sizes are limited mainly by the 8-bit twiddle constants
on large outputs. Raise `TW_FRAC` to reduce that error.

## The FFT network

`fft_radix2` takes x(0..N−1) in natural order. It sign-extends each sample
and wires them in bit-reversed order (x0, x4, x2, x6, x1, x5, x3, x7 for
N = 8) into log2(N) stages. Stage s holds N/2^s `butterfly_group` blocks of
size M = 2^s. A group of size M combines the transforms of the even and odd
halves:

```
X[k]       = E[k] + W_M^k · O[k]
X[k + M/2] = E[k] − W_M^k · O[k]        k = 0 .. M/2−1
```

At N = 8 this is the source's hierarchy: four 2-point butterflies, two
4-input groups and one 8-input group, 12 butterflies in all. N = 16 adds a
fourth layer (8 + 4 + 2 + 1 blocks), and N = 32 a fifth. Outputs X(0..N−1)
come out in natural order.

Module tree:

```
fft_radix2
└─ butterfly_group (per stage, per group)
   └─ butterfly (M/2 per group)
      ├─ twiddle_mult
      └─ dkg_addsub ×4 → dkg_gate      (METHOD_DKG)
         or peres_ripple_adder ×2 → peres_full_adder → peres_gate
            tr_ripple_subtractor ×2 → tr_gate   (METHOD_PERES_TR)
fft_pkg: method_e, twiddle constants, bit reversal
```

## Interface and timing

| port | dir | type | meaning |
|------|-----|------|---------|
| `f_re[N]`, `f_im[N]` | in | `logic signed [DATA_W-1:0]` | x(n), natural order |
| `y_re[N]`, `y_im[N]` | out | `logic signed [OUT_W-1:0]` | X(k), natural order |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | points; a power of two (8, 16, 32 tested) |
| `DATA_W` | 8 | input sample width |
| `TW_FRAC` | 8 | fractional bits of the twiddle constants |
| `METHOD` | `METHOD_DKG` | `METHOD_DKG` or `METHOD_PERES_TR` |

There is no clock, reset or handshake. The outputs are a combinational
function of the inputs. The critical path runs through log2(N) ripple chains
of OUT_W gates, plus the constant products. Register the ports outside the
block if it must run inside a clocked system. For real input, drive `f_im`
with 0.

After generic synthesis (no technology mapping), the 8-point DKG build is
about 3000 word- and bit-level cells, mostly XOR and AND gates from the
reversible chains, plus six multiply-accumulate cells for the two non-trivial
twiddles.

## Choices not taken from the source

* **Complex ports.** The source's 8-point symbol shows one 8-bit bus per
  input and output. Here each point has a real and an imaginary part.
* **Output width.** The source symbol shows 8-bit outputs. These outputs are
  OUT_W bits, so the transform never overflows and needs no scaling.
* **Twiddle multiplication.** The source does not say how W is applied. The
  constant-product realisation and `TW_FRAC` are this design's choices.
* **DKG mode pin.** The source's text names the gate's mode pin once as its
  first input and once as its fourth. This design follows its gate equations
  and its 4-bit adder drawing, which both use the first input (p).
* **TR subtractor cell.** The source only says TR gates work as half
  subtractors. The two-gate full subtractor above is this design's.
* **Output order.** The source's proposed-network drawing labels its outputs
  in bit-reversed order, while its text says DIT output comes in natural
  order. The outputs here are in natural order.
* **Not built.** The decimation-in-frequency variant is shown in the source
  only for comparison and is not built. The source reports no area or timing
  figures to compare against.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

* **Gates** (`tb_dkg_gate`, `tb_peres_gate`, `tb_tr_gate`,
  `tb_peres_full_adder`): exhaustive truth tables checked against integer
  arithmetic, plus a check that each gate is a permutation.
* **Adders** (`tb_dkg_addsub`, `tb_peres_ripple_adder`,
  `tb_tr_ripple_subtractor`): exhaustive at 4 bits, random at 12 bits, in
  both DKG modes.
* **`tb_twiddle_mult`, `tb_butterfly`, `tb_butterfly_group`**: checked
  against `fft_ref_pkg`, a separate integer model of the twiddle product.
* **`tb_fft_radix2`**: the default 8-point build, driven through
  `fft_harness`. It applies an impulse at each position, DC, all-minimum,
  all-maximum, a worst-case X(1) vector and random complex vectors. Every
  output is compared bit for bit with a recursive even/odd reference FFT and
  within tolerance with the exact DFT. The test fails unless rounded twiddle
  products, outputs wider than 8 bits and outputs needing the guard bit all
  occur.
* **`tb_fft_workloads`**: the same checks for N = 16 and N = 32 with DKG
  gates, and for N = 8 and N = 32 with Peres/TR gates.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_radix2.sv --top tb_fft_radix2
./obj_dir/Vtb_fft_radix2
```

Replace `tb_fft_radix2` with any other testbench name. The gate and adder
testbenches do not need `tb/fft_ref_pkg.sv`, but listing it does no harm.
Each testbench has a watchdog that reports a failure if it hangs.
