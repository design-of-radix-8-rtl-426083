# Radix-8 Booth encoded modulo 2^n+1 multiplier

Residue number systems built on the moduli {2^n-1, 2^n, 2^n+1} need a
multiplier for each channel, and the 2^n+1 channel is the awkward one: the
modulus is one more than a power of two, so the product cannot be reduced by
simply folding carries back. This design computes

    p = x * y mod (2^n + 1),      x, y, p in [0, 2^n]

in a single combinational datapath. It recodes y in radix 8 (modified Booth,
digits -4..+4), which cuts the number of partial products to about n/3. The
price of radix 8 is the *hard multiple* 3x, which is not a shift of x; it is
produced by a dedicated parallel-prefix adder whose prefix tree is built only
over bit pairs. Every partial product is then a selection, an optional
inversion and a circular shift. All the constant offsets those operations
leave behind are folded into a single compensation constant (CC) that is fixed
at elaboration time and added in the carry-save tree.

The default width is n = 8 (modulus 257), the size of the reference 8-bit
design. The parameter `N` sets n; it must be even and at least 4.

## Datapath

```
 x ──► x-1 (diminished-1, xd) ──┬──► hard_multiple_gen ──► 3x-1 ─┐
                                 ├──► rotate 1 / rotate 2 (2x-1, 4x-1)
 y ──► radix8_booth_encoder ──► digits d_0..d_{ND-1} ──────────────┤
                                                                    ▼
                                      partial_product_gen: ND rows + zh + zl
                                                                    │  + CC
                                                                    ▼
                                      modp1_csa_tree (inverted end-around carry)
                                                                    │ sum, carry
                                                                    ▼
                                      modp1_final_adder ──► p  (forced to 0 when x = 0)
```

With n = 8 there are ND = 4 Booth digits (weights 2^0, 2^3, 2^6, 2^9), so the
tree adds 7 rows: 4 partial products, 2 zero-digit correction rows and CC.

## Arithmetic of one partial product row

This is the part that needs care; the rest of the design follows from it.

**Diminished-1 words.** Inside the datapath a residue A in [1, 2^n] is held as
the n-bit word A* = A - 1. Two identities make this form convenient modulo
2^n+1 (where 2^n = -1):

* Inversion negates: `~(A*) = 2^n - 1 - (A - 1) = -A - 1 = (-A)*`.
* A left rotation by one bit with the wrapped bit inverted doubles:
  it gives `2A* + 1 = (2A)*`.

So the multiples 2x and 4x are rotations of xd by one and two bits, a
negative Booth digit is a bitwise inversion, and only 3x needs an adder.

**Weighting by 2^k.** Digit i has weight 2^k with k = 3i. The row is the
selected word W rotated left by k positions around the 2n-bit ring {~W, W}:
bits that wrap past the top come back inverted, and for k >= n the whole word
is inverted once more (2^n = -1). For any n-bit word this gives

    R(W, k) = 2^k * W + 2^k - 1          (mod 2^n+1)

With W = (d_i x)* = d_i x - 1 the row is `2^k d_i x - 1`: the wanted term
plus the constant -1, independent of the data.

**Zero digits.** A zero digit would need W = 0* = -1, which has no n-bit
diminished-1 word. The generator uses W = 0 instead, whose row is 2^k too
large. Two extra rows remove that excess. `zh` holds the inverted zero flag
~z_i at bit k_i for every digit with k_i < n, and ones at every other bit.
`zl` holds z_i at bit k_i - n for every digit with k_i >= n. Together they
equal `-sum(z_i 2^k_i) - 2`.

**Compensation constant.** Each of the ND rotated rows carries -1, the two
correction rows carry -2, and each of the NR - 2 compressors in the tree adds
+1 (see below). CC must cancel the total:

    CC = ND + 2 - (NR - 2)  with  NR = ND + 3   =>   CC = 1

It is computed by a constant function in `radix8_modp1_mult`, so a change to
the row arrangement cannot silently leave a stale value behind.

**x = 0** has no diminished-1 form either; it is detected at the input and
forces p = 0. A zero y needs no special case. All its digits are zero, and
the correction rows cancel them.

## Hard multiple generator

`hard_multiple_gen` forms (3x)* as the diminished-1 sum of x* and (2x)*, an
n-bit addition whose carry-out is fed back inverted as the carry-in
(`A* + B* + 1`). Bit generate/propagate signals are first merged pairwise
(bits 2j+1:2j). A Kogge-Stone tree over the n/2 pairs then gives the carries
into the even bit positions. These are the prefixes at the odd boundaries,
and they include the end-around carry through the group propagate. One
generate/propagate cell per pair then recovers the carry into each odd bit.
The prefix tree is therefore half as wide as a full n-bit tree.

The design requires n to be even. For odd n, 3 divides 2^n+1, so (3x)* can be
-1 for some x, and that value has no n-bit word. For even n it cannot happen.

## Carry-save tree and final addition

`modp1_csa` is one row of full adders. The carry out of bit n-1 has weight
2^n = -1, so it re-enters bit 0 inverted. That makes the sum and carry
outputs total the three inputs plus 1, modulo 2^n+1. `modp1_csa_tree` arranges
NR - 2 of them as a Wallace tree (rows grouped by threes, leftovers passed
on). For 7 rows it has 4 levels.

`modp1_final_adder` returns the residue in normal form. It runs two
Kogge-Stone additions side by side: t = a + b, and u = a + b + 2^n - 1 (after
one row of full adders). u is t - (2^n+1) in its low bits, and its carry shows
when t > 2^n. The result is u in that case and t otherwise.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | N+1   | multiplicand residue, 0 .. 2^N |
| `y`  | in  | N+1   | multiplier residue, 0 .. 2^N |
| `p`  | out | N+1   | x*y mod (2^N+1) |

The multiplier is purely combinational. It has no clock or reset, and p is
valid one propagation delay after x and y. Inputs above 2^N are illegal, and
the output for them is unspecified. To pipeline the design, register the
tree's sum and carry words; that is the natural cut.

## Where this RTL departs from the published design

* **Bias scheme.** The published multiplier adds a bias of the form 2^(3i)·B
  to each partial product. B has ones at regularly spaced positions set by the
  width k of the small adders in its hard multiple generator. Its
  compensation constant depends on n and k, and k is chosen by two
  admissibility criteria. That bias equation and those criteria are not
  reproduced here. This design keeps every offset data-independent through
  the diminished-1 identities above. It needs two zero-digit correction rows,
  and its CC is the single value 1.
* **Hard multiple.** One description of the hard multiple generator uses
  small ripple-carry adders working in parallel; the proposed one uses a
  parallel-prefix network evaluated only at odd positions. This RTL builds
  the prefix version. The ripple-carry variant tunes its delay through the
  adder word length k, which lets the channel's delay be matched to the other
  residue channels. That knob does not exist here: the delay is fixed by n.
* **Modulus at n = 8.** The simulation example of the published design speaks
  of "modulo 255", which is 2^n-1. This RTL follows the 2^n+1 design that the
  title and block diagram describe, so n = 8 gives modulus 257.
* **Own choices.** The following are choices of this implementation: the
  diminished-1 internal form, the x = 0 bypass, the digit format (sign plus
  one-hot magnitude), Kogge-Stone for both prefix networks, the Wallace
  grouping of the tree, and the two-adder final stage.
* **Not reproduced.** Area, delay and power figures for a 65 nm library
  cannot be checked here.

## Files

| file | contents |
|------|----------|
| `rtl/modmul_pkg.sv` | Booth digit struct, digit count function |
| `rtl/radix8_booth_encoder.sv` | radix-8 recoding of y |
| `rtl/hard_multiple_gen.sv` | 3x with a pair-wise prefix tree and end-around carry |
| `rtl/partial_product_gen.sv` | row selection, inversion, rotation, zero-digit rows |
| `rtl/modp1_csa.sv`, `rtl/modp1_csa_tree.sv` | modulo 2^n+1 carry-save compression |
| `rtl/kogge_stone_adder.sv`, `rtl/modp1_final_adder.sv` | final modulo addition |
| `rtl/radix8_modp1_mult.sv` | top level, CC |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus a size sweep |

## Verification

Every testbench compares against integer arithmetic done in the testbench
and ends with a line `TB_RESULT checks=<n> failures=<n>`.

* `tb_radix8_modp1_mult`: all 66049 operand pairs at the default n = 8. It
  also counts every Booth digit value -4..+4, a zero digit in each position,
  modulus subtraction in the final adder, and the operands 0 and 2^n. A
  mechanism that never occurs counts as a failure.
* `tb_radix8_modp1_mult_sizes`: every pair at n = 4, 6 and 10, plus 200000
  random and corner pairs at n = 12 and 16.
* Per-module tests:
  * the encoder, for every y and by reconstructing y from its digits;
  * the hard multiple, for every input at n = 8, 10 and 16;
  * the row generator, with random digits and operands;
  * the tree, at 3, 7 and 12 rows;
  * the final adder, for every input pair.

Every testbench passes. Each one was also run against a deliberately broken
copy of its module, and each one failed there.

Running a test with Verilator:

```
verilator --binary -Irtl -y rtl -Itb rtl/modmul_pkg.sv tb/tb_radix8_modp1_mult.sv \
          --top-module tb_radix8_modp1_mult -o sim
./obj_dir/sim
```

Change `N` on `radix8_modp1_mult` for another channel width. Any even N >= 4
works, and the tests cover 4 to 16. Above about 30 bits, the integer
references in the testbenches would need wider arithmetic.
