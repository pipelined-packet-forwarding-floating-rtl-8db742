# Packet-forwarding floating point adder (addition cycles)

A conventional floating point adder takes its result through at least two
carry-propagate additions before the next dependent addition can use it. One
adds the significands and one rounds. Each costs a delay that grows with the
logarithm of the precision. This design removes both from the forwarding
path. The result of an addition is handed on in a redundant form instead:

* a 64-digit **borrow-save principal part**, ready after cycle 2, and
* a 2-digit **carry-round packet** holding the rounding correction, ready one
  cycle later (after cycle 3).

The adder takes such a packet operand directly. The principal part enters with
the other operand in cycle 1. The carry-round packet is only needed in cycle 2.
So a chain of dependent additions can issue one every two cycles. The forwarded
value is still exactly the IEEE 754 rounded sum. Cycles 1 and 2 use only 3-2 and 4-2
redundant adders, digit recodings, shifters and small counters. The only
carry-propagate addition is in the rounder (cycles 3 and 4), off the
forwarding path.

This repository holds the two addition cycles: `pf_adder` and everything below
it. **The rounder is not included.** The adder delivers everything the rounder
needs: the principal part, seven low-order digits and a sticky digit.

The precision is double extended: 64-bit significand and 15-bit exponent.

## Number formats

A **borrow-save digit** is a pair of bits `(p, n)` with value `p - n`, so it
lies in {-1, 0, 1}. Negating a borrow-save string means swapping its two bit
vectors, which costs no logic.

**Standard operand** `a` (`std_op_t`): sign `s`, 15-bit exponent `e`, and
significand `f = 1.a1...a63` with an explicit integer bit. Its value is
`(-1)^s 2^e f`, with `f` in [1, 2).

**Packet operand** (`pf_op_t` plus `pf_cr_t`). Its value is
`(-1)^s 2^e (f + c 2^-63)`, where:

* `f` is the principal part: 64 digits `1 b0 . b1 ... b62`. The top digit
  (weight 2) is always a plain 1. `b0` (weight 1) and `b1..b62` are
  borrow-save digits. In the vectors `fp`/`fn`, bit 63 is the leading 1,
  bit 62 is `b0` and bit 0 is `b62`.
* `c = c62 c63` is the carry-round packet: two borrow-save digits of weights
  2^-62 and 2^-63. Its value lies in {-2, ..., 2}. In `pf_cr_t`, bit 1 is `c62`.
* The whole significand `f + c 2^-63` lies in [1, 4]. Since the format has
  two binades, the result needs at most a one-place normalization.

**Adder result** `pf_sum_t`:

* `s`, `e`
* the principal part `fp`/`fn`, in the same packet form as above
* `lp`/`ln`: seven low-order digits of weights 2^-63 .. 2^-69
* `stp`/`stn`: the sticky digit
* `zero`: set for an exact zero (the packet format cannot express zero)

Its exact meaning is given in *What the result means* below.

## Recoding and why the adder does not need a carry-propagate add

Everything rests on one cheap operation, **carry recoding**
(`bs_pn_recoder`). An N-recoding passes a borrow out of every digit that is
-1 and absorbs it one place up. A P-recoding does the same for carries out of
+1 digits. Each costs one half-adder per digit and keeps the value unchanged.
The composite `P(N(x))` turns W digits into W+1.

Recoding shrinks the range of every *fraction value* of the string. The
fraction value at position j is the value of the digits below j, read as
`0.d(j-1)...`. For a plain borrow-save string that range is (-1, 1). After
`P(N(x))` it is (-3/4, 1/2). So the digit string cannot hold long "+1 followed
by -1 -1 -1 ..." runs whose leading digit says little about the value.

The adders use this in three places:

1. **Leading-zero prediction.** In the small path, the position of the first
   nonzero digit of the recoded sum tells the size of the sum to within two
   binades. No carry-propagate add is needed first.
2. **Late carry-round packet.** The packet enters cycle 2 at a fixed place.
   The recoded digits around that place leave room for it, so adding it needs
   only a 3- or 4-digit adder that never carries out.
3. **Large-path size.** The leading few digits of the sum give its sign and
   its binade.

The 3-2 adder (`bs_add32`) adds a binary vector to a borrow-save vector. It is
a row of full adders on `x`, `y+` and `~y-`. The carry becomes the positive
bit one place up and `~sum` becomes the negative bit. The 4-2 adder
(`bs_add42`) adds two borrow-save vectors with two such rows in cascade.

## Pipeline and interface (`pf_adder`)

```
cycle 1 : a, b (principal part) in | exponent difference, path select,
                                   | alignment, recoding, first redundant adds
cycle 2 : c (carry-round) in       | add c, normalize, sign, pack
          --> out registered; out_valid two clock edges after in_valid
cycles 3-4 : rounder (not in this design) produces the next carry-round
             packet and the standard-format result
```

| port        | dir | meaning |
|-------------|-----|---------|
| `clk`, `rst_n` | in | clock; active-low synchronous reset of the valid pipeline only |
| `in_valid`  | in  | qualifies `a` and `b` in this cycle |
| `a`         | in  | standard operand (`std_op_t`) |
| `b`         | in  | principal part, sign and exponent of the packet operand (`pf_op_t`) |
| `c`         | in  | carry-round packet of the same operation, presented **one cycle after** `b` |
| `out_valid` | out | result valid, exactly two cycles after `in_valid` |
| `out`       | out | result (`pf_sum_t`) |
| `err`       | out | internal range check; stays 0 for legal inputs |

The pipeline is full: it accepts one operation per cycle and never stalls.
Datapath registers are not reset. Only the valid bits are.

Both datapaths work on every operation. The registered exponent-difference
decision picks one result at the end of cycle 2.

## Path selection and the asymmetric threshold

Let `d = e1 - e2`, where `e1` is the exponent of the standard operand and
`e2` that of the packet operand.

* **Small path** for -1 <= d <= 4. Here cancellation can happen and the
  normalization shift can be long.
* **Large path** for d >= 5 or d <= -2. The alignment shift can be long, but
  normalization moves by at most one place.

A textbook two-path adder splits at |d| <= 1. This design widens the small
range to d = 4 on the side where the *standard* operand is larger. That is
what lets the large path place the late carry-round packet at one of just two
fixed positions. With d >= 5, the shifted packet operand lands so far right
that its carry-round digits fall entirely into the low-order (sticky) region.
With d <= -2, the packet operand is the unshifted one and its carry-round
digits sit at a fixed place near the bottom of the high part.

The small path only needs the 3 low exponent bits for its alignment. The
select itself uses the full 15-bit difference.

## Small path (`pf_small_path`)

Frame: a 71-digit string. Index i has weight 2^(i-64) relative to 2^e2:
7 digits at or above 2^0 and 64 below.

**Cycle 1.**

1. Pre-align `f1` only, by `d+1` places, into a 69-bit field of weights
   2^4 .. 2^-64. The operands are never swapped. The borrow-save operand has
   twice the bits, so shifting only the binary one saves hardware.
2. In parallel, negate the packet significand when the signs differ
   (`bs_cond_neg`) and PN-recode it to 65 digits.
3. Add the two with a 3-2 adder over weights 2^-62 and up. The two lowest
   bits of `f1` pass through unchanged.
4. PN-recode the 3-2 sum again (again from 2^-62 up) to get the 71-digit
   sum `g`.
5. Feed the XOR of the top 64 positive and negative bits to a leading-zero
   counter (`bs_lzc`). This gives the count `k` and a flag `nz`, meaning some
   nonzero digit lies in the top 64.

**Cycle 2.**

1. Negate `c` when the signs differ and add it into the lowest four digits of
   `g`. Those four digits plus `c` lie in -12 .. 11. This is because the two
   lowest digits are plain binary and the recoding bounds the next two. So a
   4-digit result holds the sum and nothing above changes. The 4-digit adder
   is built as a small integer sum that is re-encoded.
2. Normalize:
   * If `nz` is set, shift left by `k`. The recoding guarantees that the
     leading digit `sigma` is nonzero and that `sigma.t` lies in (9/32, 7/8)
     for `sigma = +1`, or (-23/16, -9/16) for `sigma = -1`. The late `c` moves
     this by at most 1/32.
   * If `nz` is clear, the whole sum sits in the bottom seven digits. The
     **seven-digit adjust** (`pf_seven_adjust`) then compresses those to an
     integer and writes its normalized magnitude in the same leading-digit
     form, padded with zeros. It also detects an exact zero.
3. Final adjust:
   * `sigma = +1`: shift by a fixed 2 places.
   * `sigma = -1`: negate and shift by 1 place.

   Both land the value in (1, 4). `pf_pack` then folds the leading digits
   into `1 b0` (see below).

The small path is exact. The principal part plus the seven low digits equal
the full sum, and the sticky digit is 0. Result exponent: `e2 + 6 - n - s`.
Here `n` is the normalization distance: `k`, or the equivalent distance
reported by the seven-digit adjust. `s` is the fixed shift (1 or 2).

## Large path (`pf_large_path`)

Frame: position q has weight 2^-q relative to the larger exponent.

**Cycle 1.**

1. Subtract the full exponents. This gives `expsign` (`e2 > e1`) and the
   shift `m`, the magnitude of `d` clamped. Longer shifts give the same
   rounded result. The clamp is 66 when the standard operand is shifted and
   68 when the packet operand is shifted (see *Departures*).
2. Negate and PN-recode the packet significand to 65 digits (positions
   -2 .. 62).
3. Treat `f1` as a borrow-save number with a zero negative vector
   (positions 0 .. 63).
4. The swap sends the larger-exponent operand straight on. The other one goes
   to two units:
   * **High order alignment** (`pf_hi_align`): shifts it right by `m`, to
     positions -2 .. 65. Digits shifted out are dropped.
   * **Low order generator** (`pf_lo_gen`): keeps exactly the digits that the
     shift pushes past position 65, *unshifted*, by masking with a
     thermometer code. Only the sign of their leading nonzero digit matters
     later, so leaving them unaligned is harmless.

**Cycle 2.**

1. A 4-2 adder sums the aligned high part and the larger operand. This gives
   `g` at positions -4 .. 65.
2. The carry-round packet, negated if needed, goes to one of two fixed places,
   chosen by `expsign` alone:
   * **e2 > e1**: the packet operand is the unshifted one. `c` is added at
     positions 62 and 63 of `g` with a 4-digit adder. The digits there plus
     `c` stay within ±15, so no carry leaves the four digits. This follows
     from the fraction-range bound of the cascaded 4-2 adder.
   * **e1 > e2**: the packet operand was shifted by at least 5. `c` belongs
     to the low-order part, at its own positions 62 and 63 (before the
     shift). It is added there with a 3-digit adder: the recoded digits 61–62
     plus `c` stay within ±7. That part only feeds the sticky digit.
3. **Adjust.** The sum has magnitude in (1/2, 4 1/2). The leading digits down
   to position 3 are added into a small integer `A`, in units of 1/8. The
   digits left out are worth less than 1/8, so `A` gives the exact sign and a
   safe shift choice:
   * left by 1 if |A| < 12 (1.5),
   * right by 1 if |A| >= 28 (3.5),
   * otherwise none.

   Then negate if the sum is negative, shift, and fold with `pf_pack`.
4. Output the seven digits below the principal part as `lp`/`ln`. The
   **sticky digit** is the sign of the leading nonzero digit of the low-order
   part, flipped when the sum was negated.

Result exponent: `max(e1, e2) - 1`, `+0` or `+1`, following the shift.

## Packing the leading digits (`pf_pack`)

After the final shift the value V is positive and in (1, 4). But its digits
at and above 2^0 can be any borrow-save pattern. Let D be their integer value
and t the (signed) fraction below them. Then D is 1, 2, 3 or 4:

* D = 1, 2, 3: write `1 b0` with `b0 = D - 2`. The fraction is unchanged.
* D = 4: V < 4 forces t < 0, so t's first nonzero digit is -1. Add 1 there:
  that digit and all zeros above it become +1, and `b0 = 1`. This is a
  prefix-OR over the digits, with no carry chain.

`err` is raised if the input is outside that range. The datapaths never
produce such an input.

## What the result means

Let `P` be the value of the principal part and seven low digits,
`f + lo 2^-69`. Let `S` be the exact sum, with the smaller operand scaled by
`2^-m` in the large path (`m` the clamped shift).

* **Small path**: `(-1)^s 2^e P = S` exactly. The sticky digit is 0.
* **Large path**: the remainder `S - (-1)^s 2^e P` is nonzero only through
  the digits that fell below the aligned high part. Its sign, taken on the
  magnitude, is the sticky digit. Its size is below one unit of the last
  high-part digit. That unit is 2^-64, 2^-65 or 2^-66 relative to 2^e
  (after a left shift, no shift or a right shift), and P is a multiple of it.

Rounding to 64 bits puts every boundary on a multiple of 2^-64 relative to
2^e. A boundary is either a representable value or the midpoint between two.
So the exact value can never lie on the other side of a boundary from P. If
P sits exactly on a boundary, the sticky digit says which way the exact value
lies. A rounder can therefore decide correctly, in any rounding mode, from the
principal part, `lo` and the sticky digit alone. The testbenches check this
property directly on every large-path result.

## Departures and own choices

These follow the published algorithm in structure. The following are this
design's own, or read it in a particular way:

* **Width of the large-path sum.** Two cascaded 3-2 adders on 68-digit inputs
  produce 70 digits. This design keeps all 70 (positions -4 .. 65) and does
  not truncate to 69.
* **Low order generator mask.** The mask keeps exactly the digits the high
  order shifter drops (`m - 2` digits of the 66-digit operand), so the two
  parts never overlap.
* **Reduced adders for the carry-round packet.** The 3- and 4-digit adders
  that take the carry-round packet are built as small integer sums, then
  re-encoded as borrow-save digits. A gate-level redundant cell is not used.
* **Leading-zero counter.** An exact priority counter over the 64 XOR bits.
* **Seven-digit adjust.** Built from its function: compress, normalize,
  re-encode.
* **Pack with D = 4.** The prefix-OR rewrite is this design's answer to a
  case the two-digit adjust alone does not cover.
* **Exponent and sign logic.** These are this design's own throughout, as are
  the zero flag and the `err` checks. There is no exponent overflow or
  underflow handling: exponents are 15-bit values taken modulo 2^15.
* **Alignment clamp.** The published algorithm clamps every large-path shift
  at 66. That is enough when the shifted operand is the standard one, which
  is below 2. A shifted packet operand can be almost 4. Then a clamp of 66
  turns `1.0 - 4·2^-67` into the representable `1 - 2^-64`, where correct
  rounding gives `1.0`. This design clamps that direction at 68 (`CLAMP_P`
  in `pf_pkg`). The forwarding test includes these cases.
* **Valid/reset protocol.** `in_valid`/`out_valid` with reset on the valid bits
  only.

Not included: the rounder (cycles 3–4) that produces the next carry-round
packet and the standard-format result. The testbenches contain a behavioural
model of it, `tb/pf_round_model.sv`. It rounds to nearest even and has the
rounder's timing. It is not meant for synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_pf_ref_pkg.sv` is an independent reference. It holds random packet
generators, an exact big-integer evaluation of both operands and the result,
and a checker for the contract above: packet form, range, exactness or
bounded remainder, and sticky sign.

| testbench | what it checks |
|-----------|----------------|
| `tb_pf_adder` | the top, at its default sizes: 100 000 random operations in five classes (small difference, e1 > e2, e2 > e1, beyond the clamp, deep cancellation), random `in_valid` gaps, latency of exactly 2 cycles. It counts and requires each mechanism: both paths, both carry-round placements, the clamp, seven-digit adjust, exact zero, negative sigma, left / right / no shift in the large path, the D = 4 rewrite in both paths, and a nonzero sticky digit |
| `tb_pf_forward` | dependent additions as the design intends them to run. Two interleaved accumulation chains keep the adder busy every cycle. Each result goes straight from the output register back to `b` two cycles after its producer. Its carry-round packet comes from the rounder model one cycle later. Every step is compared with a sequential IEEE 754 computation, rounding to nearest even after each addition: the adder's contract, the exact value of the forwarded packet, and the rounder model's standard result are all checked. It starts with directed cases around both alignment clamps |
| `tb_pf_small_path`, `tb_pf_large_path` | each path on its own range, 20 000 operations, plus path-specific counters |
| `tb_bs_pn_recoder` | value, and the (-3/4, 1/2) fraction range after `P(N(x))` |
| `tb_bs_add32`, `tb_bs_add42`, `tb_bs_cond_neg`, `tb_bs_lzc` | value and count on random vectors |
| `tb_pf_seven_adjust` | all 3^7 digit patterns |
| `tb_pf_pack`, `tb_pf_hi_align`, `tb_pf_lo_gen` | against bit-level reference models |

All pass with zero failures.

To run one with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pf_pkg.sv tb/tb_pf_ref_pkg.sv tb/tb_pf_adder.sv --top-module tb_pf_adder
./obj_dir/Vtb_pf_adder
```

For another testbench, replace `tb_pf_adder` with its name. The other modules
are found through `-Irtl`.

## Files

| file | content |
|------|---------|
| `rtl/pf_pkg.sv` | formats (`std_op_t`, `pf_op_t`, `pf_cr_t`, `pf_sum_t`) and constants |
| `rtl/pf_adder.sv` | top: path select, pipeline registers, valid |
| `rtl/pf_small_path.sv` | datapath for -1 <= e1-e2 <= 4 |
| `rtl/pf_large_path.sv` | datapath for the other differences |
| `rtl/bs_pn_recoder.sv` | P(N(x)) carry recoding |
| `rtl/bs_cond_neg.sv` | conditional negation (vector swap) |
| `rtl/bs_add32.sv`, `rtl/bs_add42.sv` | 3-2 and 4-2 redundant adders |
| `rtl/bs_lzc.sv` | leading-zero counter on the XOR of the top digits |
| `rtl/pf_seven_adjust.sv` | normalization when only the low seven digits are nonzero |
| `rtl/pf_hi_align.sv` | high order alignment shifter |
| `rtl/pf_lo_gen.sv` | low order generator (digits beyond the high part) |
| `rtl/pf_pack.sv` | final fold into the `1 b0` packet form |
| `tb/tb_pf_ref_pkg.sv` | reference models and the result checker |
| `tb/pf_round_model.sv` | behavioural model of the rounding stages, used by `tb_pf_forward` |
| `tb/tb_*.sv` | one testbench per module, plus `tb_pf_forward` |
