# Merged single/double precision floating-point multiplier and adder

This design shares one datapath between IEEE-754 double precision (DP) and
single precision (SP) arithmetic. There are two units, and each takes a
64-bit operand word in one of two forms:

- one binary64 number (DP mode);
- two independent binary32 numbers packed as `{sp_one, sp_two}` (SP mode).

The same hardware therefore does one DP operation or two SP operations.
The multiplier is built around two 27×27 mantissa multipliers. A DP
product is made in two passes through them, instead of using one multiplier
large enough for 53×53 bits. The adder is a two-path (FAR/NEAR) design. Its
shifters, adders and leading-zero logic are split into lanes, so that in SP
mode they carry two numbers side by side.

| unit | mode | throughput | latency |
|------|------|-----------|---------|
| multiplier `fpmul_top` | SP: 2 products | one operation per clock | 6 clocks |
| multiplier `fpmul_top` | DP: 1 product | one operation per 2 clocks | 9 clocks |
| adder `fpadd_top` | SP: 2 sums, or DP: 1 sum | one operation per clock | 6 clocks |

All results are rounded to nearest, ties to even. Operands must be normal
numbers and the result must stay in the normal range. There is no handling
of NaN, infinity, subnormals, overflow or underflow: an exponent that
leaves the range wraps.

## Operand format

| bits | DP mode | SP mode |
|------|---------|---------|
| 63 | sign | sign of SP1 |
| 62:52 | exponent | 62:55 exponent of SP1, then the fraction of SP1 |
| 51:0 | fraction | 31:0 is the whole of SP2 |

Inside both units a pair of SP fractions is put into the 52-bit DP
fraction field as `{frac1, 000001, frac2}`. The `1` is the hidden bit of
the second number. Everything below that sees one wide mantissa, and lane
boundaries are placed so that the two SP numbers never interact.

## Multiplier (`fpmul_top`)

### Pipeline

| stage | what happens | modules |
|-------|--------------|---------|
| 1 | sign XOR, exponent sum minus bias, split of the operands into 27-bit halves | `fpmul_sign_exp`, `fpmul_operand_proc` |
| 2–5 | two Karatsuba multipliers, 27×27 | `kara_mul27` |
| 6, SP | round and pack both products | `fpmul_sp_round` |
| 6, DP | carry-save accumulation of both iterations | `fpmul_dp_cst` |
| 7, DP | compound adder giving sum, sum+1, sum+2 | `fpmul_dp_compound_adder` |
| 8, DP | round, normalise, pack | `fpmul_dp_round` |

There is one more register at the output, which gives the latencies of 6
and 9 clocks.

### Operand split

- **SP:** each 27-bit half carries `{0001, 1.fraction}` of one SP operand.
  Multiplier 1 therefore makes product 1 and multiplier 2 makes product 2.
  Only the low 48 bits of each 54-bit product can be non-zero.
- **DP:** the multiplicand `{01, 1.fraction}` is split into a high half
  and a low half, and each goes to one multiplier. The multiplier operand
  is fed to both multipliers 27 bits at a time:
  - iteration 0 uses bits 26:0;
  - iteration 1 uses `{01, bits 51:27}`.

### Karatsuba multiplier (`kara_mul27`)

Each operand is split 14/13 bits into `h` and `l`. The multiplier forms
three products:

- `M1 = ah·bh`
- `M3 = al·bl`
- `M2 = (ah−al)(bh−bl)`, a signed product

The middle term is `ah·bl + al·bh = M1 + M3 − M2`. The result is
`M1·2^26 + (M1+M3−M2)·2^13 + M3`. It takes four register levels, and `en`
freezes all of them.

### DP iteration and the carry-save tree

The partial products of one iteration are placed in a 108-bit window:

- multiplicand-low × multiplier-half at bit 27;
- multiplicand-high × multiplier-half at bit 54.

Two levels of (3,2) counters reduce four inputs to a sum vector and a
carry vector. The four inputs are the two new products, a feedback sum and
a feedback carry.

- **Iteration 0:** the feedback inputs are zero. Only `vec_s[107:27]` and
  `vec_c[80:54]` can be non-zero.
- **Iteration 1:** those bits are fed back moved down by 27 positions.
  This accounts for the weight 2^27 between the two multiplier halves, so
  only 81 + 27 feedback wires are needed.

`vec_c[i]` carries weight `2^(i+1)`, and the shift by one is folded into
the wiring.

### Rounding

**DP compound adder.** The final addition is split in two:

- a 24-bit adder over bits 51:28 gives the round/sticky region and a
  carry `lower_cout`;
- a 54-bit upper adder produces `sum`, `sum+1` and `sum+2`.

Bits 27:0 of the sum vector pass through, because the carry vector is zero
there.

**DP rounding** then needs no long carry:

1. Take the base, `sum` or `sum+1`, as selected by `lower_cout`.
2. Decide the round on the base's N/L bits, on R (bit 51 of the lower
   part) and on the OR of the rest.
3. Pick the base or the next value up.
4. Normalise on the MSB of the selected value.

**SP rounding** uses the same rule on the 48-bit products. It always adds
1 at the L position. When the product is in [2,4) and rounds up, L is 1,
so this one addition also makes the carry into N.

### Handshake

`in_ready` falls in two cases:

- in the clock after a DP operation is accepted, because its second
  iteration occupies the multipliers;
- two clocks after a DP acceptance, because an SP result issued then would
  leave in the same clock as the DP result.

The result arrives with `out_valid`, and `out_dp` says which mode it is.
An assertion checks that the SP and DP result paths never finish in the
same clock.

## Adder (`fpadd_top`)

The adder follows the classic two-path split:

- **FAR path:** effective additions, and subtractions with an exponent
  difference greater than 1. It needs a long alignment shift but at most
  a 1-bit normalisation.
- **NEAR path:** subtractions with an exponent difference of 0 or 1. It
  needs only a 1-bit alignment but possibly a long normalisation.

Both paths run on every operation. The last stage chooses, per lane, which
one to use.

| stage | FAR path | NEAR path |
|-------|----------|-----------|
| 1 | `fpadd_setup`: exponent compare, swap, shift amount, sign and effective operation | (same) |
| 2–3 | `fpadd_align_shifter` | `fpadd_near_alu`: exact subtraction and magnitude |
| 2–4 | | `fpadd_lzac`: leading-zero anticipation and count |
| 4 | `fpadd_far_alu`: compound adder | |
| 5 | `fpadd_far_round` | `fpadd_norm_shifter` |
| 6 | `fpadd_path_select` | (same) |

`in_op[1]` is the operation of DP or of SP1, and `in_op[0]` that of SP2
(0 = add, 1 = subtract). The adder never stalls.

### Setup

Two exponent subtractors run side by side:

- an 11-bit one for DP or SP1;
- an 8-bit one for SP2.

Each gives `less` (the second operand is larger) and the absolute
difference. The difference saturates at 63 in DP mode and at 31 in SP
mode.

The upper and lower 26-bit halves of the merged mantissas are swapped by
their own `less`, so that `m1` always belongs to the larger operand. The
sign is `less ? s2^op : s1`, and the effective operation is `s1^s2^op`.

### Alignment shifter

The smaller mantissa becomes `{1, m2, 00}` (55 bits). The two zero bits
are the guard and round positions. The shifter is split into a 26-bit
upper part and a 29-bit lower part:

- In DP mode a 32-bit pre-shift comes first. Bits leaving the upper part
  then enter the lower part.
- In SP mode the two parts shift independently, by `sha1` and `sha2`.

Each part keeps a sticky bit, which is the OR of everything shifted out.

### FAR ALU: one adder, two lanes

One 60-bit adder makes both `sum` and `sum+1`. Two "slot" bits sit between
the lanes:

| bits | content |
|------|---------|
| 59:58 | extension |
| 57:32 | upper lane |
| 31 | upper sticky |
| 30 | boundary slot |
| 29:1 | lower lane |
| 0 | lower sticky |

How the slots behave depends on the mode:

- **DP:** both slots are set to propagate, so the adder acts as one 55-bit
  compound adder.
- **SP, addition:** the boundary slot kills the carry.
- **SP, subtraction:** the boundary slot generates the +1 of the upper
  lane's two's complement.

For a subtraction the smaller operand is inverted, sticky included. The
guard, round and sticky bits of the difference then come straight out of
the adder. `sum+1` adds one unit at the L position of every lane.

### FAR rounding

Each lane is read as a vector with S at bit 0, then R, G, L, N. The
significand MSB is at bit M, and bit M+1 is the carry of an addition.

| case | round up when | LSB |
|------|---------------|-----|
| add, no carry | G & (L∣R∣S) | L |
| add, carry | L & (N∣G∣R∣S) | N; adding at L carries into N |
| sub, MSB set | G & (L∣R∣S) | L |
| sub, MSB clear (1-bit left shift) | R & (G∣S) | G |

In the last case G becomes the LSB. Rounding up there is done by flipping
G, and `sum+1` is only taken when G was already 1.

A lane is flagged `u_n` (FAR result unusable) when a subtraction is
negative or needs more than a 1-bit left shift. Those cases are exactly
the ones the NEAR path computes exactly.

### NEAR ALU and leading-zero anticipation

The NEAR ALU subtracts `A − B`, where B is shifted right by one if the
exponents differ by one. The lanes are `[54:28]` and `[27:0]`, and SP2's
sign is read from bit 27, which lies in the zero gap. The ALU forms
`A+~B+1` and `A+~B`:

- a positive result is the first of these;
- a negative result is the bit-inverse of the second, which gives the
  magnitude without a second adder.

In parallel, the LZA builds an indicator string from A and ~B without
waiting for the subtraction. The first 1 in the string is at the leading
digit of |A−B|, or one place above it. At the least significant position
of each lane, the missing neighbour is treated as a zero digit, and the
lane's last indicator bit is forced to 1. A difference of one unit is
therefore still counted.

Eleven 5-bit priority encoders count the leading zeros. They form three
groups:

| group | DP mode | SP mode |
|-------|---------|---------|
| 1 | bits 54:30 | all of SP1 |
| 2 | bits 29:25 | unused |
| 3 | bits 24:0 | all of SP2 (indicator bits 25:1) |

A second level of encoders adds the group offsets:

- SP lanes: offsets 0, 5, 10, 15, 20, 25.
- DP: offset 0, 25 or 30 plus the code of the first valid group.

### Normalisation and path selection

The normalisation shifter shifts each lane left by the count:

- DP: a 32-bit pre-shift, then the remaining levels.
- SP: two 27-bit lanes.

If the lane MSB is still 0 afterwards, one correction shift follows. No
rounding is needed, because a NEAR result is exact whenever it is used.

Path selection takes NEAR for every lane flagged `u_n`, and FAR for the
others:

- the NEAR sign is `s ^ negative`;
- an exact zero gives +0;
- the result is packed as one DP word or two SP words.

## Departures from the textbook description and own choices

- **Multipliers.** The mantissa multipliers are plain logic (Karatsuba
  with three sub-products). Vendor DSP slices are not instantiated, so the
  register placement inside the multipliers is this design's own.
- **SP rounding table.** The published rule table has one entry that
  contradicts round-to-nearest-even: S47 = 0, N L R S = 1 0 1 1. The RTL
  implements the rule, not the table entry.
- **FAR subtraction.** The left-shift condition is taken as "bit M of the
  difference is 0". The rounding rules above were derived from
  ties-to-even and are checked against IEEE arithmetic.
- **Lane boundaries.** The exact lane boundaries in the NEAR ALU and the
  LZA, the group-3 mapping and the LZA's behaviour at a lane's end are
  this design's own.
- **Shift amounts and zeros.** Shift amounts saturate. A zero difference
  gives +0.
- **FAR compound adder.** It is built as one adder with slot bits rather
  than as separately wired lanes.
- **Normalisation shifter.** The DP shift (pre-shift plus five levels) and
  the two SP lane shifts are written as separate shift expressions. A
  layout where DP mode reuses the two 27-bit lane shifters is not used.
- **Group 3 input.** In SP mode the third encoder group reads indicator
  bits 25:1, where SP2's leading digit lies in this layout. In DP mode it
  reads bits 24:0.
- **Interface.** The multiplier's valid/ready handshake, the adder's valid
  pipeline and the synchronous active-low reset (valids only) were chosen
  for this RTL.
- **Top level.** `fp_merged_top` only places the two units side by side.
  They share nothing but the clock and the reset.
- **Target-specific variants.** Variants for other FPGA families, for
  example a multiplier with shorter latency built on larger DSP blocks,
  are not implemented.

## Files

- `rtl/fp_pkg.sv`: the shared NEAR-operand helper.
- `rtl/fp_merged_top.sv`: the top, with both units.
- `rtl/fpmul_*.sv` and `rtl/kara_mul27.sv`: the multiplier.
- `rtl/fpadd_*.sv`: the adder. `fpadd_pe5` is the 5-bit priority encoder.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/fp_ref_pkg.sv`: reference arithmetic for the testbenches, using the
  simulator's IEEE doubles. An SP result is taken in double and rounded
  once to binary32, which is exact for products and for sums of binary32
  values.

Every testbench:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- checks that each result appears at exactly its latency.

The end-to-end benches count the mechanisms they exercise and fail if any
never occurs:

- multiplier: DP/SP mix, ready stalls, rounding carries;
- adder: NEAR and FAR selections, carry-out, 1-bit left shift, negative
  differences, exact zeros, saturated shifts.

`tb_fp_merged_top` drives both units at once with the top at its default
configuration.

## Simulating

With Verilator 5, for example:

```
verilator --binary --top tb_fp_merged_top rtl/fp_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fp_merged_top.sv
./obj_dir/Vtb_fp_merged_top
```

A unit bench needs only its module, plus `rtl/fp_pkg.sv` for the adder
modules that use it, for example:

```
verilator --binary --top tb_fpadd_lzac -y rtl rtl/fp_pkg.sv rtl/fpadd_lzac.sv tb/tb_fpadd_lzac.sv
```
