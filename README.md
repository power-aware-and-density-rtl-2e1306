# HUB posit adder with a BEC carry-select mantissa adder

A posit adder normally spends a good part of its logic on rounding: guard,
round and sticky bits out of the alignment shifter, a rounding decision, and
an incrementer after packing. A **HUB** (half-unit biased) posit removes all of
that. Every stored word carries an implicit 1 one place below its last stored
bit (the *iLSB*), so the value of a word is the midpoint of the interval that
plain truncation maps onto it, and truncating an exact result is already
rounding to nearest. This RTL implements a HUB posit adder for Posit(N, 2),
with N = 11 as the main configuration and N = 6 as the small one. Each operand
of the 11-bit adder is decoded by two 6-bit HUB decoders working on the two
halves of the word. The significands are added by a square-root carry-select
adder in which binary-to-excess-1 converters (BEC) replace the carry-in-1
ripple adders. Adder segments that hold no live mantissa bits, as the regime
lengths show, are switched off.

The design is combinational from operands to result, with one output register.

## Number format

A Posit(N, 2) word is `s | regime | exponent (2 bits) | fraction`. The
regime is a run of equal bits closed by the opposite bit. Exponent and
fraction get whatever bits are left, and missing bits read as 0. For HUB
words, decoding appends the iLSB `1` after the last stored bit, so the iLSB
becomes part of the regime, the exponent or the fraction, depending on how
long the regime is.

Negative words are **not** two's-complemented before decoding. r, e and f are
read from the raw bits, and the sign enters the value as

    value = ((1 - 3s) + f) * 2^((-1)^s * (4r + e + s))

A run of k ones gives r = k-1 and a run of k zeros gives r = -k. For example,
in Posit(6,2) the word `001011` reads r = -1, e = 1, f = 0.75 (`1` stored, `1`
iLSB). The word `111101` reads r = 2, e = 3 (`1` stored, iLSB `1`), f = 0.

This form suits hardware. The significand is the two's-complement number
`{s, ~s, f}` (`01.f` = 1+f, `10.f` = -2+f). The scale factor is
`(4r + e) xor s`, because -(x+1) = ~x. No negation is needed on the way in or
on the way out.

For any sign, the value grows with the stored bits read as an unsigned number,
so truncation always rounds towards minus infinity. The iLSB moves the word to
the middle of that step. The all-zero word is zero and `1 0...0` is NaR. These
two are handled as in standard posits.

## Datapath

    a, b ─► decode ─► exponent equalizer ─► mantissa neutralizer ─► csla_bec
                                                                      │
                     result ◄─ register ◄─ hub_posit_encoder ◄─ hub_normalizer

| stage | module | what it does |
|---|---|---|
| decode (N = 11) | `posit11_decoder`, `regime_exponent` | two HUB Posit6 decoders on the halves, then merge into r, e, f, scale, significand |
| decode (other N) | `hub_posit_decoder` | leading-bit counter, regime logic, left shifter, iLSB insertion |
| align | `exponent_equalizer` | picks the larger scale and right-shifts the other significand |
| gate | `mantissa_neutralizer` | turns off carry-select segments below the lowest live bit |
| add | `csla_bec` (`rca`, `bec`, `full_adder`) | N-1 bit square-root carry-select adder with BECs |
| normalize | `hub_normalizer` | appends the discarded bit, leading-bit detection, left shift, scale to r and e |
| pack | `hub_posit_encoder` | regime logic and right shifter, truncation, saturation |
| top | `posit_hub_adder` | special values, output register, status flags |

Widths for Posit(N, 2): the fraction has FW = N-4 bits (the iLSB included),
the significand SW = N-2 bits, and the adder AW = N-1 bits (one extra bit on
top for the carry). The scale is `$clog2(N)+5` bits. For N = 11 these are 7, 9,
10 and 9.

### Decoding an 11-bit word with two 6-bit decoders

This is the least obvious part of the design. `posit11_decoder` cuts the word
into the sign `p[10]` and two halves, `p[9:5]` and `p[4:0]`. It decodes
`{p[10], half}` as two independent HUB Posit6 words, each with its own iLSB.
For `a = 613` (hex), for instance, the halves give r = 0, e = 0 and r = 0,
e = 1. For `b = 6bd` they give r = 0, e = 2 and r = 2, e = 3.

`regime_exponent` turns the two half decodes into the decode of the whole
word. It has three cases:

1. **The regime ends inside the first half** (that half's decoder reports
   `term`). Then r = r1. The exponent and fraction are the whole body
   `{p[9:0], 1}` shifted left by the first half's run length + 1. The second
   half's decode is not used.
2. **The first half is one run and the second half starts with the opposite
   bit.** That bit is the terminator, so r = 4 (ones) or -5 (zeros). Exponent
   and fraction come from the body shifted left by 6.
3. **The run continues into the second half.** Then r = r1 + r2, and exponent
   and fraction are the second half's. This works because a half that is all
   ones decodes as r1 = 5: its own iLSB extends the run to 6. A half that is
   all zeros decodes as r1 = -5. Adding r2 then gives exactly the regime of
   the combined run, up to r = 10 for `0 1111111111`. The second half's iLSB is
   the word's iLSB.

Half decodes that are only partly meaningful are never mixed in. For example,
`b = 6bd` decodes as r = 0, e = 2 (case 1), not as r1 + r2 = 2.

The merge rule is this design's own; the source design only shows the two
6-bit decoders and a "regime + exponent" stage after them. For any N other
than 11, the top instantiates a single `hub_posit_decoder` per operand.

### Alignment without rounding bits

`exponent_equalizer` keeps the operand with the larger scale (A on a tie). It
shifts the other significand right, with sign extension, by the scale
difference d. Only the first bit that falls off is kept (`guard`), because
nothing is rounded. Two corner cases need care, because the usual rounding
step no longer hides them:

* **Negative operand shifted out completely.** If d exceeds the significand
  width, an arithmetic shift leaves all ones. That would take one unit in the
  last place off the sum. In this case the shifter fills with zeros instead
  (a logical shift), so the operand contributes 0. The `excess_shift` flag
  records it. The threshold, d > SW, is this design's reading of "more bits
  than the mantissa".
* **Cancellation.** When close values of opposite sign cancel, the sum is
  shifted left during normalization, and the bit lost in alignment becomes
  significant. `hub_normalizer` appends `guard` below the adder output before
  it normalizes. The `cancel` flag records when that bit was 1 and moved into
  the result.

Apart from these two rules, the result is the exact sum of the larger operand
and the truncated, aligned smaller one, truncated again when it is packed.
This is what the testbenches' reference model computes.

### Carry-select adder with excess-1 converters

`csla_bec` splits the operands into groups of 2, 2, 3, 4, 5, … bits. At the
default 16 bits these are [1:0], [3:2], [6:4], [10:7] and [15:11]. Group 0 is
a ripple-carry adder fed by `cin`. Every other group of n bits has one
ripple-carry adder with carry-in 0, plus an (n+1)-bit BEC that produces
`{carry, sum} + 1` from that adder's output. A mux controlled by the previous
group's carry selects one of the two. A BEC is a chain of ANDs and XORs (bit
0 inverted, bit i XORed with the AND of the bits below it). It is smaller than
the second ripple adder that a regular carry-select adder would use. The
adder's width is a parameter. Above 16 bits the group sizes continue
6, 7, …, and the top group is cut to fit. The Posit11 adder uses a 10-bit
instance with groups [1:0], [3:2], [6:4] and [9:7].

### Segment gating

The fraction of a posit shrinks as its regime grows, so below the lowest live
bit of the two aligned operands everything is zero. `exponent_equalizer`
computes that bit (`lsb_pos`) from the live fraction widths that the decoders
report. `mantissa_neutralizer` enables a carry-select group only if its top
bit is at or above `lsb_pos`. It forces the operand bits of the other groups
to 0, so those groups do not toggle. The gated bits are zero anyway, so the
gating never changes a sum. Only switching activity is saved, and synthesis
may remove the AND gates as redundant unless they are kept. The
`seg_gated` flag shows when at least one group was off.

### Normalization and packing

`hub_normalizer` looks for the first bit below the sign that differs from it
and shifts the word left so that it reads `{s, ~s, fraction}`. For a negative
result this is the `-2 + f` form. The scale is corrected to
`scale_big + 1 - shift`, and r and e are split out of `scale xor s`.

`hub_posit_encoder` builds `{10, e, f}` (r ≥ 0) or `{01, e, f}` (r < 0). It
shifts right by r or -r-1, filling with the run bit, and keeps the top N-1
bits. There is no rounding.

Out-of-range results saturate:

* A regime of N-2 or more fills every stored bit with ones.
* A pattern that would be all zeros is replaced by `0...01`.

For positive words these are maxpos and minpos. For negative words, because
the bits are stored raw, they are the smallest and the largest magnitude.
`clamped` reports both cases.

## Interface and timing

`posit_hub_adder #(N = 11)`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears `out_valid`, `result`, `flags` |
| `in_valid` | in | 1 | `a`, `b` hold a pair |
| `a`, `b` | in | N | HUB posit operands |
| `out_valid` | out | 1 | `in_valid` delayed by one cycle |
| `result` | out | N | HUB posit sum |
| `flags` | out | `add_flags_t` | `excess_shift`, `cancel`, `seg_gated`, `clamped`, `zero`, `nar` |

The adder has a latency of one cycle and accepts a new pair every cycle.
`result` and `flags` hold their value while `in_valid` is low. Special
values:

* NaR in either operand gives NaR.
* A zero operand returns the other operand unchanged.
* An exact zero sum gives zero.

The register stage and these rules are this design's choices.

`posit_hub_pkg` holds ES = 2, the carry-select group functions (`grp_lo`,
`grp_hi`, `num_grps`), the scale width, the 6-bit half-decode struct
`hub_dec6_t`, and `add_flags_t`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. The reference model, `tb/posit_ref_pkg.sv`,
is separate from the RTL. It decodes words bit by bit into `real` values,
aligns and adds them with real arithmetic, and encodes by binary search for
the largest word whose truncated value does not exceed the sum.

| testbench | covers |
|---|---|
| `tb_posit_hub_adder` | Posit(11,2), default parameters: latency, corner cases, 200 000 random pairs, targeted excess-shift, cancellation and saturation pairs; every mechanism must occur |
| `tb_posit_hub_adder_exh` | Posit(11,2), all 4 194 304 operand pairs |
| `tb_posit_hub_adder_p6` | Posit(6,2), all 4096 operand pairs |
| `tb_hub_posit_decoder` | the 6-bit example words with their HUB r, e, f; all Posit6 and Posit11 words |
| `tb_posit11_decoder` | half decodes of `613` and `6bd`; all 2048 words |
| `tb_regime_exponent` | merged decode, scale and significand of all 2048 words |
| `tb_exponent_equalizer` | alignment, guard, excess flag, `lsb_pos` soundness |
| `tb_mantissa_neutralizer` | enables and masks for 16- and 10-bit adders |
| `tb_csla_bec` | 16-bit carry patterns and random operands; 10-bit exhaustive |
| `tb_bec`, `tb_rca` | truth tables |
| `tb_hub_normalizer`, `tb_hub_posit_encoder` | value preservation; round trip of every word; saturation |

Run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_posit_hub_adder \
        rtl/posit_hub_pkg.sv rtl/*.sv tb/posit_ref_pkg.sv tb/tb_posit_hub_adder.sv
    ./obj_dir/Vtb_posit_hub_adder

The package is listed first so that it is read before the modules that
import it; Verilator ignores the second mention of the same file. The
exhaustive 11-bit run takes a few seconds. All testbenches pass.

## What to trust and what was chosen here

These follow the source design:

* the HUB format with the iLSB, and decoding by leading-bit count, regime
  logic and left shift;
* packing by right shift and truncation, with no rounding logic;
* alignment of the smaller operand, with the logical-shift rule for negative
  operands and the re-inserted bit after cancellation;
* the split of the 11-bit decode into two 6-bit decoders;
* the BEC-based square-root carry-select adder and its group boundaries;
* the idea of switching off mantissa-adder segments according to the regime
  width.

These are this design's own choices:

* the raw-bit value formula above, chosen because it reproduces the HUB and
  conventional example values of the 6-bit format;
* the rule that merges the two 6-bit half decodes;
* the threshold for the logical-shift rule;
* the use of the carry-select groups as the gated segments, and AND-gating as
  the way to switch them off;
* zero and NaR handling and saturation;
* the single output register;
* the group sizes for widths above 16 bits.

Power and area savings are not modelled or measured here. The gating is
functionally transparent, and its benefit depends on the synthesis flow
keeping the gates.
