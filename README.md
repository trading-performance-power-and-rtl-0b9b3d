# Posit<8,2> multiply-accumulate unit with a scaled accumulator

Low-precision posit arithmetic works well for training convolutional networks,
but only if dot products are accumulated with more precision than the operands
have. The posit standard provides the *quire* for this: an exact fixed-point
accumulator wide enough to hold any sum of products. For 8-bit posits with
es = 2 the quire is 128 bits wide, four times wider than the rest of the
datapath, and it dominates the area and power of a MAC unit.

This RTL implements a pipelined posit fused multiply-add / multiply-accumulate
(FMA/MAC) unit whose accumulator is a *scaled accumulator* instead of the quire:
a 4n-bit fixed-point "base" paired with a small scale factor, i.e. a tiny
floating-point accumulator with 7 bits of headroom. For posit<8,2> that is
32 + 7 bits instead of 128. It loses exactness when the summands differ widely
in magnitude. It keeps enough precision for CNN training, and it keeps the
property that matters most: products are summed before any rounding to 8 bits.
The standard quire is still available through a parameter, so the two can be
compared in the same datapath.

## Posit numbers in one paragraph

An n-bit posit<n,es> is read as a 2's complement word. After the sign bit comes
a *regime*: a run of m equal bits ended by the opposite bit (or by the end of
the word). A run of ones means k = m-1, a run of zeros k = -m. Then come up to
es exponent bits, and whatever bits are left are the fraction. The value is
(-1)^s · 2^sf · 1.f with the *scale factor* sf = k·2^es + exp. Long regimes leave
few fraction bits, so precision is highest near ±1 and tapers towards the
extremes. `0…0` is zero and `10…0` is NaR (not a real). Posits never overflow
to infinity or underflow to zero: results saturate to maxpos and minpos. For
posit<8,2>, sf runs from −24 to +24 and there are at most 3 fraction bits.

## The pipeline

`posit_mac` computes

| `acc` | operation | result |
|---|---|---|
| 0 | fused multiply-add | r = c ± a·b (accumulator := that value) |
| 1 | multiply-accumulate | accumulator := accumulator ± a·b, r = accumulator |

with `sub` choosing the minus sign. Plain multiplication is a·b + 0 and plain
addition is a·1 + c. Every operation writes the accumulator and produces a
rounded posit result, so a dot product of length L is one FMA followed by L−1
MACs, and the last result is the rounded dot product.

Five stages, with registers after the first four:

```
 posit_a ─┐
 posit_b ─┼─ 1 DECODE ×3 ─┃─ 2 MULTIPLY ─┃─ 3 ACCUMULATE ─┃─ 4 NORMALIZE ─┃─ 5 ENCODE ─ posit_r
 posit_c ─┘  (s, sf, f)   ┃  s⊕s, sf+sf, ┃  (register is  ┃  2's compl.,  ┃  regime,
                          ┃  f·f, ovf    ┃   the accum.)  ┃  LZC, shift   ┃  round, sign
```

1. **Decode** (`posit_decode`, three copies). Take the 2's complement of a
   negative input. Invert the body if it starts with a one, so that a
   leading-zero counter measures the regime run. Shift the regime and its
   terminating bit out. The exponent and fraction are then left-aligned:
   sf = k·2^es + exp, and the fraction gets its hidden one.
2. **Multiply** (`posit_mult`). XOR the signs, add the scale factors and
   multiply the fractions. The product of two values in [1,2) lies in [1,4).
   If it is 2 or more, the scale factor gets +1. Otherwise the product is
   shifted left by one. Either way the hidden one ends up in the MSB.
3. **Accumulate** (`sacc_acc` by default, `quire_acc` as an option; see below).
   The accumulator register is this stage's pipeline register. A MAC issued in
   the next cycle therefore sees the updated value, and dependent accumulations
   run back to back at one per cycle.
4. **Normalize** (`posit_normalize`). The sign is the accumulator's MSB.
   Take the magnitude, count its leading zeros and shift the leading one to the
   top. The scale factor is the position of that one relative to the binary
   point, plus the accumulator's scale (zero for the quire). The bits below the
   leading one go on as N fraction bits and a sticky bit.
5. **Encode** (`posit_encode`, combinational). Split sf into k = sf >> es and
   e = sf mod 2^es. Shift the pattern `10 e f…` right arithmetically by k
   (k ≥ 0), or `01 e f…` by −k−1 (k < 0). This one shift produces the run of
   ones or zeros and its terminator. Round the top n−1 bits to nearest, ties
   to even, using the next bit as guard and everything below as sticky. Clamp
   to maxpos/minpos, then apply the sign.

**Timing.** Operands presented with `in_valid` high at clock edge t give
`posit_r` with `out_valid` high after edge t+4. `posit_r` comes straight from
the encoder's logic, without an output register. The unit accepts one operation
every cycle and never stalls. Reset (`rst_n`, asynchronous, active low) clears
the valid bits and the accumulator.

## The scaled accumulator (`sacc_acc`)

This is the part that differs from a textbook posit MAC, and the one to
understand before trusting the results.

### Format

```
 scale factor: clog2(n)+es+2 bits, signed               (7 bits for posit<8,2>)
 base:         | s | accumulation guard | fraction    |
                 1        7 bits          4n-8 bits     (32 bits for posit<8,2>)
 value = base · 2^(scale − (4n−8)),  base in 2's complement
```

An operand enters with its hidden one on the guard's LSB, i.e. with the binary
point between guard and fraction. A product has 2·(n−2−es)−1 fraction bits and
a posit operand n−3−es; both fit in the 4n−8 fraction bits without loss. The
scale field takes the operand's scale factor directly. Its width,
clog2(n)+es+2, holds the scale factor of any product of two posits.

### One step

1. Convert the product and the third operand to (base, scale) form, taking the
   2's complement when negative. `sub` negates the product.
2. `acc` picks the addend: the third operand or the stored (base, scale).
3. Compare the two scales. Shift the base with the smaller scale right
   (arithmetically) by the difference. The other base is unchanged, and its
   scale becomes the result's scale.
4. Add the two bases.
5. **Adjust.** If the guard's MSB now differs from the sign bit, the sum has
   reached the top of the guard. Halve the base (arithmetic shift right by one)
   and add one to the scale. This keeps |base| < 2^(4n−2), so two accepted
   values can always be added without overflowing the 4n bits. The `adjusted`
   output pulses when this happens, and an assertion in `sacc_acc` checks the
   invariant (guard MSB equal to the sign bit) every cycle.

Example, posit<8,2>: accumulating the same product 1.5·2^10 repeatedly. Each
product enters as base 1.5·2^24 with scale 10. After 43 additions the sum
reaches 2^30, the guard's MSB. The stage halves the base and the scale becomes
11. From then on each new product is aligned by one bit, and so on. Without the
scale field, a 32-bit fixed-point accumulator could hold only a few of those
products. Without the guard, every addition would need renormalising.

### What it gives up

- **Bits shifted out during alignment are truncated.** The shift is
  arithmetic, so the result rounds towards −∞. A small term added to a large
  accumulator loses the bits below the accumulator's fraction LSB. With
  4n−8 = 24 fraction bits against the 3 fraction bits of the 8-bit result, this
  rarely changes the rounded result. In the included LeNet-5 style test (784
  outputs of a 5×5 convolution and 120 outputs of a 400-input fully connected
  layer, with weights of both signs) every rounded result equals the
  exactly accumulated one.
- **No renormalisation downwards.** When a sum cancels, the base becomes small
  while the scale stays large, and the lost low bits do not come back. A base
  that becomes exactly zero is ranked below every scale (this implementation's
  choice), so the next operand is not shifted against a stale scale.
- **Scale saturation.** The scale saturates at its maximum rather than
  wrapping. For posit<8,2> that maximum is 63. Any value that large encodes
  to maxpos anyway.

### Sizes

| posit | standard quire (cg = 31) | older quire (cg = n−1) | scaled accumulator |
|---|---|---|---|
| <8,1>  | 80 bits  | 56 bits  | 32 + 6 bits |
| <8,2>  | 128 bits | 104 bits | 32 + 7 bits |
| <16,1> | 144 bits | 128 bits | 64 + 7 bits |
| <16,2> | 256 bits | 240 bits | 64 + 8 bits |

Quire size = 1 + cg + 2^(es+2)·(n−2), of which 2^(es+1)·(n−2) bits are fraction.
At the default configuration the whole unit has 137 flip-flop bits.

## The quire option (`quire_acc`)

With `ACC = ACC_QUIRE` the accumulate stage is an exact fixed-point quire of
1 + CG + 2^(es+2)·(n−2) bits. The product and the third operand are placed by
shifting their fractions by sf + (number of quire fraction bits), then
2's-complemented by sign (and `sub` for the product), then added. Every sum of
up to about 2^CG products is exact. Rounding happens only once, in the
encoder. `CG = 31` follows the current posit standard; `CG = n−1` gives the
smaller quire of the older standard release. Overflow past the carry guard
wraps. The testbench drives the n = 6 older quires (5-bit carry guard) past
that point with a run of maxpos² products and checks them against a reference
that wraps the same way.

## Special values

- A NaR operand makes the result NaR. In accumulate mode the NaR sticks until
  the next fused multiply-add (`acc = 0`) restarts the accumulator.
- A zero operand contributes nothing, and a zero accumulator encodes to zero.
- Results never round to zero or NaR. Anything above maxpos gives maxpos, and
  any non-zero value below minpos gives minpos.

## Interface

```systemverilog
posit_mac #(
  .N(8), .ES(2),                 // posit format (N >= ES+4)
  .ACC(posit_pkg::ACC_SCALED),   // or posit_pkg::ACC_QUIRE
  .CG(31)                        // quire carry guard, ACC_QUIRE only
) u_mac (
  .clk, .rst_n,
  .in_valid, .acc, .sub, .posit_a, .posit_b, .posit_c,   // issue
  .out_valid, .posit_r,                                  // result, 4 edges later
  .adjusted                                              // scaled accumulator rescaled
);
```

Any N ≥ ES+4 works. Precisions 6, 8, 10, 12 and 16 with es = 1 and 2, and
n = 8 with es = 0 and 3, are simulated with all three accumulators. All
widths derive from N, ES and CG through the functions in
`posit_pkg`.

## Where this RTL departs from, or adds to, the published design

These follow the published architecture: the stage split and register
positions, the decoder and encoder structure, the quire format and size, and
the scaled accumulator's format, its alignment of the smaller-scale operand and
its overflow adjust.

These are this implementation's own choices, because the source leaves them
open:

- the valid handshake and the missing output register;
- `sub` negating the product (rather than the third operand);
- NaR/zero flags and their propagation;
- the asynchronous reset and the reset state of the accumulator;
- the exact adjust rule (guard MSB ≠ sign);
- ranking a zero base lowest;
- scale saturation;
- truncating alignment;
- round-to-nearest-even on the bit string (the posit standard's rounding);
- passing N fraction bits plus a sticky bit from normalize to encode;
- the widths of internal scale-factor signals;
- the normalize scale factor is formed as a fixed offset *minus* the
  leading-zero count (each leading zero makes the value half as large), where a
  loose description would say the two are combined by adding;
- the scaled accumulator's scale field is kept beside the 4n-bit base, so the
  Posit<8,2> accumulator state is 32 + 7 bits; the "32-bit accumulator"
  figure usually quoted for it counts the base only.

Not included: the quire-less FMA baseline (no quire, rounding after the
adder), whose adder is not specified; and any run-time precision switching.
Each posit format is a separate instance.

## Files

| file | content |
|---|---|
| `rtl/posit_pkg.sv` | accumulator-mode enum and width functions |
| `rtl/lzc.sv` | leading-zero counter |
| `rtl/posit_decode.sv` | stage 1 |
| `rtl/posit_mult.sv` | stage 2 |
| `rtl/sacc_acc.sv` | stage 3, scaled accumulator |
| `rtl/quire_acc.sv` | stage 3, standard quire |
| `rtl/posit_normalize.sv` | stage 4 |
| `rtl/posit_encode.sv` | stage 5 |
| `rtl/posit_mac.sv` | top: the pipeline |
| `tb/posit_ref_pkg.sv` | bit-serial reference model: decode, exact values, encode with rounding, scaled-accumulator model |
| `tb/mac_checker.sv` | random stimulus and scoreboard for one `posit_mac` |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with
a watchdog if it hangs. The reference model in `tb/posit_ref_pkg.sv` walks the
bits one at a time. It shares no structure with the shifters and counters of
the RTL. Exact values are held as 512-bit fixed-point numbers with 200 fraction
bits. Products are formed from the decoded integer mantissas and exponents, not
by multiplying two fixed-point values, so even maxpos² of Posit<16,2> (2^112)
stays well inside that range.

| testbench | what it checks |
|---|---|
| `tb_posit_decode` | every posit<8,2> and posit<16,2> pattern |
| `tb_posit_mult` | 20,000 random products, exact comparison, both renormalisation cases |
| `tb_posit_normalize` | random values and scales; leading-one position, fraction and sticky bits |
| `tb_posit_encode` | every posit<9,2> pattern (expected value obtained by rounding the 9-bit pattern itself), every posit<12,2> pattern, and out-of-range scales, including ties and both saturations |
| `tb_quire_acc` | random FMA/MAC/subtract/NaR streams; the quire must equal the exact sum bit for bit (cg = 31 and cg = 7) |
| `tb_sacc_acc` | random streams plus forced guard overflows against the integer model of the scaled accumulator |
| `tb_posit_mac` | the default unit end to end: about 5,400 results, each checked for value and 4-cycle latency. Counts FMA, MAC, subtract, back-to-back MAC, idle cycles, NaR, zero, saturation to maxpos/minpos and adjust steps; a mechanism that never happened counts as a failure |
| `tb_posit_mac_configs` | 36 units side by side: n = 6, 8, 10, 12, 16 with es = 1, 2, plus n = 8 with es = 0, 3, each with the scaled accumulator, the standard quire and the older quire |
| `tb_posit_mac_lenet` | one 5×5 convolution channel over a 32×32 input and a 400→120 fully connected layer (67,600 MACs in all), streamed into the scaled-accumulator and quire units side by side; every result of both is checked, and the test reports how far the scaled accumulator's final outputs are from exact |

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_posit_mac \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/posit_pkg.sv tb/posit_ref_pkg.sv tb/tb_posit_mac.sv
./obj_dir/Vtb_posit_mac
```

Every testbench runs in well under a second. The simulator used is two-state,
so the testbenches do not depend on X propagation.

Lint (`verilator --lint-only -Wall`) reports only unused-bit warnings. These
come from bits that exist for a width's sake: the decoder's magnitude MSB,
which is set only for NaR; the normalizer's leading-one position; the high
bits of the encoder's shift amount; and the multiplier's zero flag, which the
top does not need because a zero product already has a zero fraction.
