# Adjusted Vedic multiplier (AVM) for a single-precision floating-point MAC

In a floating-point multiply-accumulate unit the slowest and largest part is
the multiplier of the two 24-bit significands (1.F × 1.F → 48 bits). This RTL
builds that multiplier recursively from 3×3-bit Vedic (Urdhva-Tiryakbhyam,
"vertically and crosswise") multipliers: 3×3 → 6×6 → 12×12 → 24×24. Each
level uses the same recipe:

* four half-width products,
* **one** carry-save adder (CSA) for the middle of the product,
* one carry-select adder built from Brent-Kung groups (the *EBK-CSLA*) for
  the final carry-propagate addition,
* a cheap increment for the top quarter of the product instead of a full adder.

Every XOR in the multiplier is a three-gate XOR, AND(OR(a,b), NAND(a,b)). With
the default `PIPE = 1`, every 3×3 product is registered, so the 24×24
multiplier has a latency of one clock and accepts a new pair every clock.

Around the multiplier sits a small IEEE-754 single-precision MAC:
`fp_mul` (sign XOR, exponent Ex+Ey−127, AVM significand product), `fp_add`,
and an accumulator register that feeds back into the adder. It computes
F = Σ X·Y.

## One AVM level, bit by bit (24×24)

Split X = {XH, XL} and Y = {YH, YL} into 12-bit halves. Four 12×12 AVMs give

```
HH = XH*YH   XHYL = XH*YL   XLYH = XL*YH   LL = XL*YL       (24 bits each)
```

and the product is HH·2²⁴ + (XHYL + XLYH)·2¹² + LL. The bits are formed as follows:

| product bits | source |
|---|---|
| Pr[11:0]  | LL[11:0], unchanged |
| —         | 24-bit CSA: XHYL + XLYH + {HH[11:0], LL[23:12]} → S[23:0], C[24:1] |
| Pr[12]    | S[0] (nothing to add at this weight, so the final adder is only 23 bits) |
| Pr[35:13] | 23-bit EBK-CSLA: S[23:1] + C[23:1], carry out **c2** |
| Pr[41:36] | 6-bit EBK-CSLA: HH[17:12] + (c1 + c2), carry out r; **c1** = C[24] |
| Pr[47:42] | 2:1 MUX, selected by r: HH[23:18] or HH[23:18] + 000001 (a second 6-bit EBK-CSLA) |

The 12×12 level (`avm12`) is the same with 6-bit halves: an 11-bit EBK-CSLA
for Pr[17:7], S[0] = Pr[6], and two 3-bit EBK-CSLAs plus a MUX for Pr[23:18].
The 6×6 level (`avm6`) is slightly different. Its CSA sum is not split: a
6-bit EBK-CSLA adds S[5:0] and {C[5:1], 0} into Pr[8:3]. The top three bits
HH[5:3] + (c1 + c2) come from increment-by-1 converters (IB1C), and
Pr[2:0] = LL[2:0].

The partial products are never reduced by more than one CSA. So the only carry
chains in a level are the MUX chains of the carry-select adders.

## The carry into the top quarter (differs from the published design)

Two carries cross into the top quarter. c1 is the CSA's top carry C[n], and
c2 is the final adder's carry out. The published design ORs them into one
enable E and increments the top quarter by E. That assumes that c1 and c2 are
never both 1. They can be:

* 6×6, X = 47, Y = 55: HH = 30, LL = 49, XHYL = 35, XLYH = 42. The CSA inputs
  add up to 35 + 42 + 54 = 131 = 2·64 + 3, so c1 = c2 = 1 and the top three
  bits need +2. With the OR the product comes out as 2073 instead of 2585. At
  6×6 only 47×55 and 55×47 hit this.
* 24×24 with both significand MSBs set (every normal floating-point operand):
  about 4.6 % of random pairs need +2. It also happens at 12×12.

This RTL therefore adds the two carries with a half adder,
k = {c1 AND c2, c1 XOR c2}, and uses the two-bit k wherever the original uses
E:

* in `avm24` and `avm12` the lower top-quarter EBK-CSLA adds
  {0…0, c1 AND c2, c1 XOR c2} instead of {0…0, E};
* in `avm6` a first IB1C adds c1 XOR c2 to Pr[11:9], then a second one adds
  c1 AND c2 to Pr[11:10].

The gate count grows by one AND gate per level, and the structure is otherwise
unchanged. The testbenches of `avm6`, `avm12` and `avm24` fail with the OR
version (4, 1748 and 5630 mismatches).

## Enhanced Brent-Kung carry-select adder (`ebk_csla`)

The operand is cut into groups, least significant first. Group 0 is a
Brent-Kung adder fed with the real carry in. Every other group works like
this:

* a Brent-Kung adder computes it with carry in 0, giving {carry, sum} of
  width w+1;
* a (w+1)-bit binary-to-excess-1 converter (BEC) turns that into the
  carry-in-1 result;
* a MUX driven by the previous group's carry picks between the two.

The groupings used are:

| adder | groups (LSB first) | where |
|---|---|---|
| 23-bit | 2, 2, 3, 4, 5, 7 | `avm24` final adder (the module default; taken from the original design) |
| 11-bit | 2, 2, 3, 4 | `avm12` final adder (chosen here; the original does not give it) |
| 6-bit  | 3, 3 | `avm6` final adder and `avm24` top quarter (from the original) |
| 3-bit  | 1, 2 | `avm12` top quarter (chosen here) |

The grouping is the parameter `GW`, an eight-entry array. Trailing zero
entries are unused groups, for example `.GW('{3, 3, 0, 0, 0, 0, 0, 0})`. The
width of `a`, `b` and `sum` is the sum of the entries.

`bk_adder` is a textbook Brent-Kung prefix adder for any width W. It makes an
up-sweep at positions 2ᵏ−1, then a down-sweep that fills in the rest, with the
carry in folded into bit 0's generate. `bec` computes in + 1 and `ib1c`
computes in + en. Both are AND chains into three-gate XORs.

## Pipelining

The original design reports its best result for a 24×24 AVM whose 3×3 Vedic
multipliers are pipelined, and says no more about where the registers go.
Here `PIPE` (default 1) registers the 6-bit output of each of the 64 `vm3x3`
instances: 384 flip-flops, latency one clock. Everything after them (CSAs,
EBK-CSLAs, increments) is combinational up to the product output. `PIPE = 0`
gives the unpipelined multiplier. `PIPE` is passed down from `fp_mac` through
`fp_mul`, `avm24`, `avm12` and `avm6` to `vm3x3`. Those pipeline registers
have no reset, because they only carry data.

## The floating-point datapath

Operands use the IEEE-754 single layout: sign bit 31, biased exponent 30:23,
fraction 22:0. `fp_pkg` holds the `fp32_t` struct and the constants.

**`fp_mul`** works on the three fields in parallel:

* the sign is Sx XOR Sy;
* the exponent is Ex + Ey − 127 (`exp_adder`, 10 bits signed, so overflow and
  underflow are visible);
* the significand product comes from `avm24`.

Sign and exponent are delayed by `PIPE` clocks to meet the product. A product
≥ 2 is shifted right by one and the exponent incremented, then the fraction is
truncated.

**`fp_add`** is combinational:

1. It swaps the operands so that |L| ≥ |S|.
2. It aligns S with guard, round and sticky bits.
3. It adds, or subtracts when the signs differ.
4. It normalises, right by one or left by the leading-zero count.
5. It truncates.

Thanks to the sticky bit the result is the exactly rounded-toward-zero sum.

**`fp_mac`** (top) is the multiplier, then the adder, then the accumulator,
with the accumulator fed back into the adder:

* A valid bit travels with each operand pair through the `PIPE`-cycle
  multiplier.
* The accumulator takes `acc + product` in the cycle the product emerges.
* One pair is accepted per clock.
* `acc` shows a pair's contribution `PIPE + 1` clocks after it was presented
  (2 clocks by default).
* `acc_valid` pulses in each cycle in which `acc` has just been updated.
* `clear` sets the accumulator to +0 and drops any product emerging in that
  cycle.
* `rst_n` is synchronous and active low.

The original design does not specify the number conventions. These are
choices made here:

* rounding is toward zero (truncation), in both the multiplier and the adder;
* an exponent field of 0 (zero or subnormal) is read as zero;
* results below the normal range flush to a signed zero;
* results above it saturate to the largest finite number;
* an exact zero sum is +0;
* infinity and NaN are not supported.

## Where this RTL departs from, or adds to, the original design

* The top-quarter carry is c1 + c2 rather than c1 OR c2 (see above).
* The 12×12 AVM follows its block diagram: two 3-bit EBK-CSLAs and a MUX for
  the top six bits. The accompanying prose speaks of one 6-bit EBK-CSLA. Both
  give the same bits.
* In the 24×24 AVM the carry of the first top-quarter adder selects a MUX, as
  in the diagrams, rather than feeding a second adder's carry in. The result
  is the same.
* The 6-bit EBK-CSLA's MUX is four bits wide, so that it selects the carry as
  well as the three sum bits.
* The groupings of the 11-bit and 3-bit EBK-CSLAs, the inside of the 3×3
  multiplier (half and full adders per UT column) and the position of the
  pipeline register are not given in the original and were chosen here.
* The original's block diagram of the MAC labels a 48-bit result and shows an
  adder and a left shifter after the multiplier. The floating-point adder is
  only named there. Here the accumulator holds a 32-bit single-precision
  value, and `fp_add` is a conventional aligned adder, as described above.
* The original's results are FPGA delay and LUT counts of a VHDL
  implementation. Nothing here reproduces them.

## Files and hierarchy

```
fp_mac                      top: F = sum X*Y
├── fp_mul                  sign, exponent, normalise, truncate
│   ├── ixor_gate           sign XOR
│   ├── exp_adder           Ex + Ey - 127
│   └── avm24               24x24 AVM
│       ├── avm12 ×4        12x12 AVM
│       │   ├── avm6 ×4     6x6 AVM
│       │   │   ├── vm3x3 ×4   3x3 UT multiplier (half_adder, full_adder)
│       │   │   ├── csa        6-bit CSA
│       │   │   ├── ebk_csla   6-bit (bk_adder, bec)
│       │   │   └── ib1c ×2
│       │   ├── csa            12-bit
│       │   └── ebk_csla ×3    11-bit, 3-bit, 3-bit
│       ├── csa                24-bit
│       └── ebk_csla ×3        23-bit, 6-bit, 6-bit
└── fp_add                  single-precision adder
```

`rtl/` holds one module or package per file. `tb/` holds one self-checking
testbench per module (`tb_<module>.sv`) and `fp_ref_pkg.sv`, the reference
models. The reference models hold each single-precision value as an exact
300-bit integer ({1,F} << (E−1)). Sums and products are computed exactly and
then truncated, so they share no structure with the RTL.

## Verification

| testbench | what it covers |
|---|---|
| `tb_ixor_gate`, `tb_bec`, `tb_ib1c`, `tb_exp_adder` | exhaustive |
| `tb_bk_adder` | widths 3 and 6 exhaustive; 7, 11 and 23 random, with full-ripple corners |
| `tb_ebk_csla` | 3- and 6-bit exhaustive; 11- and 23-bit random; for the 23-bit adder, a carry born in every bit position and rippling to the top |
| `tb_csa` | a + b + c = s + 2·cy |
| `tb_vm3x3`, `tb_avm6` | exhaustive, with `PIPE` = 0 and 1 side by side; the pipelined copy must be exactly one clock late |
| `tb_avm12`, `tb_avm24` | carry-stressing sweeps and 100 000 random pairs |
| `tb_avm24` (also) | the published worked examples 100×24 = 2400, 570×320 = 182400, 1320×23450 = 30954000, 88965×12345 = 1098272925 and 1876×6254 = 11732504 |
| `tb_fp_mul`, `tb_fp_add` | against the exact models: normalisation, cancellation, sticky-only alignment, zero, saturation and flush cases |
| `tb_fp_mac` | end to end at default parameters, see below |

`tb_fp_mac` streams 40 000 cycles of random operands. A cycle-accurate model
predicts `acc` and `acc_valid` every clock. The test fails if any of these
never happens: back-to-back accumulation, clear, reset, effective
subtraction, left and right normalisation, product normalisation,
saturation, flush, or a zero operand. `tb_fp_mac_unpipelined` runs the same
test with `PIPE = 0`, where the accumulator is updated one clock after the
operands.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_mac.sv --top-module tb_fp_mac -o sim
./obj_dir/sim
```

Every testbench finishes in a few seconds. Synthesised with Yosys at
`PIPE = 1`, `avm24` has about 4300 word-level cells and 384 flip-flops, and
`fp_mac` about 4400 cells and 430 flip-flops.
