# Dual-mode DP / dual-SP floating-point divider

This is a floating-point divider that works on 64-bit words in one of two modes:

- one IEEE-754 binary64 (double precision, DP) division, or
- two independent binary32 (single precision, SP) divisions at once.

A mode bit, `dp_sp`, chooses between them for every operation. Almost every piece of hardware serves both modes. The 64-bit datapath is cut into two 32-bit halves that can be chained (DP) or kept apart (dual SP). The result is only a little larger than a DP-only divider, yet it doubles SP throughput.

The mantissa quotient comes from a truncated Taylor series of the divisor's reciprocal. It is evaluated iteratively by a small state machine around one shared 54×54 multiplier, and that multiplier can also compute two 24×24 products in one pass. Normal and subnormal operands and results, zeros, infinities, NaNs and divide-by-zero are all handled. The result is rounded to nearest-even from a quotient that is accurate to a few units below the last place, so it is *faithfully* rounded: not always the correctly rounded value (see [Accuracy](#accuracy)).

The design follows the architecture published as "Design and Implementation of Area-Efficient Dual-Mode Double Precision Floating Point Division" (the DPdSP divider). It is a new SystemVerilog implementation. Where it departs from that description, the last section says so.

## Data format and interface

```
 dp_sp = 1 :  [63] sign | [62:52] exponent | [51:0] fraction           (one binary64)
 dp_sp = 0 :  [63:32] SP-2 (binary32)      | [31:0] SP-1 (binary32)    (two lanes)
```

The same layout is used for `in1` (dividends), `in2` (divisors) and `out` (quotients). Top module `dpdsp_div`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | operation accepted on `in_valid & in_ready` |
| `dp_sp` | in | 1 | 1 = DP, 0 = dual SP |
| `in1`, `in2` | in | 64 | dividend word, divisor word |
| `out_valid` | out | 1 | one-cycle strobe with the result |
| `out_dp_sp` | out | 1 | mode of that result |
| `out` | out | 64 | quotient word |
| `status[3]` | out | `lane_status_t` | per lane (index 0 = SP-1, 1 = SP-2, 2 = DP): `invalid`, `div_zero`, `overflow`, `underflow` |

The divider is iterative, not fully pipelined: it takes a new operation only when the mantissa state machine can take one. Timing is fixed:

| `MULT_STAGES` | version | latency DP / SP | new operation every DP / SP |
|---|---|---|---|
| 1 (default) | three stages, single-stage multiplier | 11 / 9 cycles | 10 / 8 cycles |
| 2 | six stages, two-stage multiplier | 18 / 14 cycles | 15 / 11 cycles |

Latency counts from the clock edge that accepts the operation to the edge that loads `out`. The two versions compute bit-identical results. The second trades latency for a much shorter critical path, because the multiplier is cut in two.

## The division method

Both mantissas are first normalized to `1.f`, with subnormals shifted up. The divisor mantissa is then split after its 8th fraction bit:

```
m2 = a1 + a2,    a1 = 1.xxxxxxxx  (9 bits),   a2 = the rest  (< 2^-8)
```

A table indexed by the 8 fraction bits of `a1` gives `a1^-1`. With `t = a1^-1·a2 < 2^-8`, the quotient is

```
m1/m2 = m1·a1^-1 · 1/(1+t) = m1·a1^-1 · (1 - t + t^2 - t^3 + ...)
```

Each extra term gains 8 bits. DP needs 53 bits, so it keeps the terms up to t^6. SP needs 24 bits, so it keeps up to t^2. The terms are grouped so that few multiplications are needed:

```
A = m1·a1^-1        B = a1^-1·a2 (= t)      C = B^2        D = C^2
E = B - C           F = 1 + C + D           G = E·F
DP:  q = A - A·G  = A·(1 - t + t^2 - t^3 + t^4 - t^5 + t^6)
SP:  q = A - A·E  = A·(1 - t + t^2)
```

DP uses 7 multiplications; SP uses 4 (it does not need D, F or G). All intermediate terms are kept as unsigned fixed-point numbers:

| term | DP format | SP format (each 32-bit half) |
|---|---|---|
| `m1`, `m2` at the FSM input | 1.52 in bits [63:11] | 1.23 in [63:40] and [31:8] |
| `a1^-1` | 0.53 | 0.24 |
| A, H, I (= q) | 1.63 | 1.31 |
| B, C, E | LSB = 2^-72 (all < 2^-8) | LSB = 2^-40 |
| F | 1.53 | — |

DP products are 54×54 bits and SP products 24×24 bits. Subtractions are 64-bit (DP) or 32-bit per lane (SP). A single `dual_sub` computes both E = B − C and I = A − H. It consists of two 32-bit subtractors whose borrow chain is cut in SP mode.

### Reciprocal tables

`recip_lut` holds two tables:

- A shared 256 × 53 table for DP. Its top bits also serve SP-2.
- A 256 × 24 table for SP-1.

That is 19,712 bits in all. Entry *k* is `round(2^B · 256/(256+k))`, computed by a constant function at elaboration; no data file is read. For *k* = 0 the exact value 1.0 does not fit a 0.B fraction, so it saturates to all ones. This is the largest single error source in DP: 2^-53 relative. SP-2 reads the top 24 bits of the shared DP word, rounded using the next bit.

## The mantissa state machine (`mant_div_fsm`)

Each state picks the three multiplier operands (`in1_t1`, `in1_t2`, `in2`). The operands are registered at the end of the state, and the product is read in the next state. With `MULT_STAGES = 1`:

| state | picks up from the product | other work | applies to the multiplier |
|---|---|---|---|
| S0 | | | m1 × a1^-1 |
| S1 | A | | a2 × a1^-1 |
| S2 | B | | B × B |
| S3 | C | E = B − C | C × C (DP only) |
| S4 (DP) | D | F = 1 + C + D | zeros |
| S5 (DP) | | | E × F |
| S6 | G (DP) | | G × A (DP) or E × A (SP) |
| S7 | H | | zeros |
| S8 | | I = A − H, result ready | zeros |

DP passes through all 9 states. Dual SP jumps from S3 to S6 and takes 7. `done` pulses in the cycle after S8.

With `MULT_STAGES = 2`, a product appears two states after its operands. A wait state, with the multiplier inputs at zero, is inserted wherever a state needs the product of the state just before it (S2_T, S3_T, S5_T, S6_T). A is picked up in the added state S1_T, while S1 already applies `a2 × a1^-1`, which depends on no product:

```
DP     : S0 S1 S1_T S2 S2_T S3 S3_T S4 S5 S5_T S6 S6_T S7 S8   (14 states)
dual SP: S0 S1 S1_T S2 S2_T S3           S6 S6_T S7 S8         (10 states)
```

The exact bit slices taken from the 108-bit product in each state come from the formats table above. They are spelled out in the case statements of `rtl/mant_div_fsm.sv`. In dual SP the SP-1 product sits in `p[47:0]` and the SP-2 product in `p[107:60]`, so every SP slice appears twice, once per lane.

## The dual-mode Booth multiplier (`dual_booth_mult`)

This is a radix-4 modified Booth multiplier for unsigned 54-bit operands. The multiplier `in2` is recoded into 28 digits in {−2 … 2}, each giving one partial product. The dual-mode trick is that the first 14 partial products multiply `in1_t1` and the last 14 multiply `in1_t2`. The operands are packed like this:

```
DP     : in1_t1 = in1_t2 = {0, m}       in2 = {0, m'}
dual SP: in1_t1 = {30'b0, a_sp1}        in1_t2 = {a_sp2, 30'b0}
         in2    = {b_sp2, 6'b0, b_sp1}
```

In dual SP, digits 0–12 see only `b_sp1` and act on `a_sp1`, which sits at the bottom. Digits 15–27 see only `b_sp2` and act on `a_sp2`, which sits 30 bits up. Digits 13 and 14 see only the six zero bits and contribute nothing. The two groups of partial products sum to `a_sp1·b_sp1` and `a_sp2·b_sp2·2^60`, and these do not overlap. An ordinary reduction of all 28 rows therefore yields both products side by side. The only cost of the second mode is the operand muxes in front, which the FSM provides.

Partial products are kept as sign-extended 108-bit rows. They are reduced by levels of 3:2 carry-save adders (28 → 19 → 13 → 9 → 6 → 4 → 3 → 2). A Kogge-Stone adder (`ks_adder`) adds the final two rows. With `STAGES = 2`, a register holds the three rows left after the sixth level.

## Stage 1: operand preparation

- **`dpdsp_extract`** splits both words into signs, exponents and fractions for all three lanes at once. It classifies each operand as subnormal, zero, infinity or NaN. The top 8 bits of the DP exponent are the SP-2 exponent, so SP-2's all-zeros and all-ones tests are reused for DP. It builds the *unified mantissas*: each mantissa is left-aligned in its field (DP `{h, f, 11'b0}`, SP `{h2, f2, 8'b0, h1, f1, 8'b0}`), so a leading-zero count equals the normalizing shift.
- **`dual_lod`** holds two 32-bit leading-one detectors (`lod_tree`, built from 2:1 cells). Alone, each gives an SP count. Combined, they give the 6-bit DP count.
- **`dual_lshift`** is a 6-stage barrel shifter. Stage 1 (by 32) exists for DP only. Stages 2–6 shift each half by its own amount, plus one mux per stage that lets bits cross from the lower into the upper half in DP mode. `FIRST_STAGE`/`LAST_STAGE` select a run of stages, so the six-stage version can place a register after stage 4.
- **`recip_lut`** is read with the 8 bits after the point of the normalized divisor(s).

## Stage 2 side path: sign, exponent, right shift (`sign_exp_rsa`)

Per lane, the sign is `s1 ^ s2`, and the biased exponent before normalization is

```
e = BIAS + (e1' - ls1) - (e2' - ls2)
```

Here `ls` is the normalizing shift and `e'` is the exponent field, taken as 1 for a zero field (the IEEE exponent of a subnormal). The quotient of two normalized mantissas lies in (0.5, 2). When `e < 1` the result is subnormal: the quotient is shifted right by `rs = 1 − e` before rounding, clamped to 63 (DP) or 31 (SP). These values are registered in state S0.

## Stage 3: right shift, rounding, final processing

- **`dual_rshift`** mirrors the left shifter. It also ORs every bit shifted out below a lane into that lane's sticky bit, so rounding after the shift stays exact.
- **`dual_round`** handles two quotient ranges. A quotient in [1, 2) is rounded at its 53rd/24th bit. A quotient in (0.5, 1) is rounded one bit lower, which is a 1-bit left normalization, but only if the lane's exponent leaves room for it. Guard, round and sticky bits give each lane's increment (round to nearest, ties to even). The increment logic is separate per lane. The addition itself is shared: two 32-bit incrementers, chained through the carry in DP mode.
- **`final_proc`** goes lane by lane. A carry out of rounding shifts the mantissa right by one and increments the exponent. A result with no hidden bit is encoded as subnormal. An exponent at or above the all-ones code is an overflow. Exceptions are then resolved in this order:
  1. **NaN** (canonical quiet NaN `7FF8…`/`7FC00000`, flag `invalid`): either operand NaN, ∞/∞, 0/0.
  2. **signed zero**: finite/∞, 0/finite.
  3. **signed infinity**: ∞/finite, finite/0 (flag `div_zero`), overflow (flag `overflow`).
  4. Otherwise the computed result. `underflow` is set for a subnormal or zero result of a finite division.

  Finally a 64-bit 2:1 mux selects the DP word or the pair of SP words.

## Pipeline and handshake

```
             stage 1                       stage 2                 stage 3
in1,in2 -> extract/LOD/lshift/LUT -> [s1] -> FSM (9|7 states) -> rshift/round/final -> [out]
                                           sign/exp/rs -> [s2]
```

Stage 1 is captured in the `s1_*` registers when the operation is accepted, and the FSM starts in the same cycle. The `s1_*` registers must stay stable until the result has passed stage 3. For that reason `in_ready` is high only while the FSM is idle, which gives the 10/8-cycle interval.

The six-stage version (`MULT_STAGES = 2`) adds three registers:

- one after the fourth left-shifter stage,
- one inside the multiplier,
- one after rounding, which also carries the operand classes and exponents that final processing needs.

Because final processing no longer reads `s1_*`, the next operation may enter while the FSM is in its last state S8. In that case `in_ready` is high in S8, unless an operation is already between the two stage-1 registers. This gives 15/11 cycles with a 14/10-state FSM.

An assertion checks that the FSM is only ever started from its idle state.

## Accuracy

Both series truncations are bounded:

- **DP:** the omitted terms start at t^7 < 2^-56. The dominant error is the reciprocal table: at most 2^-53 relative, reached by the saturated k = 0 entry. The quotient before rounding is therefore within about 2^-52 of the exact value. After round-to-nearest, the result is at most 1 ulp from the correctly rounded quotient.
- **Dual SP:** the omitted term t^3 can approach 2^-24. It adds to the 24-bit table error, so in rare cases a result is 2 ulps from the correctly rounded one.

Measured on 20,000 random operations, biased towards subnormals, special values and extreme exponents, against a reference model:

| | exact | 1 ulp | 2 ulps |
|---|---|---|---|
| DP results | 9,866 | 4,382 | 0 |
| SP lane results | 9,203 | 2,318 | 1 |

A second run, `tb_dpdsp_div_verif`, sweeps the operand classes. It runs 25,000 random divisions per mode for each combination of normal (N) and subnormal (S) dividend and divisor. Normal exponents are drawn half from the full range and half from near the bias:

| mode | class | exact | 1 ulp | 2 ulps |
|---|---|---|---|---|
| DP | NN | 19,618 | 5,382 | 0 |
| DP | NS | 22,403 | 2,597 | 0 |
| DP | SN | 22,731 | 2,269 | 0 |
| DP | SS | 17,956 | 7,044 | 0 |
| SP (per lane) | NN | 36,781 | 13,217 | 2 |
| SP (per lane) | NS | 44,083 | 5,917 | 0 |
| SP (per lane) | SN | 45,268 | 4,730 | 2 |
| SP (per lane) | SS | 31,589 | 18,411 | 0 |

Mantissa error before rounding: at most 2045 × 2^-63 (DP) and 273 × 2^-31 (SP), over 3,000 runs of the FSM test.

Exceptional results (NaN, infinities, zeros, divide by zero, overflow) are exact. If correct rounding is needed, a remainder computation must be added: one more multiplication and subtraction to find the sticky bit exactly, which costs two extra FSM states. That is not built.

## Files

`rtl/` — one module per file; the package holds the shared types:

| file | contents |
|---|---|
| `dpdsp_pkg.sv` | constants, `opnd_info_t`, `lane_status_t`, FSM state enum |
| `dpdsp_div.sv` | top: stages, registers, handshake |
| `dpdsp_extract.sv` | field extraction, classification, unified mantissas |
| `dual_lod.sv`, `lod_tree.sv` | dual-mode leading-one detector |
| `dual_lshift.sv`, `dual_rshift.sv` | dual-mode barrel shifters |
| `recip_lut.sv` | reciprocal tables |
| `sign_exp_rsa.sv` | sign, exponent, right-shift amount |
| `mant_div_fsm.sv` | series-expansion state machine |
| `dual_booth_mult.sv`, `ks_adder.sv` | dual-mode Booth multiplier, Kogge-Stone adder |
| `dual_sub.sv` | dual-mode subtractor |
| `dual_round.sv` | dual-mode rounding |
| `final_proc.sv` | normalization, exceptions, output mux |

`tb/` — self-checking testbenches. Each prints `TB_RESULT checks=N failures=M`.

- `tb_dpdsp_div` / `tb_dpdsp_div_2stage`: end to end, both versions. They run 20,000 random operations plus directed cases and check every result, the latency and the issue interval. They also count how often each mechanism occurred (subnormal inputs and outputs, rounding carry, both rounding positions, NaN/∞/zero results, divide by zero, overflow, mode switches, back-to-back issue), and fail if any count is zero.
- `tb_dpdsp_div_verif`: the operand-class sweep above, 200,000 operations with per-class ulp statistics.
- One testbench per block (`tb_<module>`). `tb_mant_div_fsm` and `tb_dual_booth_mult` test both versions side by side.
- `fp_ref_pkg.sv`: reference model. DP uses `real` arithmetic; SP is rounded from `real` to binary32 with subnormals. It also holds the random operand generators and ulp comparison.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpdsp_pkg.sv tb/fp_ref_pkg.sv tb/tb_dpdsp_div.sv --top-module tb_dpdsp_div
./obj_dir/Vtb_dpdsp_div
```

Replace `tb_dpdsp_div` with any other testbench name. The end-to-end test runs in about a second. `N_RANDOM`, `TOL_DP` and `TOL_SP` at the top of the end-to-end testbenches set the number of operations and the accepted ulp distance. To use the six-stage version in a design, instantiate `dpdsp_div #(.MULT_STAGES(2))`.

## Departures from the published description

- **Reduction tree:** the source uses an 8-level Dadda tree. Here plain 3:2 carry-save levels are used (7 levels). The product is the same; the counter placement differs.
- **NaN test:** the published check tests the exponent plus the top fraction bit, which catches only quiet NaNs. The full IEEE test is used here. Infinity is likewise tested as exponent all-ones with zero fraction.
- **Subnormal exponent:** a zero exponent field counts as 1, not 0, in the exponent formula. The right-shift amount is `1 − e` rather than `−e`, matching this design's (0.5, 2) quotient range and rounding position.
- **Sticky bits:** the right shifter collects sticky bits; the source only says the sticky bit comes from the remaining low bits.
- **Table contents:** entries are round-to-nearest with k = 0 saturated, and SP-2's slice of the shared word is rounded rather than truncated. The source gives neither detail.
- **Bit slices:** the fixed-point slices in the FSM were derived from the value ranges above rather than taken from the published list. The state sequence and the operand routing are the published ones.
- **Interface:** the handshake (`in_valid`/`in_ready`/`out_valid`), the reset, the canonical NaN encodings and the four status flags are this design's own. The source only mentions a status signal.
- **Six-stage timing:** the source's table gives 18/15 cycles (DP) and 14/11 (SP), but its text gives other numbers. This implementation meets the table. Reaching an interval of 15 with 14 states needs the early `in_ready` described above, which is this design's choice. The same is true of the exact position of S1_T and of which four states dual SP skips.
- **Accuracy:** the source claims at most 1 ulp. That holds here for DP. Dual SP can, rarely, be 2 ulps off; see above.
- **Not built:** the DP-only dividers and the normal-only (no subnormal) variants, which the source uses only for comparison. Also not built: the optional remainder step for correct rounding, and rounding modes other than round to nearest.
