# Iterative decimal32 floating-point multiplier

This is a multiplier for IEEE 754-2008 decimal32 numbers in the DPD
(densely packed decimal) encoding. Decimal floating point is used where
results must match pencil-and-paper arithmetic, as in finance and billing. The
design is small and iterative rather than fast and parallel. A 7 × 7-digit
decimal fixed-point multiplier produces the 14-digit significand product one
digit per cycle, starting from the least significant digit. Everything rounding
needs from the low half of the product is collected while the multiplication is
still running:

* the **sticky bit** Sb, which says whether any of the five lowest digits is non-zero;
* the **round digit** R;
* the **guard digit** G.

When the top digits are ready, two rounded candidates are built in parallel,
one for each possible normalisation, and a multiplexer picks one. No
normalising shifter is needed.

| | |
|---|---|
| Format | decimal32: sign, 8-bit biased exponent (bias 101), 7-digit significand |
| Latency | n + 2 = 9 cycles from the cycle that takes `start` to the cycle that registers the result |
| Issue rate | one multiplication every n + 1 = 8 cycles. The last cycle of one operation overlaps the first cycle of the next. |
| Rounding | round-half-to-even |
| Flags | invalid, overflow, underflow, inexact |
| Size (generic yosys coarse synthesis) | about 1,100 word-level cells and 192 flip-flops |

## Top-level interface: `dfp_mul`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (rising edge) |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | starts a multiplication. Raise it only while `ready` is high (an assertion checks this). `x` and `y` are sampled in the same cycle. |
| `x`, `y` | in | 32 | operands, decimal32 DPD |
| `ready` | out | 1 | a new operation may start in this cycle |
| `out_valid` | out | 1 | high for one cycle when `result`/`flags` are new |
| `result` | out | 32 | product, decimal32 DPD |
| `flags` | out | 4 | `dfp_flags_t`: `{invalid, overflow, underflow, inexact}` |

`result` and `flags` hold their values until the next `out_valid`. A caller
that keeps `start` high whenever `ready` is high gets one result every 8 cycles.

### Cycle plan (n = 7)

| Cycle | Work |
|---|---|
| 1 | Decode both words. Check the operands for special values, form the intermediate exponent and sign. Run multiplier iteration 1 on the freshly decoded digits. |
| 2 … n | Multiplier iterations 2 … n. Each one retires one product digit. Sb is complete after cycle 5, R after cycle 6 and G after cycle 7. |
| n + 1 | Carry-propagate addition of the upper seven product digits. The multiplier is busy, so `ready` is low. |
| n + 2 | Both rounding candidates, selection, exponent adjustment, overflow/underflow/inexact, DPD encoding. The result is registered at the end of this cycle. `ready` is high, so cycle 1 of the next operation can run now. |

## The number format

A decimal32 word holds the value (−1)^s × C × 10^q, where C is a 7-digit
integer and q runs from −101 to +90 (biased exponent E = q + 101, 0 … 191).

| Bits | Field |
|---|---|
| 31 | sign |
| 30:20 | 11-bit combination field |
| 19:0 | two 10-bit DPD declets, which hold the six trailing digits |

The combination field packs three things:

* the two top exponent bits;
* the leading significand digit (the MSD);
* the six low exponent bits (bits 25:20).

If the field starts with `11`, the MSD is 8 or 9 and only its low bit is stored.
Otherwise the MSD is 0–7. `11110` marks infinity and `11111` a NaN; the next
bit distinguishes a signalling NaN from a quiet one.

A DPD declet packs three decimal digits into 10 bits. Small digits (0–7) need
three bits each; large digits (8, 9) need only one, and the freed bits record
which digits are large. `dpd_declet_dec` and `dpd_declet_enc` implement the
standard's tables. `dfp32_decode` and `dfp32_encode` add the combination field
and the special values.

The design expects normalised operands: each operand's significand has a
non-zero MSD, so an input in range lies between 1000000 × 10^−101 and
9999999 × 10^90. The product of two such significands then has 13 or 14
digits, so at most a one-digit correction is ever needed. There is no
leading-zero counter. A non-normalised operand (for example 1 stored as
0000001 × 10^0) is still multiplied, but the result is rounded at the position
used for a 13-digit product. Most of its precision is lost: 1 × 1 gives zero
with inexact set. Callers must normalise operands first.

## The significand multiplier: `dfxp_rps_mult`

This is the part most worth understanding. Call the multiplicand A (digits
a_6 … a_0) and the multiplier B (digits b_6 … b_0). The multiplier follows the
idea of an RPS-style decimal multiplier: it generates partial products for
column accumulation from the least significant end, iteratively, and has the
final product after n + 1 cycles. How it does this is this design's own:

1. **One row per cycle.** Iteration i multiplies the whole of A by one digit
   b_i with seven single-digit multipliers (`digit_mult`). Each product a_j·b_i
   (0 … 81) splits into a units digit L_j, which belongs to column j, and a tens
   digit H_j, which belongs to column j + 1.
2. **Decimal carry-save columns.** The accumulator stores each column as a sum
   digit s_j (0–9) and an incoming carry c_j (0–2). One iteration forms, per
   column:

   t_j = s_j + c_j + L_j + H_(j−1)   (at most 9 + 2 + 9 + 8 = 28)

   The column keeps t_j mod 10 and sends ⌊t_j / 10⌋ ∈ {0, 1, 2} to the column
   above. Carries never run along the accumulator, so the loop's critical path
   is one digit multiply plus one small addition.
3. **Retire one digit per cycle.** After the update nothing can reach column 0
   any more, so its digit is a final product digit FP_i. It is shifted out, and
   the accumulator moves down one column.
4. **Final addition.** After n iterations the low digits FP_6 … FP_0 are out.
   The upper seven columns still hold sum digits and carries. One more cycle
   adds them with a rippling decimal adder, giving FP_13 … FP_7.

Every retired digit leaves the block at once on `col_valid`/`col_idx`/`col_digit`.
`prod` holds the full 14-digit product when `done` pulses. Assertions check
that the top column never carries, that the final sum fits in seven digits,
and that every retired digit is a valid BCD digit.

## Rounding without a shifter: `sticky_rg` and `round_unit`

### Digit names

Number the 14 product digits FP_13 … FP_0 from the most significant down. With
n = 7 they fall into four groups:

| Digits | Name | Role |
|---|---|---|
| FP_13 … FP_7 | top n | kept if the product has 14 significant digits |
| FP_6 | G, the guard digit | first digit below the top n |
| FP_5 | R, the round digit | next digit |
| FP_4 … FP_0 | the n − 2 lowest digits | their OR (digit ≠ 0) is the sticky bit Sb |

`sticky_rg` watches the retiring digits and registers Sb, R and G. So by the
time the top digits exist, only their own value is still unknown.

### Two candidates

The product has 14 digits, or 13 with a leading zero. If you shift first and
round afterwards, the shifter sits on the critical path. If you round first
and shift afterwards, the result can be wrong. Take 2333330 × 3000003 =
0699999|6|9|99990 (top seven digits | G | R | the rest):

* Rounding the top seven digits, `0699999`, with G = 6 gives `0700000`. That
  leaves a single significant digit, 7000000 one place lower.
* The correctly rounded result is **6999997**. It comes from the seven digits
  below the MSD, `6999996`, rounded with R = 9.

`round_unit` therefore builds both candidates at the same time:

| Candidate | Kept digits | First dropped digit | Rest |
|---|---|---|---|
| Path 2 | FP_13 … FP_7 | G | R, Sb |
| Path 1 | FP_12 … FP_6 (one digit lower) | R | Sb |

Each path has its own BCD incrementer (`bcd_incr`). The incrementer always
forms "kept digits + 1", and the round-half-to-even decision picks either that
or the truncated digits:

* round up if the first dropped digit is above 5, or it is 5 and anything
  below it is non-zero;
* round down if the first dropped digit is below 5;
* on an exact tie, round to the even value.

Before the top digits arrive, the decision logic waits only for the kept
LSD, which is needed for ties.

### Selection

The multiplexer looks at the MSD of the top seven digits *before* rounding:

* **MSD non-zero:** path 2. If it rounds 9999999 up, the result is 1000000
  with the exponent one higher. This cannot happen for 7 × 7-digit products,
  but it is handled.
* **MSD zero:** path 1, with the exponent one lower. There is one exception:
  if path 1 rounds all nines up (0999999|9|…), path 2 gives the same value
  and is taken.

Steering by the MSD of the *rounded* path-2 result looks equivalent, but it is
not. For 0999999|5|0|00000, path 2 rounds up to 1000000, while 9999995 one
digit lower is exact. This design steers by the unrounded MSD so that every
result is correctly rounded.

`inexact` is set whenever a non-zero digit is dropped.

## Exponent, sign and exceptions

* `exp_gen` computes E1 + E2 − 101 + 7. The +7 is there because keeping the
  top seven of fourteen digits scales the value by 10^7. The sign is s1 XOR s2.
* `exc_handle` classifies the result from the operands alone, in this order:
  1. any NaN operand gives a quiet NaN; a signalling NaN also raises invalid;
  2. infinity × zero gives a quiet NaN and raises invalid;
  3. infinity × anything else gives infinity;
  4. zero × a finite number gives zero;
  5. anything else is finite.
* `exp_adjust_exc` adds the rounding correction (−1, 0, +1) and checks the range:
  * a biased exponent above 191 means the value exceeds 9999999 × 10^90: the
    result is infinity, with overflow and inexact;
  * a biased exponent below 0 means the value is below 1000000 × 10^−101: the
    result is flushed to zero, with underflow and inexact;
  * a zero product takes exponent E1 + E2 − 101, clamped to 0 … 191, and
    raises nothing.

## Where this design makes its own choices

* **Insides of the multiplier.** The design follows the RPS behaviour: the
  product builds from the least significant end and is final after n + 1
  cycles. The carry-save column accumulator that produces this behaviour is
  this design's own.
* **Sticky-bit timing.** The sticky bit is complete after cycle 5 of 8 (one
  digit retires per cycle). An RPS multiplier is characterised as having the
  five lowest digits after the fourth cycle. The order Sb → R → G, the total
  of n + 1 multiplier cycles and the overall latency and issue rate are
  unchanged.
* **Single-digit multiplier.** `digit_mult` is a plain 4 × 4 binary multiply
  followed by a tens/units split. A faster dedicated single-digit multiplier
  can be swapped in without changing the interface.
* **Rounding selection.** The selection uses the unrounded MSD, for the reason
  given above.
* **Details left to the implementer:**
  * the handshake (`start`/`ready`/`out_valid`);
  * the asynchronous reset;
  * the NaN output: quiet, zero payload, sign = XOR of the operand signs;
  * the exponent of zero results;
  * setting inexact together with overflow and underflow;
  * no subnormal results (values below the smallest normal flush to zero).
* **Only decimal32 is built.** `dfxp_rps_mult`, `sticky_rg`, `bcd_incr`,
  `round_unit`, `exp_gen` and `exp_adjust_exc` are parameterised by the digit
  count N, but the decoder, encoder and top level are decimal32 only.

## Files

| File | Contents |
|---|---|
| `rtl/dfp_pkg.sv` | format constants, `bcd_t`, `dfp32_unpacked_t`, `dfp_class_t`, `dfp_flags_t` |
| `rtl/dfp_mul.sv` | top level: cycle plan, operand/result registers |
| `rtl/dfp32_decode.sv`, `rtl/dpd_declet_dec.sv` | decimal32 word → fields |
| `rtl/dfp32_encode.sv`, `rtl/dpd_declet_enc.sv` | fields → decimal32 word |
| `rtl/dfxp_rps_mult.sv`, `rtl/digit_mult.sv` | iterative 7 × 7-digit significand multiplier |
| `rtl/sticky_rg.sv` | on-the-fly sticky bit, round and guard digits |
| `rtl/round_unit.sv`, `rtl/bcd_incr.sv` | dual-path rounding and incrementers |
| `rtl/exp_gen.sv` | intermediate exponent and sign |
| `rtl/exc_handle.sv` | special-operand handling |
| `rtl/exp_adjust_exc.sv` | exponent adjustment, overflow/underflow/inexact |
| `tb/tb_dfp_pkg.sv` | testbench reference functions, independent of the RTL |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dfxp_sizes.sv`, `tb/dfxp_size_check.sv` | multiplier and sticky/round/guard unit at N = 3 and N = 9 |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog that fails the run if
it hangs. Build and run, for example, the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module tb_dfp_mul rtl/dfp_pkg.sv tb/tb_dfp_pkg.sv tb/tb_dfp_mul.sv
./obj_dir/Vtb_dfp_mul
```

Replace `tb_dfp_mul` with any other `tb_<module>` to run that block's test.

### The reference model

The reference in `tb/tb_dfp_pkg.sv` does not reuse any RTL:

* DPD words are built from the Boolean DPD encoding equations, not the layout
  table the RTL uses.
* The product is formed as a 64-bit integer and rounded half-to-even over all
  dropped digits.

### What `tb_dfp_mul` covers

It runs the top level at its default configuration. It sends directed cases
and 1,500 random normalised operand pairs, most of them back to back at the
8-cycle issue rate. For every operation it checks:

* the result word;
* the four flags;
* the 9-cycle latency.

It also counts how often each mechanism occurs and fails if any never does:

* every row of the rounding table, including both outcomes of an exact tie;
* the one-digit-lower result;
* rounding into a new digit;
* overflow and underflow;
* exact and inexact results;
* zero, infinity and NaN operands;
* invalid operations;
* back-to-back issue.

### The block testbenches

* `digit_mult` is tested exhaustively.
* The DPD declets are tested exhaustively, through the decoder and encoder tests.
* `tb_dfxp_rps_mult` checks:
  * the product;
  * each retired digit and its index;
  * the exact N + 1-cycle timing;
  * that `ready` stays low while busy;
  * back-to-back issue.
* `tb_dfxp_sizes` runs the multiplier and `sticky_rg` at N = 3 and N = 9. It
  checks the product, the N + 1-cycle timing, and Sb, R and G.
