# Redundant-number arithmetic co-processor

This is arithmetic hardware that avoids long carry chains. It keeps operands in redundant
number systems: each digit position may hold more values than the radix strictly needs, so
an addition never has to propagate a carry further than a digit or two. Three kinds of unit are built
on this idea:

* A **binary floating-point FFT butterfly** (`X0 = A + B·W`, `X1 = A − B·W`). Its
  significands stay in *binary signed-digit* (BSD) form from the multipliers to the final
  adder. There is no intermediate rounding or normalisation between them.
* A **16-bit fixed-point butterfly** built from the same BSD multiplier and adder parts,
  with exact results.
* **Decimal units**: a carry-free signed-digit adder, a sequential BCD multiplier that
  accumulates its partial products in carry-save form, and a divider and a square root that
  both work digit by digit on a redundant, carry-free partial remainder.

All units sit side by side in `coproc_top`. They share only the clock and the reset.

## Binary signed digits

A BSD digit is a pair of bits, a *posibit* `p` (weight +1) and a *negabit* `n` (weight −1),
so its value is `p − n ∈ {−1, 0, 1}`. A BSD word is therefore two binary words, `pos` and
`neg`, with value `pos − neg`.

* **To BSD:** converting a binary number to BSD is free. Put the magnitude in `pos` for a
  positive number, or in `neg` for a negative one.
* **From BSD:** converting back is one subtraction (`bsd_to_ieee`).

The floating-point formats live in `bsd_fp_pkg`:

| type | significand | value |
|------|-------------|-------|
| `bsd_fp_t` | 24 BSD digits | `(pos − neg) · 2^(exp − 23)` |
| `booth_fp_t` | 26 Booth positions (twiddle) | `Σ ±1 · 2^(i + exp − 23)` |
| `bsd_prod_t` | 32 BSD digits (products) | `(pos − neg) · 2^(exp − 27)` |

The exponent is a plain signed 10-bit number. The value `EXP_ZERO` (−512) marks zero.

### Carry-limited BSD adder (`bsd_adder`)

The adder is built from two-digit slices. Each slice has four full adders.

* Each full adder receives posibits true and negabits inverted. An inverted negabit is a
  posibit offset by a constant, which is how full adders, built for positive bits, can add
  signed digits.
* The offsets of the four adders cancel inside each slice.
* A slice passes one posibit transfer and one negabit transfer to the next slice, and
  nothing goes further.
* The delay is therefore that of two full adders, whatever the width.
* An `N`-digit adder gives `N+1` digits.

### Butterfly datapath

```
 IEEE A,B ──ieee_to_bsd──┐
 IEEE W ──ieee_to_booth──┤
                         ▼
            ┌──── fdpa (real) ────┐      ┌──── fdpa (imag) ────┐
            │ bsd_fp_mul  W_re·B_re│      │ bsd_fp_mul W_im·B_re│
            │ bsd_fp_mul  W_im·B_im│      │ bsd_fp_mul W_re·B_im│
            │ bsd_fp_add3  ±A  (×2)│      │ bsd_fp_add3 ±A  (×2)│
            └──────────┬──────────┘      └──────────┬──────────┘
                       └──────── register ──────────┘
                                   ▼
                           bsd_to_ieee (×4)
```

**Multiplier (`bsd_fp_mul`).**
* The twiddle is modified-Booth recoded (`booth_recoder`). Each radix-4 digit is stored as
  a (sign, magnitude) pair in either the low position (±1) or the high position (±2) of its
  two-bit group.
* The twiddle is a constant of the FFT. It is the Booth operand, so the variable operand
  `B` can stay in BSD form.
* `bsd_ppg` forms each of the 13 partial products.
  * The magnitude bit selects `B` or nothing.
  * The sign bit swaps the roles of posibits and negabits, by XOR.
  * A multiplexer picks the `2B` version when the high position is set.
* The partial products are summed by a four-level tree of 12 carry-limited BSD adders.
* The product has 51 digits. Only the top 32 (positions 19..50) are passed on. The bottom 24
  carry the precision, and two more are kept for guard and round.
* Exponents are simply added. No normalisation or rounding is done here.

**Three-operand adder (`bsd_fp_add3`)**, which computes `X + Y ± A`.
1. *Products:* `X` and `Y` are aligned on the larger exponent `E_big` and added in one BSD
   adder.
2. *Alignment of A:* `A` is wired 30 positions to the left and then shifted **right** by
   `E_big − E_A + 30`. One right shifter therefore covers addends up to 30 positions above
   the product sum.
3. *Sum:* a second BSD adder (60 digits) produces the sum.
4. *Subtraction:* subtracting `A` is only a swap of its posibits and negabits. Redundant
   digits carry their sign, so no sign logic is needed.
5. *Termination:* the sum is collapsed to two's complement and its leading one is found by
   `lzd`. That is a divide-and-conquer leading-zero detector built from 2-bit detectors. The
   sum is then normalised and rounded to nearest-even. The result is a 24-digit BSD number
   with the magnitude in `pos` or `neg`.

**Fused dot-product-add (`fdpa`).** Two multipliers feed two three-operand adders: one adds
`A`, the other subtracts it. Both outputs therefore come from a single pass. The real part of
the butterfly negates the second product (`B_re·W_re − B_im·W_im`). This costs nothing, since
it is another posibit/negabit swap.

**Timing.**
* The butterfly is combinational from its inputs to one register.
* `out_valid` follows `in_valid` by one clock.
* It accepts one butterfly per clock.
* The register is the only pipelining. It is a choice of this implementation.

## Fixed-point butterfly (`fxp_butterfly`, `fxp_bsd_mul`)

This is the same datapath without exponents. `A` and `B` are 16-bit two's-complement
integers. The twiddle parts are 16-bit two's complement with `2^14` standing for 1.0.

* **Input conversion.** Each input's magnitude goes into the posibits or the negabits by its
  sign, so there is no conversion logic to speak of.
* **Multiplier (`fxp_bsd_mul`).** The twiddle is Booth-recoded into 9 radix-4 digits. Nine
  partial products of 17 digits are summed by a binary tree of BSD adders, four levels deep.
  The product is exact and stays redundant.
* **Adders.** One BSD adder per part forms the dot product. The minus of the real part is
  again a posibit/negabit swap. Two more adders give `A·2^14 + dot` and `A·2^14 − dot`.
* **Output.** The four redundant sums are registered. Each is then turned back into two's
  complement by one subtraction. The outputs are 36 bits wide and exact, so no rounding or
  scaling happens.
* **Timing.** One clock of latency, one butterfly per clock.

## Decimal signed-digit adder (`dec_sd_adder`)

Each decimal digit is five bits `{X3, x2, x1, x0, X0}` with weights `{−8, 4, 2, 1, −1}`. Capital
letters are negabits, so a digit lies in `[−9, 7]`.

Per digit:

* **F1** is a 32-row truth table on `X3, Y3, x2, y2, x1`. It produces:
  * a transfer to the next digit, `t0` (+10) or `T0` (−10);
  * the high part of an interim digit, `Z3 Z2 z1` (−8, −4, +2).
* **F2** turns `y1, y0, Y0, x0, X0`, a value in `[−3, 4]`, into `w2 W1 W0` (+4, −2, −1).
* A **3-bit carry-look-ahead adder** adds `{w2, z1, t0_in}` to the inverted negabits
  `{~Z2, ~W1, ~W0}`, with a constant 1 at the bottom.
  * The sum bits are the digit's posibits `x2 x1 x0`.
  * The inverted carry-out is a −8 negabit. It merges with `Z3` through an OR gate, because
    the two are never both set.
* The incoming `T0` becomes the −1 negabit.

The addition is purely combinational with constant depth. Digit 0 receives no transfer. The
transfers out of the top digit are outputs, so the sum's value is `S + 10^N·(t_out − T_out)`.

## Sequential decimal multiplier (`dec_seq_multiplier`)

This unit computes a 16-digit × 16-digit BCD product with 32 digits.

**Easy multiples (`dec_easy_multiples`).** These are `X`, `2X`, `4X` and `5X` in 4-2-2-1 code.
Each is formed once per operation, in constant time:

* `X`: digit-wise recoding.
* `2X`: BCD to 5-2-1-1 recoding and a one-bit left shift. The 5 of a digit becomes 10, that
  is, 1 in the next digit.
* `4X`: two such doublings, flattened into one block.
* `5X`: a three-bit left shift of the BCD word gives 5-4-2-1 digits, which are recoded.

**Selection.** Each multiplier digit `y_i` picks `U_i ∈ {0, X, 4X, 5X}` and
`V_i ∈ {0, 2X, 4X}` with `U_i + V_i = y_i·X`:

* `V = 2X` when `y_i[1]` is set, and `V = 4X` when `y_i[3]` is set;
* `U = X`, `4X` or `5X` according to `y_i[3] | y_i[2]` and `y_i[0]`.

The selection is registered, so there is one partial product per cycle.

**Accumulation.**
* The two sequences are accumulated separately (`P ← P/10 + U`, `P ← P/10 + V`).
* Each accumulator is a carry-save pair `(S, H)` with value `S + 2H`.
* The doubling of `H` is postponed to the next cycle. There `dec_x2_4221` doubles it while a
  4-2-2-1 carry-save adder (`dec_csa_4221`) adds `S/10`, `2H/10` and the new multiple.
* Dividing by ten is a one-digit shift. The frame has 33 digits, and its lowest digit always
  stays zero.

**Merge**, in five cycles:
1. double both `H` words;
2. carry-save add `S_U + 2H_U + S_V`;
3. carry-save add the result and `2H_V`;
4. convert to BCD, including the last doubling;
5. one BCD ripple-carry addition.

**Timing.**
* `start` is taken while `ready` is high.
* The product is registered on the 23rd clock edge, counting the edge that took `start`.
  That is the design's `n + 7`.
* `done` is high for one cycle.
* A new multiplication may start every 17 cycles (`n + 1`). It overlaps the merge of the
  previous one.

## Decimal divider (`dec_divider`)

It divides two normalised 16-digit BCD fractions (`0.1 ≤ X, D < 1`). The output is the
18-digit quotient `floor(X·10^16 / D)`.

* **Recurrence.** `w[i+1] = 10·w[i] − q(i+1)·D`, one quotient digit per clock. The partial
  remainder holds signed decimal digits, so the subtraction of `q·D` is carry-free.
* **Start.** `w[0] = X/100`. This keeps the first remainders inside the range where selection
  always converges. It costs two extra iterations, so there are 18 in all.
* **Digit selection.** The remainder is truncated to four fractional digits and compared with
  the multiples `M_k = (k − 0.5)·D`. The chosen `q` is the largest `k` whose multiple does not
  exceed the remainder. The truncation error stays below the overlap between neighbouring
  digits.
* **Conversion.** The quotient digits may be negative. On-the-fly conversion keeps two
  registers, `Q` and `Q − 1`, so no final carry-propagate conversion is needed. If the last
  remainder is negative, `Q − 1` is taken.
* **Timing.** `done` comes on the 20th clock edge, counting the edge that took `start`.

## Decimal square root (`dec_sqrt`)

It takes a 16-digit BCD radicand with `0.01 ≤ X < 1` and gives its root rounded to 16
digits. `q_int` is only set when rounding carries the root up to 1.0.

* **Recurrence.** `w[i+1] = 10·w[i] − 2·q·Q[i] − q²·10^−(i+1)`. Root digits lie in `[−5, 5]`.
  Remainder digits lie in `[−6, 6]`. After each addition, three short recoding passes bring
  them back into range without a carry chain.
* **Digit selection.** The remainder, truncated to 10^−4, is compared with ten comparison
  multiples `M_k = (2k − 1)·Q + 10^−i·K_k`.
* **A correction to the constant.** `K_k` is lowered by 1/18 from the midpoint value in the
  original derivation. With the unlowered constant, radicands whose first root digit is 0 (for
  example `X = 0.026…`) select a wrong first digit. The lowered constant stays between the
  lower and upper selection bounds for every step.
* **Conversion.** `Q` and `Q − 1` are updated on the fly. At the end, `Q − 1` is taken if the
  remainder is negative. The result is then rounded half up on one extra digit.
* **Timing.** 1 cycle of initialisation, 17 iterations and 1 cycle of termination. `done`
  comes on the 19th clock edge after `start`. The worked example `X = 0.3521986` gives
  `0.5934632254824220`.

## Interface of `coproc_top`

| group | ports | timing |
|-------|-------|--------|
| butterfly | `bf_in_valid`, `a_re … w_im` (IEEE single) → `bf_out_valid`, `x0_re … x1_im` | 1 clock, 1 per clock |
| fixed-point butterfly | `fx_in_valid`, `fx_a_re … fx_w_im` (16-bit) → `fx_out_valid`, `fx_x0_re … fx_x1_im` (36-bit) | 1 clock, 1 per clock |
| decimal adder | `da_in_valid`, `da_x`, `da_y` (16×5 bits) → `da_out_valid`, `da_s`, `da_t_out`, `da_T_out` | 1 clock |
| decimal multiplier | `dm_start`, `dm_x`, `dm_y` (16×4 BCD) → `dm_ready`, `dm_done`, `dm_p` (32×4 BCD) | 23 clocks, 1 per 17 |
| decimal divider | `dd_start`, `dd_x`, `dd_d` (16×4 BCD) → `dd_ready`, `dd_done`, `dd_q` (18×4 BCD) | 20 clocks |
| decimal square root | `ds_start`, `ds_x` (16×4 BCD) → `ds_ready`, `ds_done`, `ds_q_int`, `ds_q` (16×4 BCD) | 19 clocks |

`rst_n` is a synchronous, active-low reset. It clears only the valid and control state.

## Where this implementation departs from, or adds to, the original design

**Butterfly:**
* The three-operand adder's termination collapses the redundant sum with a carry-propagate
  subtraction before normalising and rounding. The original normalises and rounds in
  redundant form, with methods it does not spell out.
* Only round-to-nearest-even is provided.
* The second adder is 60 digits wide rather than 58, so it keeps two guard digits below the
  product sum.
* Digits of `A` that fall below the last digit of the product sum are truncated. The error is
  below `2^(E_big−29)`, and it only shows when the two products cancel exactly.
* When `A` lies more than 30 positions above the products, the product sum is shifted
  instead.
* Denormals, infinities, NaN and exponent overflow are not handled.
* The pairing of partial products in the reduction tree is this design's own choice. The
  tree has four levels: pairs, pairs, two groups, then the final addition.
* Each FDPA output uses a complete three-operand adder. The original shares more of the
  adder between the + and − outputs.

**Around the butterfly:**
* IEEE conversion sits at the top's butterfly ports so the unit can be driven with ordinary
  numbers. In an FFT, only the first and last stages would convert.
* No complete FFT processor (memories, addressing, twiddle storage) is provided.
* The fixed-point butterfly's twiddle scaling, its exact 36-bit outputs and the conversion
  after the register are this design's own choices. Only its overall structure (Booth
  multipliers and carry-free three-operand addition) follows the original.

**Decimal units:**
* F2 is written from the value it must produce.
* `4X` is two flattened doublings.
* Where a digit value has several codes, the codes chosen are this design's own.
* The merge schedule and the `start/ready/done` handshake are this design's own.
* The divider keeps its partial remainder in decimal signed digits. The original splits it
  into a binary carry-save part and a decimal part with digits in `[−6, 5]`, and selects with
  a 14-bit network. Neither is built here. The selection rule `M_k = (k − 0.5)·D` is the
  original's.
* The divider's prescaling by 1/100, its 18 iterations, the final correction and the
  20-cycle timing are this design's own.
* The square root follows the straightforward architecture, with the same 19 cycles. The
  faster recurrence stage, which builds the comparison multiples by additions and selects
  from a 13-bit carry network, is not built.
* The square root's selection constant is lowered by 1/18, as explained above. The final
  rounding is this design's own.

## Verification

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`.

**Floating-point testbenches.** These compare against real arithmetic, using the helpers in
`tb_fp_util`.
* The butterfly, FDPA and end-to-end tests accept errors up to `2^−21` of the operand scale.
* The multiplier must be exact to the precision it keeps.
* The converters must be exact.
* The adder test uses any posibit/negabit pattern and every alignment case, including exact
  cancellation.

**Fixed-point butterfly.** `tb_fxp_butterfly` compares 5000 random butterflies exactly with
64-bit integer arithmetic. Extreme values such as `−2^15` and a twiddle of exactly 1.0 are
included.

**Decimal testbenches.**
* Adder: checked against integer arithmetic over random digit patterns, including redundant
  encodings.
* Multiplier: checked against schoolbook multiplication, together with the 23-edge latency
  and the 17-cycle start interval.
* Divider: checked against exact integer division of wide integers, on 3000 random operand
  pairs plus corner cases, with the 20-edge latency.
* Square root: checked against an exact integer square root of `X·10^32`, rounded. This covers
  3000 random radicands over the whole input range and the worked example, with the 19-edge
  latency.

**End-to-end test.** `tb_coproc_top` runs all six units at the default size. It counts
deep cancellation in the butterfly, exact-zero results, positive and negative decimal
transfers, fixed-point butterflies, overlapped multiplications, quotients corrected for a
negative remainder, and roots whose first digit is 1. It fails if any of these never occurs.

To simulate one testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/bsd_fp_pkg.sv rtl/dec_pkg.sv tb/tb_fp_util.sv \
    tb/tb_coproc_top.sv --top-module tb_coproc_top -Mdir obj -o sim && obj/sim
```

Replace `tb_coproc_top` with any other `tb_*` module. The packages only need to be listed
first.
