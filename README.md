# A single-precision floating-point calculator for a small FPGA board

Many low-cost FPGAs have no floating-point hardware. This design is a
soft IEEE 754 adder/subtractor wrapped in everything needed to use it on a
bare development board: you key in two single-precision numbers as hex digits
on eight slide switches and a few push buttons, press CALCULATE, and read the
sum or difference on a four-digit seven-segment display. It targets a
Nexys3-style board (Spartan-6, 100 MHz clock, 8 switches, 5 buttons, one LED,
4 display digits) and uses exactly its 27 I/O pins.

The heart is `fp_addsub`, a four-stage pipelined adder/subtractor with full
IEEE semantics: round-to-nearest-even, denormal (gradual underflow) inputs
and outputs, overflow to infinity, and NaN for invalid operations. The rest
is board plumbing: debouncing, a digit-entry state machine, an operand
buffer, and a display path that shows eight-digit words four digits at a
time.

## Using the calculator

| Input | Use |
|---|---|
| `sw[3:0]` | hex digit to enter |
| `sw[6:4]` | what is shown and edited: `001` Number1, `010` Number2, `100` Result; anything else shows blanks |
| `sw[7]` | `0` shows the four low digits, `1` the four high digits |
| `btn_up` (UP-POINTER) | store `sw[3:0]` as the next digit, least significant first |
| `btn_dw` (DW-POINTER) | remove the digit entered last |
| `btn_addsub` | toggle add / subtract; `ld1` lights in subtract mode |
| `btn_calc` | compute Number1 + Number2 or Number1 - Number2 |
| `btn_reset` | clear both numbers, add mode |

Example: to enter 1.5 = `3FC00000`, select Number1 and press UP-POINTER with
the switches at 0, 0, 0, 0, 0, C, F, 3. Digits not yet entered show blank and
count as 0 in the arithmetic.

Results that are infinite or NaN are shown as words on the low half of the
display (` InF`, `-InF`, `nAn `); the high half still shows the raw hex of
the upper 16 bits (`7F80`, `FF80`, `7FC0`) so the exponent can be read.

## Block structure

```
buttons -> bru -> io_fsm -> digit_buffer --op1,op2--> fp_addsub -> pad_unit --+
                    |             |                                            |
                    |             +--num1,num2 (digit words)--> mux1 <---------+
                    +-- sub (LD1), start                         |
                                                  sw[7] -> mux2 -> sevenseg -> seg, an
```

| Module | Role |
|---|---|
| `fpu_board_top` | wiring, reset and switch synchronisers |
| `bru` | debouncer: samples buttons at 1 kHz, one `press` pulse per press |
| `tick_gen` | clock divider giving a one-cycle enable every `DIV` clocks |
| `io_fsm` | entry state machine, add/sub mode, calculate start |
| `digit_buffer` | the two operands as eight 5-bit digit codes each |
| `fp_addsub` | IEEE 754 adder/subtractor, parameterised format |
| `pad_unit` | 4-bit result nibbles to 5-bit digit codes, special-value words |
| `mux1` | Number1 / Number2 / Result select (`sw[6:4]`) |
| `mux2` | low / high four-digit half (`sw[7]`) |
| `sevenseg` | glyph decoding and 1 kHz digit scanning |
| `fpu_pkg` | digit codes, widths, glyph table |

## The adder/subtractor (`fp_addsub`)

Parameters `EXP_W` and `FRAC_W` choose the format: 8/23 for single precision
(the default and what the board uses), 11/52 for double. Subtraction is
addition with the sign of `b` flipped. Significands are `P = FRAC_W + 1` bits
with the hidden bit, extended by three bits (guard, round, sticky).

1. **Unpack and order.** Each operand is classified (NaN, infinity,
   finite). A denormal gets hidden bit 0 and exponent 1, which makes it
   line up with the smallest normal numbers. The operands are swapped so
   that the "large" one has the greater magnitude, compared on the packed
   exponent-and-fraction bits, and the exponent difference is formed.
2. **Align.** The smaller significand is shifted right by the difference,
   capped at `P+3` because beyond that only the sticky bit matters. Every bit
   shifted past the guard and round positions is ORed into the sticky bit.
3. **Add or subtract.** Equal signs add the aligned significands; different
   signs subtract the small one from the large one. The ordering in stage 1
   keeps the difference non-negative, so no negation step is needed.
4. **Normalise, round, pack.** A carry out shifts right by one, keeping the
   lost bit in sticky, and raises the exponent. Otherwise a leading-zero
   count shifts left. The shift is limited so the exponent never falls
   below 1; a result still lacking its hidden bit is a denormal and gets
   exponent field 0. Rounding is to nearest, ties to even:
   round up if `G & (R | S | LSB)`. The increment is added to the packed
   `{exponent, fraction}` word, so a significand overflow carries into the
   exponent for free. The same carry turns the largest denormal into the
   smallest normal, and the largest finite number into infinity.

Special cases take over at the end:
- Any NaN operand, or infinity minus infinity, gives the quiet NaN
  `0x7FC00000` (all NaN payloads are replaced).
- An infinity operand passes through, with its effective sign.
- An exact zero result is +0 unless both effective operands are negative.
- An exponent that reaches all-ones before rounding gives infinity.

Timing: one operation per clock, `out_valid`/`result` exactly 4 clocks after
`in_valid`; `result` keeps the last value until the next one.

## Entry state machine and buffer (`io_fsm`, `digit_buffer`)

Each operand has an entry state S0..S8, the number of digits entered. In Sk,
UP writes the switch digit into position k and moves to S(k+1). DW writes
the blank code into position k-1 and moves back to S(k-1). UP in S8 and DW
in S0 are ignored, and UP wins if both arrive in the same cycle. The operand
being edited is the one `mux1` shows. With the result selected, or with a
non-one-hot `sw[6:4]`, the buttons edit nothing. ADD/SUB toggles the mode bit
that drives `ld1`. CALCULATE produces a single-cycle `start` into
`fp_addsub`, which reads both operands straight from the buffer.

The buffer stores what was entered, not the live switches. Each digit is a
5-bit code. The buffer gives out two views: the 40-bit digit words for
display, and 32-bit operands built from the low nibble of every digit.

## Digit codes and display (`fpu_pkg`, `pad_unit`, `mux1`, `mux2`, `sevenseg`)

Every digit on the display bus is 5 bits. Codes `0x00`-`0x0F` are hex
digits. Codes with the top (pad) bit set are extra glyphs: `0x10` blank,
`0x11` minus, `0x12` I, `0x13` n. The glyphs A and F reuse the hex codes.
`pad_unit` adds the pad bit to each result nibble and substitutes the
special-value words.

`sevenseg` lights one digit per 1 kHz tick, in the order 0, 1, 2, 3, so the
whole display refreshes every 4 ms. Segment and anode outputs are active
low, as on a common-anode display: `seg[0]` = a ... `seg[6]` = g, `seg[7]` =
decimal point, which is always off. Digit 0 is the rightmost (`an[0]`).

## Debouncing (`bru`)

The buttons go through a two-flop synchroniser and are then sampled once
per millisecond. Contact bounce lasts less than a millisecond, so at most
one sample can land in it. The sampled level therefore changes only once per
press or release. `press` is a one-clock pulse on each rising edge of the
sampled level. A press registers at the first sample after the contact
closes, i.e. within about 1 ms. Reset (`btn_reset`) skips the debouncer: it
is only synchronised, because a reset that bounces does no harm.

## Parameters and timing summary

| Parameter | Default | Meaning |
|---|---|---|
| `fpu_board_top.CLK_HZ` | 100 000 000 | system clock |
| `fpu_board_top.SAMPLE_HZ` | 1 000 | debounce sample rate and digit scan rate |
| `fp_addsub.EXP_W` / `FRAC_W` | 8 / 23 | floating-point format |
| `bru.DIV`, `sevenseg.DIV`, `tick_gen.DIV` | 100 000 | clocks per tick (set from the top) |

All logic runs on the one clock with synchronous, active-high reset. The
1 kHz "clocks" are clock enables, not derived clocks.

## What follows the original design and what is this implementation's own

The following come from the original: the unit list and order (debouncer,
entry state machine, buffer, adder/subtractor, padding unit, two
multiplexers, display driver), the 100 MHz clock, the 1 kHz sampling and
scan rates, the 5-bit digit width, the 40-bit MUX1 word, the 20-bit display
input, the one-hot MUX1 selection, the Sw7 half select, the LD1 mode LED and
the S0 -> S1 -> ... entry sequence. The original says that adding double
precision is straightforward. Here it is a parameter of `fp_addsub`, but the
board wrapper stays single precision.

The original leaves the following open, so they are this implementation's
choices:
- Sw3..Sw0 carry the digit, and the operand shown is the one edited.
- Behaviour at the S0/S8 ends of the entry sequence.
- ADD/SUB works as a toggle.
- Blank digits for the unused MUX1 settings.
- The glyph set and the special-value words.
- Rounding mode, canonical NaN, and the four-stage pipeline.
- The synchronisers, active-low display polarity, and the dark decimal point.

The original design was written in VHDL for the Xilinx tools. This is an
independent SystemVerilog implementation. Board pin constraints are not
included.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_fp_addsub`: 1 152 directed pairs and 20 000 random pairs are compared
  bit for bit against a reference. The directed pairs cover zeros,
  denormals, infinities, NaNs, the largest finite number and exact
  cancellations. The reference adds both operands exactly in `real`, then
  rounds to single precision with an integer routine. This double rounding
  still gives the correctly rounded sum, since 53 >= 2·24 + 2. The 4-cycle latency is
  checked on every result.
- `tb_fp_addsub_double`: the same for `EXP_W=11, FRAC_W=52`, against native
  `real` arithmetic.
- `tb_bru`: chattering presses and releases; exactly one pulse per press,
  within one sample period.
- `tb_io_fsm`: directed S0..S8 walk, then 5 000 random cycles against a
  model of the entry rules.
- `tb_digit_buffer`, `tb_pad_unit`, `tb_mux1`, `tb_mux2`: model
  comparisons, exhaustive where small.
- `tb_sevenseg`: all 32 codes against an independently written segment
  table, plus scan order and dwell time.
- `tb_fpu_board_top`: the whole board at default parameters (100 MHz,
  1 kHz), driven like a user with bouncing buttons, reading the multiplexed
  display. It runs 1.5 + 2.25, 1.5 - 2.25, an overflow to +infinity,
  infinity minus infinity, digit deletion and reset. It counts each
  mechanism and fails if one never occurs. It simulates about 52 M clock
  cycles, roughly 30 s in Verilator.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl rtl/fpu_pkg.sv \
    tb/tb_fpu_board_top.sv --top tb_fpu_board_top -Mdir obj -o sim
./obj/sim
```

Swap in any other `tb/tb_*.sv` and its module name for `--top`. The block
testbenches shorten the 1 kHz divider through the `DIV` parameter. To
change the board clock or scan rate, set `CLK_HZ`/`SAMPLE_HZ` on
`fpu_board_top`. To change the format, set `EXP_W`/`FRAC_W` on `fp_addsub`.
The board wrapper assumes 32-bit operands, eight digits.
