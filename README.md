# Radix-10 SRT divider with BCD-5211/4221 datapath

This is a digit-recurrence divider for decimal significands. It divides two
n-digit significands x and d in [1, 10) and returns the rounded n-digit
quotient. Each clock cycle produces one decimal quotient digit. A 16-digit
division (IEEE-754 decimal64 significands) takes 21 cycles.

Three ideas keep the design small:

* **Redundant signed quotient digits.** The digits come from {-5, ..., 5}.
  With this redundancy (ratio 5/9), the next digit can be chosen from a short
  truncated estimate of the residual, not from the full residual.
* **Unusual BCD weightings.** Digits are stored in BCD-5211 and BCD-4221
  rather than plain 8421 BCD. In these codes, doubling, halving and
  multiplying by five are wired shifts followed by a per-digit recoding.
  Negation is bit inversion plus one unit, exactly as in binary. The divisor
  multiples d, 2d, 4d and 5d therefore need no adders.
* **One adder for everything.** A single 70-bit decimal carry-propagate adder
  does five jobs: the x - d test, forming 3d, every recurrence step, the last
  residual and the final conversion with rounding. The adder works at the
  same time as the digit selection. Because of that, the residual is always
  held in non-redundant form, and the selection can read its leading digits
  directly.

## The recurrence

    w[0]   = x/20 if x >= d, else x/2
    w[i+1] = 10*w[i] - q_(i+1)*d,     q_(i+1) in {-5..5}

After this scaling, the quotient digit string 0.q1 q2 ... lies in
[0.05, 0.5). The final result is 20 times that string. When x < d, the
result is 10x/d, and the `exp_dec` output tells the exponent logic to
subtract one.

The divider produces n+2 digits: n result digits, plus a guard digit and a
round digit. The sign of the last residual corrects the value by one unit
in the last digit. Whether that residual is zero gives the sticky bit.

## Digit codes

| code     | bit weights | used for                                                          |
|----------|-------------|-------------------------------------------------------------------|
| BCD-5211 | 5 2 1 1     | operands, residual, multiples, quotient digits q*                 |
| BCD-4221 | 4 2 2 1     | intermediate form after a 1-bit left shift; the output quotient   |
| BCD-5421 | 5 4 2 1     | inside the adder's digit slices only                              |

Three wiring identities are used throughout (`bcd_pkg` holds the recoding
tables):

* A 5211 word shifted left by one bit is the 4221 code of twice its value.
* A 4221 word shifted right by one bit is the 5211 code of half its value.
* A word recoded from 5211 to 4221 and then shifted left by three bits is
  the 5211 code of five times its value.

Inverting all bits of a 5211 or 4221 digit gives its 9's complement.

## Word layout

The datapath words are W = 4n+6 bits wide (70 bits for n = 16).

* Bit W-1 is a sign bit of weight -10.
* Then come n+1 BCD-5211 digits. Digit 0 is the units digit, at bits
  [W-2 -: 4]. Digit j sits 4j bits lower.
* Bit 0 is a half digit, worth 5 units of the last digit.

Arithmetic is modulo 20, so the word holds values in [-10, 10).

The extra low bit lets x/20 and x/2 be pure wired shifts of x. In BCD-5211,
halving is a shift of the digit string: 0.5 of a digit lands in the top bit
of the next digit. Likewise, the ×20 at the end is a 5-bit left shift that
turns the 5211 quotient into a 4221 word.

## Cycle plan

Cycle 1 is the cycle after `start` is seen.

| cycle    | adder                                      | selection            | registers |
|----------|--------------------------------------------|----------------------|-----------|
| 1        | x - d                                      | –                    | residual ← x/20 or x/2 (from the sign); multiple ← 0 |
| 2        | 2d + d = 3d                                | q1 from 10·w[0]      | 3d register ← sum; multiple ← \|q1\|·d |
| 3 … n+3  | w[i] = 10·w[i-1] - q_i·d                   | q_(i+1)              | residual, multiple, digit shift registers |
| n+4      | last residual w[n+2]                       | –                    | residual |
| n+5      | Q* - 10·S - borrow + round increment       | –                    | result (×20 by wiring) |

`done` pulses for one cycle after cycle n+5. `q`, `exp_dec` and `inexact`
stay valid until the next `start`.

A subtraction uses the inverted multiple with a carry-in of 1. The inversion
is an XOR level driven by the sign of the stored digit. In cycle 2, when
|q1| = 3, the multiple register takes 3d straight from the adder output,
because the 3d register is only being written in that same cycle.

## Digit selection (the hardest part)

The next digit must be known at the end of the cycle in which the adder is
still computing w[i]. So the selection works from the two parts of w[i]
instead: 100·w[i-1] and -10·q_i·d. Both are truncated to 18-bit estimates.
An estimate word has a sign (weight -100), tens, units, tenths, hundredths,
and one bit of weight 0.005.

* **Comparators.** There are ten, one for each k in -4..5. Comparator k
  tests whether

      100·ŵ[i-1] + (-10·q̂_i·d) - m_k >= 0

  It does this with a 3:2 carry-save row, then a 1-bit left shift and a
  4221→5211 recode of the carry word. The "+1" of the negation enters as
  the free bit at the bottom of the shifted carry word. Last comes a sign
  detector: the adder's own digit slices and prefix carry tree, keeping
  only the carry out.
* **Constants.** `selection_constants` computes m_k = (k - 0.5)·d̂ for
  k = 1..5 from d̂, the first three digits of d. It forms the integer
  multiples of d̂ in BCD-4221: 2d̂ and 5d̂ by wiring, and 3d̂, 7d̂ and 9d̂
  with small ripple decimal adders. A 1-bit right shift then halves them
  into 5211. Constants for k ≤ 0 reuse these, since -m_k = m_(1-k) + one
  unit.
* **Decoder.** q = k when comparator k says yes and comparator k+1 says no.
  The end values ±5 are decoded from two neighbouring comparators. This
  way, an estimate that wraps around the modulo range of the 18-bit word
  still gives the right digit.
* **Sign of 10·w.** The stored sign bit of w[i-1] is not the sign of
  10·w[i-1] modulo 20. That sign is the parity of the units digit, which in
  5211 is `b3 ^ b1 ^ b0`.
* **First step.** In cycle 2 there is no q·d term. The estimate is 10·w[0],
  read from the real sign bit.

The decoder outputs the sign, a one-hot |q| that drives the multiple
multiplexer, and q* (q for q ≥ 0, else 10+q) in 5211 for the final
conversion.

## The decimal adder

`qt_decimal_adder` works on the whole 70-bit word. Position 0 is the binary
half-digit bit. Positions 1..n+1 are decimal digit slices, and the sign bit
is added modulo 2.

Each slice (`qt_digit_slice`) does the following:

* It recodes both 5211 digits to 5421.
* It tests whether the low three bits sum to 4 or more. If so, it adds 3 to
  one operand (excess-3). A plain 4-bit binary carry out is then exactly the
  decimal carry.
* It produces the digit's generate and alive signals.
* It prepares three conditional 5211 sum digits: for +0, +1 and +2.

A radix-4 Kogge-Stone tree (`dec_carry_prefix`) turns generate/alive into
digit carries.

A rounding increment `inc` is applied late, without a second full carry
propagation. A second prefix tree runs over "this sum digit is 9" flags and
gives each digit a late carry. The carry and the late carry then pick the
+0, +1 or +2 sum. The +2 sum is needed for a digit that receives both a
normal carry and the increment.

## Final conversion and rounding

The digits are kept as pairs (q*_i, s_i), where q_i = q*_i - 10·s_i.
The kept part of the result is Q* - 10·S, scaled by 20. The adder
computes it in cycle n+5:

* X = q*_1 … q*_n in digits 1..n, plus the top bit of q*_(n+1) in bit 0.
  After the ×20 shift, that bit is the last kept unit.
* Y = the inverted S word. Digit j holds s_(j+1), and bit 0 holds the
  borrow.

Then `q` = bits [4n-1:0] of the sum, read as BCD-4221.

`rounding_logic` handles everything below the kept digits:

* It forms the signed low part
  L = (q*_(n+1) mod 5)·10 + q*_(n+2) - 10·s_(n+2) - s_(n+3).
* If L < 0, it borrows from the kept part and adds 50 to L.
* It compares the remainder against half a unit (25), using the sticky bit
  (last residual ≠ 0). From this it decides the increment for:
  * round-to-nearest-even (mode 0)
  * round-to-nearest-away (mode 1)
  * truncate (mode 2)
  * round-up (mode 3)

Rounding can never reach 10.0: with operands in [1, 10), the exact quotient
is at most one unit below 10 and is exact whenever it is that close. So there
is no exponent-increment output.

## Where this design departs from its source description

* **Digit-slice threshold.** The excess-3 speculation triggers when the low
  three bits sum to **4 or more**. The published condition of "5 or more"
  gives wrong digits for some operand pairs.
* **Increment path.** The late increment uses its own "digit is 9" prefix
  tree and a third conditional sum. The published AND-OR form is exact only
  when the normal carry-in is zero. The sum cells are written at the
  behavioural level, not gate for gate, and the carry tree is a full
  Kogge-Stone tree, not a sparse one.
* **Exact constants.** The selection constants are exact, and the
  comparator words carry 9 fractional bits: two whole digits plus a bit
  worth 0.005. The published design rounds the constants up to 6
  fractional bits and ends the comparator with a partial digit. The wider
  words cost three more bits per comparator. In exchange, every comparator
  is built from whole digit slices.
* **Registers.** The mux-latches are AND-OR multiplexers in front of
  edge-triggered registers (`mux_latch`). There are no level-sensitive
  latches. The residual and multiple registers each have a narrow 21-bit
  copy (sign and five digits) that is loaded alongside them. Only the
  selection function reads these copies.
* **Chosen behaviour.** The rounding modes, the sticky rule, the start/busy/
  done handshake and the synchronous reset were chosen for this design.
* **Scope.** Only the significand path exists. Exponent arithmetic, sign,
  packing/unpacking of decimal64 and normalization of unnormalized operands
  are not included.

## Files

| file | contents |
|------|----------|
| `rtl/bcd_pkg.sv` | code tables, recoding functions, rounding-mode enum |
| `rtl/divisor_multiples.sv` | d, 2d, 4d, 5d by wiring |
| `rtl/qt_digit_slice.sv`, `rtl/dec_carry_prefix.sv`, `rtl/qt_decimal_adder.sv` | the decimal adder |
| `rtl/small_dec_adder.sv`, `rtl/selection_constants.sv` | m_1..m_5 |
| `rtl/decimal_comparator.sv`, `rtl/digit_selection.sv` | selection function |
| `rtl/rounding_logic.sv` | borrow, increment and inexact |
| `rtl/mux_latch.sv` | one-hot multiplexer plus register |
| `rtl/srt10_divider.sv` | top level and sequencing |
| `tb/tb_util_pkg.sv` | random digit codes and reference value helpers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench is a top module without ports. It prints
`TB_RESULT checks=<n> failures=<m>` and finishes. With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/bcd_pkg.sv tb/tb_util_pkg.sv tb/tb_srt10_divider.sv \
        --top-module tb_srt10_divider
    ./obj_dir/Vtb_srt10_divider

Replace `srt10_divider` with any other module name to run that module's
test. The divider test runs at the default n = 16.

## How far it is verified

The reference values in every testbench are computed with integer
arithmetic, independently of the RTL.

* **tb_srt10_divider.** 3008 full 16-digit divisions: directed corner cases
  plus random operands over all four rounding modes. Each is compared
  against an exactly rounded reference: quotient digits, `exp_dec` and
  `inexact`. Each must take exactly 21 cycles. The test also counts how
  often each mechanism fired, and fails if any count is zero. The
  mechanisms are x ≥ d, x < d, negative digits, |q| = 5, a negative last
  residual, the borrow, the rounding increment and exact results.
* **tb_qt_decimal_adder.** About 20000 random additions and subtractions,
  each with every combination of carry-in and increment. Directed cases
  cover long all-nines carry chains.
* **tb_decimal_comparator.** About 20000 random cases, biased towards sums
  near zero.
* **tb_digit_selection.** 20000 random recurrence steps. The residuals
  are shaped like real ones. Each digit is compared with a reference that
  truncates the estimates itself and applies the thresholds m_k. The first
  step is tested too.
* **tb_divisor_multiples.** 20000 random words.
* **tb_selection_constants.** All 900 values of d̂.
* **tb_rounding_logic.** Exhaustive.
* **tb_mux_latch.** 2000 random cycles.

The design has not been checked at gate level or for timing, and no
area or delay figures are claimed.
