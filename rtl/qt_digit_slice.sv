// qt_digit_slice: one decimal digit of the conditional-speculative adder.
//
// Both BCD-5211 inputs are recoded to BCD-5421 (weights 5,4,2,1, the 5-bit set
// iff the digit is >= 5). When the 3-bit low parts sum to 4 or more
// (cond_spec = 1) the x operand is replaced by its excess-3 form, so that a
// plain 4-bit binary addition carries into the 5-bit exactly when the low
// parts pass 5 and produces a binary carry-out exactly when the decimal sum is
// >= 10. From that binary sum the slice derives the carry generate/alive pair
// for the prefix tree and the sum digit for each possible carry-in (0, 1, 2),
// already recoded to BCD-5211. The one case the speculation gets wrong
// (low parts summing to 4 with carry-in 0, giving 7 instead of 4) is corrected
// before recoding. The carry-in 2 sum is used only when a rounding increment
// and an ordinary carry meet in the same digit.
// The document draws this slice at gate level; here it is written at the level
// of the recodings and 4-bit additions it names. Purely combinational.
module qt_digit_slice
  import bcd_pkg::*;
(
  input  logic [3:0] x,      // BCD-5211
  input  logic [3:0] y,      // BCD-5211
  output logic       g,      // decimal carry generate
  output logic       a,      // decimal carry alive (generate or propagate)
  output logic [3:0] z0,     // sum digit for carry-in 0, BCD-5211
  output logic [3:0] z1,     // sum digit for carry-in 1, BCD-5211
  output logic [3:0] z2      // sum digit for carry-in 2, BCD-5211
);
  logic [3:0] x54, y54, x_ex3, x_sel;
  logic [3:0] low_sum;
  logic       cond_spec;
  logic [4:0] t;
  logic [3:0] r0, r1, v1;

  always_comb begin
    x54       = r5211_to_5421(x);
    y54       = r5211_to_5421(y);
    x_ex3     = x54 + 4'd3;
    low_sum   = {1'b0, x54[2:0]} + {1'b0, y54[2:0]};
    cond_spec = (low_sum >= 4'd4);
    x_sel     = cond_spec ? x_ex3 : x54;
    t         = {1'b0, x_sel} + {1'b0, y54};
    g         = t[4];
    a         = (t >= 5'd15);
    r0        = t[3:0];
    r1        = t[3:0] + 4'd1;
    if (cond_spec && low_sum == 4'd4) r0 = r0 - 4'd3;   // undo the wrong +3
    z0        = r5421_to_5211(r0);
    z1        = r5421_to_5211(r1);
    v1        = val5421(r1);
    z2        = enc5211((v1 == 4'd9) ? 4'd0 : v1 + 4'd1);
  end
endmodule
