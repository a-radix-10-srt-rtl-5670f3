// selection_constants: the quotient-digit selection constants m1..m5.
//
// From the divisor estimate d_hat (the integer digit and two fractional digits
// of d, BCD-5211) this block forms m_k = (k - 0.5) * d_hat for k = 1..5 without
// any table: the odd multiples d_hat, 3d_hat, 5d_hat, 7d_hat and 9d_hat are
// built in BCD-4221 and then shifted right by one bit, which turns a 4221
// number into the 5211 code of half its value. 2d_hat comes from a 1-bit left
// shift of the 5211 estimate, 5d_hat from a 5211->4221 recode and a 3-bit left
// shift, 10d_hat from a digit shift; three short decimal adders form
// 3d_hat = 2d_hat + d_hat, 7d_hat = 5d_hat + 2d_hat and
// 9d_hat = 10d_hat - d_hat. The constants m_k for k = -4..0 are not stored:
// the comparators use -m_k = m_(1-k) + one unit.
//
// Output format (CW = 18 bits, shared with the comparators): bit 17 sign
// (weight -100), then tens, units, tenths and hundredths digits in BCD-5211,
// and bit 0 of weight 0.005. The document rounds the constants up to six
// fractional bits; this design keeps them exact (nine fractional bits), one
// of the two free choices left open in the text. Purely combinational.
module selection_constants
  import bcd_pkg::*;
#(
  localparam int unsigned CW = 18
) (
  input  logic [11:0]   d_hat,    // BCD-5211: d0 . d1 d2
  output logic [CW-1:0] m [1:5]
);
  logic [15:0] dh5211, dh4221, dh2, dh5, dh10, dh3, dh7, dh9;

  always_comb begin
    logic [15:0] t;
    dh5211 = {4'b0000, d_hat};                    // tens digit 0
    for (int i = 0; i < 4; i++) dh4221[4*i +: 4] = r5211_to_4221(dh5211[4*i +: 4]);
    dh2  = {dh5211[14:0], 1'b0};                  // L1: 4221 code of 2*d_hat
    t    = {dh4221[12:0], 3'b000};                // L3: 5211 code of 5*d_hat
    for (int i = 0; i < 4; i++) dh5[4*i +: 4] = r5211_to_4221(t[4*i +: 4]);
    dh10 = {dh4221[11:0], 4'b0000};               // L4: digit shift
  end

  small_dec_adder #(.ND(4)) u_add3 (.a(dh2),  .b(dh4221),  .cin(1'b0), .s(dh3));
  small_dec_adder #(.ND(4)) u_add7 (.a(dh5),  .b(dh2),     .cin(1'b0), .s(dh7));
  small_dec_adder #(.ND(4)) u_add9 (.a(dh10), .b(~dh4221), .cin(1'b1), .s(dh9));

  // R1 shift of a 4221 vector: 5211 code of half its value, one bit longer
  assign m[1] = {2'b00, dh4221};
  assign m[2] = {2'b00, dh3};
  assign m[3] = {2'b00, dh5};
  assign m[4] = {2'b00, dh7};
  assign m[5] = {2'b00, dh9};
endmodule
