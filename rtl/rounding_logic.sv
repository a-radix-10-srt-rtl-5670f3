// rounding_logic: decides the final quotient correction and increment.
//
// The divider keeps the quotient as digits q*_i in {0..9} plus sign flags
// s_i (q_i = q*_i - 10*s_i). In the last cycle the main adder forms
// Q = Q* - 10*S in the word layout, whose lowest bit has the weight of one
// unit in the last place of the normalized n-digit result (5*10^-(n+1)
// before the final x20 shift). Everything below that bit is handled here:
// the low part L = (q*_(n+1) without its 5-bit)*10 + q*_(n+2)
// - 10*s_(n+2) - s_(n+3), in units of 10^-(n+2), where s_(n+3) is the sign of
// the last residual. L lies in [-11, 49]; when it is negative one unit is
// borrowed from the kept part (borrow = 1, passed to the adder as bit 0 of
// the subtrahend) and 50 is added. The remainder R in [0, 50) is compared
// with the half unit 25; together with the sticky bit (last residual not zero)
// and the rounding mode this gives the +1 unit request inc for the adder's
// late carry. Round to nearest even needs the kept part's last bit, which is
// q*_(n+1)'s 5-bit XOR borrow. The document names the inputs (round digit,
// rounding mode, sticky bit) and the output (the +1 increment); the
// arithmetic above is this design's. Purely combinational.
module rounding_logic
  import bcd_pkg::*;
(
  input  logic [3:0]  q_n1,        // q*_(n+1), BCD-5211 (canonical code)
  input  logic [3:0]  q_n2,        // q*_(n+2), BCD-5211
  input  logic        s_n2,        // sign flag of q_(n+2)
  input  logic        w_neg,       // sign of the last residual, s_(n+3)
  input  logic        w_nonzero,   // sticky
  input  round_mode_e mode,
  output logic        borrow,
  output logic        inc,
  output logic        inexact
);
  logic signed [7:0] low, rem;
  logic              lsb, sticky;

  always_comb begin
    low    = (8'(val5211(q_n1)) - (q_n1[3] ? 8'sd5 : 8'sd0)) * 8'sd10 + 8'(val5211(q_n2))
             - (s_n2 ? 8'sd10 : 8'sd0) - (w_neg ? 8'sd1 : 8'sd0);
    borrow = low[7];
    rem    = borrow ? low + 8'sd50 : low;
    lsb    = q_n1[3] ^ borrow;
    sticky = w_nonzero;
    unique case (mode)
      RND_NEAREST_EVEN: inc = (rem > 8'sd25) || (rem == 8'sd25 && (sticky || lsb));
      RND_NEAREST_AWAY: inc = (rem >= 8'sd25);
      RND_TRUNC:        inc = 1'b0;
      default:          inc = (rem != 8'sd0) || sticky;
    endcase
    inexact = (rem != 8'sd0) || sticky;
  end
endmodule
