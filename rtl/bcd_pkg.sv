// bcd_pkg: digit codings and word layout shared by the radix-10 divider.
//
// A decimal digit is held in one of four 4-bit weighted codes: BCD-5211 (the
// operand and residual code), BCD-4221 (obtained from 5211 by a 1-bit left
// shift, i.e. x2), BCD-5421 (used inside the adder) and BCD-8421 (only for
// conversion at the testbench boundary). The recoders act on one digit and
// never propagate a carry to the neighbouring digit. Because every weight is
// positive and the weights of a digit add up to 9, inverting all bits of a
// 5211 or 4221 number gives its 9's complement.
//
// Word layout (W = 4*N+6 bits, 70 for 16 digits), a 10's complement fixed-point
// number:
//   bit W-1            sign, weight -10
//   bits W-2 .. 1      N+1 BCD-5211 digits; digit 0 has weight 1, digit j has
//                      weight 10^-j (digit N is the last full digit)
//   bit 0              one extra bit of weight 5*10^-(N+1) (the top bit of a
//                      5211 digit N+1), needed to hold x/20 exactly and to
//                      place the rounding position of the quotient.
// The width and the sign bit plus five guard bits follow the document; the
// exact placement of the digits inside the word is this design's choice.
package bcd_pkg;

  localparam int unsigned N_DIGITS_DEFAULT = 16;

  // Rounding modes offered by the rounding logic (the significand is positive).
  typedef enum logic [1:0] {
    RND_NEAREST_EVEN = 2'd0,
    RND_NEAREST_AWAY = 2'd1,
    RND_TRUNC        = 2'd2,
    RND_UP           = 2'd3
  } round_mode_e;

  // ---- digit tables -----------------------------------------------------------
  // VALxxxx[code] is the value of a code; ENCxxxx[v] the canonical code of a
  // value v (entries above 9 repeat the code of 9); Rxxxx_yyyy[code] recodes
  // one digit. Canonical codes: 5211 {0000,0001,0100,0101,0111,1000,1001,
  // 1100,1101,1111}, 4221 {0000,0001,0010,0011,1000,1001,1010,1011,1110,1111},
  // 5421 {0000..0100,1000..1100}. 5421 codes whose low part exceeds 4 are
  // not produced by the design; VAL5421 gives their plain weighted sum.
  localparam logic [3:0] VAL5211 [16] = '{
    4'd0, 4'd1, 4'd1, 4'd2, 4'd2, 4'd3, 4'd3, 4'd4, 4'd5, 4'd6, 4'd6, 4'd7, 4'd7, 4'd8, 4'd8, 4'd9
  };
  localparam logic [3:0] VAL4221 [16] = '{
    4'd0, 4'd1, 4'd2, 4'd3, 4'd2, 4'd3, 4'd4, 4'd5, 4'd4, 4'd5, 4'd6, 4'd7, 4'd6, 4'd7, 4'd8, 4'd9
  };
  localparam logic [3:0] VAL5421 [16] = '{
    4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11, 4'd12
  };
  localparam logic [3:0] ENC5211 [16] = '{
    4'b0000, 4'b0001, 4'b0100, 4'b0101, 4'b0111, 4'b1000, 4'b1001, 4'b1100, 4'b1101, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111
  };
  localparam logic [3:0] ENC4221 [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1110, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111, 4'b1111
  };
  localparam logic [3:0] ENC5421 [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1100, 4'b1100, 4'b1100, 4'b1100, 4'b1100, 4'b1100
  };
  localparam logic [3:0] R5211_4221 [16] = '{
    4'b0000, 4'b0001, 4'b0001, 4'b0010, 4'b0010, 4'b0011, 4'b0011, 4'b1000, 4'b1001, 4'b1010, 4'b1010, 4'b1011, 4'b1011, 4'b1110, 4'b1110, 4'b1111
  };
  localparam logic [3:0] R4221_5211 [16] = '{
    4'b0000, 4'b0001, 4'b0100, 4'b0101, 4'b0100, 4'b0101, 4'b0111, 4'b1000, 4'b0111, 4'b1000, 4'b1001, 4'b1100, 4'b1001, 4'b1100, 4'b1101, 4'b1111
  };
  localparam logic [3:0] R5211_5421 [16] = '{
    4'b0000, 4'b0001, 4'b0001, 4'b0010, 4'b0010, 4'b0011, 4'b0011, 4'b0100, 4'b1000, 4'b1001, 4'b1001, 4'b1010, 4'b1010, 4'b1011, 4'b1011, 4'b1100
  };
  localparam logic [3:0] R5421_5211 [16] = '{
    4'b0000, 4'b0001, 4'b0100, 4'b0101, 4'b0111, 4'b1000, 4'b1001, 4'b1100, 4'b1000, 4'b1001, 4'b1100, 4'b1101, 4'b1111, 4'b1111, 4'b1111, 4'b1111
  };

  function automatic logic [3:0] val5211(input logic [3:0] c);  return VAL5211[c];    endfunction
  function automatic logic [3:0] val4221(input logic [3:0] c);  return VAL4221[c];    endfunction
  function automatic logic [3:0] val5421(input logic [3:0] c);  return VAL5421[c];    endfunction
  function automatic logic [3:0] enc5211(input logic [3:0] v);  return ENC5211[v];    endfunction
  function automatic logic [3:0] enc4221(input logic [3:0] v);  return ENC4221[v];    endfunction
  function automatic logic [3:0] enc5421(input logic [3:0] v);  return ENC5421[v];    endfunction
  function automatic logic [3:0] r5211_to_4221(input logic [3:0] c); return R5211_4221[c]; endfunction
  function automatic logic [3:0] r4221_to_5211(input logic [3:0] c); return R4221_5211[c]; endfunction
  function automatic logic [3:0] r5211_to_5421(input logic [3:0] c); return R5211_5421[c]; endfunction
  function automatic logic [3:0] r5421_to_5211(input logic [3:0] c); return R5421_5211[c]; endfunction

  // Parity of a 5211 digit value (weights 5,2,1,1: the odd ones are 5,1,1).
  function automatic logic par5211(input logic [3:0] c);
    return c[3] ^ c[1] ^ c[0];
  endfunction

endpackage
