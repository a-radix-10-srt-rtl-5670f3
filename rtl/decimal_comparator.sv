// decimal_comparator: tells whether a residual estimate reaches a constant.
//
// Inputs are three 18-bit words in the selection format (bit 17 sign of
// weight -100, four BCD-5211 digits tens..hundredths, bit 0 of weight 0.005):
// the two parts of the residual estimate (100*w[i-1] and -10*q_i*d, both
// truncated) and the negated constant -m_k without its final unit, which
// enters as cin. The output ge is 1 when a + b + c + cin >= 0.
// A row of binary 3:2 carry-save cells reduces the three words to a sum word
// v and a carry word h. Doubling h is a 1-bit wired left shift (which gives
// 4221 digits) followed by a 4221->5211 recode; cin fills the vacated low
// bit. The sign of v + 2h is then the XOR of both sign bits and the carry out
// of a decimal carry tree over the digits, built from the same
// conditional-speculative digit slices and quaternary prefix tree as the
// main adder (only their carry outputs are used). Arithmetic is modulo 200;
// the decoder that follows tolerates the one wrap-around this allows.
// Follows Fig. 4(b) of the document. Purely combinational.
module decimal_comparator
  import bcd_pkg::*;
#(
  localparam int unsigned CW = 18
) (
  input  logic [CW-1:0] a,
  input  logic [CW-1:0] b,
  input  logic [CW-1:0] c,
  input  logic          cin,
  output logic          ge
);
  logic [CW-1:0] v, h, h2;
  logic [4:0]    g, al;
  logic [5:0]    carry, alive_unused;
  logic [3:0]    z0_unused [4];
  logic [3:0]    z1_unused [4];
  logic [3:0]    z2_unused [4];

  always_comb begin
    v  = a ^ b ^ c;
    h  = (a & b) | (a & c) | (b & c);
    h2 = {h[CW-2:0], cin};                        // 2h in 4221 digits
    for (int p = 1; p <= 4; p++) h2[4*p -: 4] = r4221_to_5211(h2[4*p -: 4]);
  end

  assign g[0]  = v[0] & h2[0];
  assign al[0] = v[0] | h2[0];

  for (genvar p = 1; p <= 4; p++) begin : g_dig
    qt_digit_slice u_slice (
      .x (v[4*p -: 4]),
      .y (h2[4*p -: 4]),
      .g (g[p]),
      .a (al[p]),
      .z0(z0_unused[p-1]),
      .z1(z1_unused[p-1]),
      .z2(z2_unused[p-1])
    );
  end

  dec_carry_prefix #(.D(5)) u_tree (
    .g        (g),
    .a        (al),
    .cin      (1'b0),
    .c        (carry),
    .alive_grp(alive_unused)
  );

  assign ge = ~(v[CW-1] ^ h2[CW-1] ^ carry[5]);
endmodule
