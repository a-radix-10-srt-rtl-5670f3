// divisor_multiples: the full-length divisor multiples d, 2d, 4d and 5d.
//
// The divisor arrives as a word in the divider's layout (bcd_pkg), digits in
// BCD-5211. No carry propagates between digits:
//   2d: a 1-bit wired left shift turns a 5211 number into the 4221 code of
//       twice its value; each digit is then recoded 4221 -> 5211.
//   4d: the same step applied to 2d.
//   5d: each digit is recoded 5211 -> 4221 and the vector is shifted left by
//       3 bits, which yields the 5211 code of five times the value.
// 3d needs a carry propagation and is formed by the main decimal adder.
// Words are kept modulo 20 like every word of the divider, so bits shifted
// into or past the sign position are folded into the sign by parity; the
// multiples are only ever used through the residual recurrence, whose result
// always lies in [-10, 10). The structure follows the document (Fig. 2a); the
// modulo-20 sign folding is this design's own. 5d is exact only when the
// extra low bit of d is 0, which holds for every N-digit divisor.
// Purely combinational.
module divisor_multiples
  import bcd_pkg::*;
#(
  parameter int unsigned N = N_DIGITS_DEFAULT,
  localparam int unsigned W = 4 * N + 6
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] d1,
  output logic [W-1:0] d2,
  output logic [W-1:0] d4,
  output logic [W-1:0] d5
);
  function automatic logic [W-1:0] times2(input logic [W-1:0] v);
    logic [W-1:0] s;
    s = {v[W-2:0], 1'b0};                 // wired L1 shift: 4221 digits of 2v
    for (int p = 1; p <= N + 1; p++)
      s[4*p -: 4] = r4221_to_5211(s[4*p -: 4]);
    return s;
  endfunction

  function automatic logic [W-1:0] times5(input logic [W-1:0] v);
    logic [W-1:0] r, s;
    r = v;
    for (int p = 1; p <= N + 1; p++)
      r[4*p -: 4] = r5211_to_4221(v[4*p -: 4]);
    s      = {r[W-4:0], 3'b000};          // wired L3 shift: 5211 digits of 5v
    s[W-1] = r[W-1] ^ r[W-3] ^ r[W-4];    // fold the weights 10 (mod 20)
    return s;
  endfunction

  always_comb begin
    d1 = d;
    d2 = times2(d);
    d4 = times2(d2);
    d5 = times5(d);
  end
endmodule
