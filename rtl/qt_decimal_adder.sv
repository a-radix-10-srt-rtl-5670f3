// qt_decimal_adder: the divider's single wide decimal carry-propagate adder.
//
// Adds two W-bit 10's complement words in the divider's word layout (see
// bcd_pkg: sign bit, N+1 BCD-5211 digits, one extra low bit of weight
// 5*10^-(N+1)) plus a carry-in, and optionally adds one more unit in the last
// place (inc) without a second carry propagation. Subtraction is done by the
// caller by inverting y and setting cin (inverting a 5211 word is its 9's
// complement). The same adder forms x-d, 3d = 2d+d, every residual
// w[i] = 10w[i-1] - q_i*d, and the final quotient conversion with rounding.
//
// Structure (document, Section 3.2 / Fig. 3): per-digit conditional
// speculative slices compute carry generate/alive and the conditional sum
// digits in parallel; a quaternary prefix tree computes the decimal carries;
// the carries select the sum digits. The extra low bit is an ordinary binary
// position at the bottom of the same carry tree. The increment is applied as a
// late carry. The document forms the late carry from the group alive signals
// of the operands; that is exact only when cin is 0, and the final conversion
// needs cin and inc together, so this design instead propagates the increment
// through the "sum digit is 9" flags with a second prefix tree, and keeps a
// third conditional sum (carry-in 2) for the digit where both carries meet.
//
// Outputs: sum (same layout), sign = sum sign bit, cout = carry into the sign
// position. Arithmetic is modulo 20 (sign weight -10): a result is exact when
// it lies in [-10, 10). Purely combinational.
module qt_decimal_adder
  import bcd_pkg::*;
#(
  parameter int unsigned N = N_DIGITS_DEFAULT,
  localparam int unsigned W = 4 * N + 6,
  localparam int unsigned D = N + 2          // carry positions: low bit + N+1 digits
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  input  logic         inc,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         sign
);
  logic [D-1:0] g, a, nine;
  logic [D:0]   c, lc, alive_unused, lc_alive_unused;
  logic [3:0]   z0 [N+1];
  logic [3:0]   z1 [N+1];
  logic [3:0]   z2 [N+1];
  logic         s0;

  // position 0: the extra binary bit
  assign g[0] = x[0] & y[0];
  assign a[0] = x[0] | y[0];
  assign s0   = x[0] ^ y[0] ^ cin;

  // positions 1..N+1: digit j = N+1-p, bits [4p:4p-3]
  for (genvar p = 1; p < D; p++) begin : g_dig
    qt_digit_slice u_slice (
      .x (x[4*p -: 4]),
      .y (y[4*p -: 4]),
      .g (g[p]),
      .a (a[p]),
      .z0(z0[p-1]),
      .z1(z1[p-1]),
      .z2(z2[p-1])
    );
  end

  dec_carry_prefix #(.D(D)) u_carry (
    .g        (g),
    .a        (a),
    .cin      (cin),
    .c        (c),
    .alive_grp(alive_unused)
  );

  // flags: the (increment-free) sum at this position is all ones / nine
  always_comb begin
    nine[0] = s0;
    for (int p = 1; p < D; p++)
      nine[p] = (val5211(c[p] ? z1[p-1] : z0[p-1]) == 4'd9);
  end

  // late increment carries: lc[p] = inc & all lower positions are at maximum
  dec_carry_prefix #(.D(D)) u_late (
    .g        ('0),
    .a        (nine),
    .cin      (inc),
    .c        (lc),
    .alive_grp(lc_alive_unused)
  );

  always_comb begin
    sum[0] = s0 ^ inc;
    for (int p = 1; p < D; p++) begin
      unique case ({c[p], lc[p]})
        2'b00:   sum[4*p -: 4] = z0[p-1];
        2'b11:   sum[4*p -: 4] = z2[p-1];
        default: sum[4*p -: 4] = z1[p-1];
      endcase
    end
    sum[W-1] = x[W-1] ^ y[W-1] ^ c[D] ^ lc[D];
    cout     = c[D] | lc[D];
    sign     = sum[W-1];
  end
endmodule
