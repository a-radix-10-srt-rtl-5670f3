// digit_selection: selects the next quotient digit q_(i+1) in {-5..5}.
//
// The residual estimate 10*w_hat[i] is carried as two truncated words: the
// leading bits of 100*w[i-1] (taken from the assimilated residual register)
// and of -10*q_i*d (taken from the divisor-multiple operand after the
// inverting XOR level). Each keeps a sign, two integer digits, one fractional
// digit and the two upper bits of the next digit: 9 integer and 6 fractional
// bits, as in the document. In the very first selection there is no previous
// residual: the register then holds w[0] itself, which is read as 10*w[0]
// (first = 1) and the multiple operand is zero.
// Ten decimal comparators test the estimate against m_k, k = -4..5
// (-m_k = ~m_k + unit for k > 0, -m_k = m_(1-k) + unit for k <= 0). The
// decoder turns the thermometer code into the digit: q = k where c_k = 1 and
// c_(k+1) = 0, q = 5 when c_5 and c_4, q = -5 when c_-4 and c_-3 are both 0.
// Testing neighbouring pairs keeps the decoder right when the modulo-200
// comparison wraps for the extreme constants (only c_-4 can wrap when the
// estimate is very high, only c_5 when it is very low); the document only
// says the comparator outputs are decoded. Outputs: the sign of q, |q| as a
// one-hot code for the multiple mux-latch (bit k-1 set for |q| = k, all zero
// for q = 0), and q* = q + 10*sign in BCD-5211 for the quotient.
// Purely combinational; the critical path of the divider.
module digit_selection
  import bcd_pkg::*;
#(
  parameter int unsigned N = N_DIGITS_DEFAULT,
  localparam int unsigned W  = 4 * N + 6,
  localparam int unsigned CW = 18
) (
  input  logic [W-1:0]  w_prev,    // w[i-1], or w[0] when first = 1
  input  logic [W-1:0]  neg_qd,    // -q_i*d as presented to the adder (without its unit)
  input  logic          first,
  input  logic [CW-1:0] m [1:5],
  output logic          q_sign,
  output logic [4:0]    q_abs,     // one-hot |q|
  output logic [3:0]    q_star,    // BCD-5211
  output logic signed [3:0] q_val  // the digit as a number, for observation
);
  logic [CW-1:0] est_w, est_qd;
  logic [9:0]    ge;                // ge[k+4] = estimate >= m_k

  function automatic logic [3:0] dig(input logic [W-1:0] v, input int j);
    return v[W-2-4*j -: 4];
  endfunction

  always_comb begin
    if (first)
      est_w = {w_prev[W-1], dig(w_prev, 0), dig(w_prev, 1), dig(w_prev, 2),
               dig(w_prev, 3) & 4'b1100, 1'b0};
    else
      est_w = {par5211(dig(w_prev, 0)), dig(w_prev, 1), dig(w_prev, 2), dig(w_prev, 3),
               dig(w_prev, 4) & 4'b1100, 1'b0};
    est_qd = {neg_qd[W-1], dig(neg_qd, 0), dig(neg_qd, 1), dig(neg_qd, 2),
              dig(neg_qd, 3) & 4'b1100, 1'b0};
    if (first) est_qd = '0;                      // q_0 = 0
  end

  for (genvar k = -4; k <= 5; k++) begin : g_cmp
    decimal_comparator u_cmp (
      .a  (est_w),
      .b  (est_qd),
      .c  ((k > 0) ? ~m[(k > 0) ? k : 1] : m[(k > 0) ? 1 : 1 - k]),
      .cin(1'b1),
      .ge (ge[k+4])
    );
  end

  always_comb begin
    q_val = 4'sd0;
    if (!ge[0] && !ge[1])      q_val = -4'sd5;
    else if (ge[9] && ge[8])   q_val = 4'sd5;
    else
      for (int k = -4; k <= 4; k++)
        if (ge[k+4] && !ge[k+5]) q_val = 4'(k);
    q_sign = q_val[3];
    q_abs  = '0;
    if (q_val != 0) q_abs[(q_sign ? -q_val : q_val) - 1] = 1'b1;
    q_star = enc5211(q_sign ? 4'(q_val + 4'sd10) : q_val);
  end
endmodule
