// srt10_divider: radix-10 SRT divider for n-digit decimal significands.
//
// Divides x by d, both n-digit significands in [1, 10) coded in BCD-5211
// (digit 0 is the integer digit), and returns the n-digit quotient rounded
// in the selected mode, coded in BCD-4221, after n+5 clock cycles (21 for
// n = 16, IEEE-754 decimal64).
//
// Algorithm: the recurrence w[i+1] = 10*w[i] - q_(i+1)*d with quotient digits
// in {-5..5} (redundancy 5/9). w[0] = x/20 when x >= d, else x/2, so that the
// digit string lies in [0.05, 0.5) and the result is 20 times it. One decimal
// carry-propagate adder does all additions, so the residual is always held
// assimilated; the next digit is selected in parallel from truncated leading
// parts of 100*w[i-1] and -10*q_i*d.
//
// Cycle by cycle (cycle 1 is the one after start is seen):
//   1        adder: x - d; its sign picks w[0] = x/20 or x/2. Multiple := 0.
//   2        adder: 3d = 2d + d, kept in its own register. Selection: q_1
//            from w[0]. Multiple register := |q_1|*d.
//   3..n+3   adder: w[i] = 10*w[i-1] - q_i*d. Selection: q_(i+1).
//   n+4      adder: w[n+2] (last residual) is assimilated.
//   n+5      adder: Q = Q* - 10*S with the borrow and rounding increment from
//            rounding_logic; the result is shifted left 5 bits (x20) by
//            wiring and registered. done pulses for one cycle.
// Negative multiples are the bit inverse of the positive ones plus a carry-in
// (XOR level driven by the sign of q_i). Each quotient digit is stored as its
// 5211 digit q* and a sign flag s, and converted at the end.
//
// Interface: start is taken when idle (busy = 0); x, d and mode are sampled
// with it. q, exp_dec (x < d: the quotient is 10x/d, so its exponent is one
// lower) and inexact are valid from the done pulse until the next start.
// Rounding can never carry the result up to 10: with n-digit operands in
// [1, 10) the exact quotient stays more than one unit in the last place below
// 10, so no exponent increment is needed. Synchronous active-low reset.
//
// From the document: the algorithm, the word width 4n+6, the use of one adder
// for x-d, 3d, the recurrence, the last residual and the rounding, the cycle
// plan and the n+5 latency, and narrow copies of the residual and multiple
// registers that feed the selection function. This design's choices:
// edge-triggered registers instead of latches, the width of those narrow
// copies (21 bits: sign and five digits), the modulo-20 word arithmetic, the
// rounding modes offered, and the exponent flag.
module srt10_divider
  import bcd_pkg::*;
#(
  parameter int unsigned N = N_DIGITS_DEFAULT,
  localparam int unsigned W  = 4 * N + 6,
  localparam int unsigned CW = 18,
  localparam int unsigned NW = 21     // sign + 5 digits read by the selection
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [4*N-1:0] x,        // BCD-5211, digit 0 in the top 4 bits
  input  logic [4*N-1:0] d,        // BCD-5211, digit 0 in the top 4 bits
  input  round_mode_e    mode,
  output logic           busy,
  output logic           done,
  output logic [4*N-1:0] q,        // BCD-4221, digit 0 in the top 4 bits
  output logic           exp_dec,
  output logic           inexact
);
  localparam int unsigned LAST = N + 5;

  // ---- control ---------------------------------------------------------------
  logic [$clog2(LAST+1)-1:0] cyc;          // 0 = idle, else current cycle number
  logic c_init, c_three, c_iter, c_final;

  always_ff @(posedge clk) begin
    if (!rst_n)                cyc <= '0;
    else if (cyc == 0 && start) cyc <= 1;
    else if (cyc == LAST[$bits(cyc)-1:0]) cyc <= '0;
    else if (cyc != 0)         cyc <= cyc + 1'b1;
  end

  assign busy    = (cyc != 0);
  assign c_init  = (cyc == 1);
  assign c_three = (cyc == 2);
  assign c_iter  = (cyc >= 3) && (cyc <= ($bits(cyc))'(N + 4));
  assign c_final = (cyc == ($bits(cyc))'(LAST));

  // ---- operand registers ---------------------------------------------------
  logic [W-1:0] xw, dw;
  round_mode_e  mode_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xw     <= '0;
      dw     <= '0;
      mode_r <= RND_NEAREST_EVEN;
    end else if (cyc == 0 && start) begin
      xw     <= {1'b0, x, 5'b0};
      dw     <= {1'b0, d, 5'b0};
      mode_r <= mode;
    end
  end

  // ---- divisor multiples -----------------------------------------------------
  logic [W-1:0] d1, d2, d4, d5, r3d;
  logic [CW-1:0] m [1:5];

  divisor_multiples #(.N(N)) u_mult (.d(dw), .d1(d1), .d2(d2), .d4(d4), .d5(d5));
  selection_constants u_const (.d_hat(dw[W-2 -: 12]), .m(m));

  // ---- initial residual candidates: x/2 and x/20 ------------------------------
  logic [W-1:0] x4221, x_half, x_twentieth;
  always_comb begin
    x4221 = xw;
    for (int p = 1; p <= N + 1; p++) x4221[4*p -: 4] = r5211_to_4221(xw[4*p -: 4]);
    x_half      = {1'b0, x4221[W-1:1]};          // R1 of 4221 = 5211 of x/2
    x_twentieth = {4'b0000, x_half[W-1:4]};       // and a digit shift
  end

  // ---- registers: residual, multiple, sign of q_i -----------------------------
  logic [W-1:0] rw, rm, sum;
  logic         rs, add_sign, add_cout_unused;
  logic         x_ge_d;
  logic         sel_sign;
  logic [4:0]   sel_abs;
  logic [3:0]   sel_star;
  logic signed [3:0] sel_val;

  logic [W-1:0] rw_din [3];
  assign rw_din[0] = x_twentieth;
  assign rw_din[1] = x_half;
  assign rw_din[2] = sum;

  mux_latch #(.WIDTH(W), .NIN(3)) u_rw (
    .clk(clk), .rst_n(rst_n),
    .en (c_init | c_iter),
    .sel({c_iter, c_init & ~x_ge_d, c_init & x_ge_d}),
    .din(rw_din),
    .q  (rw)
  );

  logic [W-1:0] rm_din [5];
  assign rm_din[0] = d1;
  assign rm_din[1] = d2;
  assign rm_din[2] = c_three ? sum : r3d;        // 3d straight from the adder in cycle 2
  assign rm_din[3] = d4;
  assign rm_din[4] = d5;

  mux_latch #(.WIDTH(W), .NIN(5)) u_rm (
    .clk(clk), .rst_n(rst_n),
    .en (c_init | c_three | c_iter),
    .sel((c_three | c_iter) ? sel_abs : 5'b00000),
    .din(rm_din),
    .q  (rm)
  );

  logic [W-1:0] r3d_din [1];
  assign r3d_din[0] = sum;

  mux_latch #(.WIDTH(W), .NIN(1)) u_r3d (
    .clk(clk), .rst_n(rst_n), .en(c_three), .sel(1'b1), .din(r3d_din), .q(r3d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                       rs <= 1'b0;
    else if (c_init)                  rs <= 1'b0;     // q_0 = 0
    else if (c_three || c_iter)       rs <= sel_sign;
  end

  // XOR level: -q_i*d without its final unit (the unit is the adder carry-in,
  // set for q_i >= 0). rm holds |q_i|*d, rs the sign of q_i.
  logic [W-1:0] neg_qd;
  assign neg_qd = rs ? rm : ~rm;

  // Narrow copies of the two registers, holding only the leading bits that the
  // selection function reads (sign and digits 0..4). They load the same values
  // as the wide registers, so the selection sees no wide-register fan-out.
  logic [NW-1:0] rw_hi, rm_hi, neg_qd_hi;
  logic [NW-1:0] rw_hi_din [3];
  logic [NW-1:0] rm_hi_din [5];
  for (genvar k = 0; k < 3; k++) begin : g_rw_hi
    assign rw_hi_din[k] = rw_din[k][W-1 -: NW];
  end
  for (genvar k = 0; k < 5; k++) begin : g_rm_hi
    assign rm_hi_din[k] = rm_din[k][W-1 -: NW];
  end

  mux_latch #(.WIDTH(NW), .NIN(3)) u_rw_hi (
    .clk(clk), .rst_n(rst_n),
    .en (c_init | c_iter),
    .sel({c_iter, c_init & ~x_ge_d, c_init & x_ge_d}),
    .din(rw_hi_din),
    .q  (rw_hi)
  );

  mux_latch #(.WIDTH(NW), .NIN(5)) u_rm_hi (
    .clk(clk), .rst_n(rst_n),
    .en (c_init | c_three | c_iter),
    .sel((c_three | c_iter) ? sel_abs : 5'b00000),
    .din(rm_hi_din),
    .q  (rm_hi)
  );

  assign neg_qd_hi = rs ? rm_hi : ~rm_hi;

  // ---- quotient digit selection ------------------------------------------------
  digit_selection #(.N(N)) u_sel (
    .w_prev({rw_hi, {(W-NW){1'b0}}}),
    .neg_qd({neg_qd_hi, {(W-NW){1'b0}}}),
    .first (c_three),
    .m     (m),
    .q_sign(sel_sign),
    .q_abs (sel_abs),
    .q_star(sel_star),
    .q_val (sel_val)
  );

  // quotient digits q*_1..q*_(N+2) and flags s_1..s_(N+2), shifted in
  logic [3:0] qs [N+2];
  logic       sf [N+2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N + 2; i++) begin
        qs[i] <= '0;
        sf[i] <= 1'b0;
      end
    end else if (c_three || (c_iter && cyc <= ($bits(cyc))'(N + 3))) begin
      for (int i = 0; i < N + 1; i++) begin
        qs[i] <= qs[i+1];
        sf[i] <= sf[i+1];
      end
      qs[N+1] <= sel_star;
      sf[N+1] <= sel_sign;
    end
  end

  // ---- final conversion and rounding ---------------------------------------------
  logic borrow, round_inc, round_inexact, w_nonzero;
  logic [W-1:0] qstar_word, s_word;

  assign w_nonzero = (rw != '0);

  rounding_logic u_round (
    .q_n1     (qs[N]),
    .q_n2     (qs[N+1]),
    .s_n2     (sf[N+1]),
    .w_neg    (rw[W-1]),
    .w_nonzero(w_nonzero),
    .mode     (mode_r),
    .borrow   (borrow),
    .inc      (round_inc),
    .inexact  (round_inexact)
  );

  always_comb begin
    qstar_word = '0;
    s_word     = '0;
    for (int j = 1; j <= N; j++) qstar_word[W-2-4*j -: 4] = qs[j-1];
    qstar_word[0] = qs[N][3];
    for (int j = 0; j <= N; j++) s_word[W-2-4*j -: 4] = {3'b000, sf[j]};
    s_word[0] = borrow;
  end

  // ---- the decimal adder and its operand selection ---------------------------------
  logic [W-1:0] add_x, add_y;
  logic         add_cin, add_inc;

  always_comb begin
    add_x   = xw;
    add_y   = ~dw;
    add_cin = 1'b1;
    add_inc = 1'b0;
    if (c_three) begin
      add_x   = d2;
      add_y   = dw;
      add_cin = 1'b0;
    end else if (c_iter) begin
      add_x   = {par5211(rw[W-2 -: 4]), rw[W-6:0], 4'b0000};   // 10*w[i-1], modulo 20
      add_y   = neg_qd;
      add_cin = ~rs;
    end else if (c_final) begin
      add_x   = qstar_word;
      add_y   = ~s_word;
      add_cin = 1'b1;
      add_inc = round_inc;
    end
  end

  qt_decimal_adder #(.N(N)) u_adder (
    .x(add_x), .y(add_y), .cin(add_cin), .inc(add_inc),
    .sum(sum), .cout(add_cout_unused), .sign(add_sign)
  );

  assign x_ge_d = ~add_sign;

  // ---- results -------------------------------------------------------------------
  logic xged_r;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xged_r  <= 1'b0;
      q       <= '0;
      exp_dec <= 1'b0;
      inexact <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= c_final;
      if (c_init) xged_r <= x_ge_d;
      if (c_final) begin
        exp_dec <= ~xged_r;
        inexact <= round_inexact;
        q       <= sum[4*N-1:0];                       // x20: wired 5-bit shift
      end
    end
  end
endmodule
