// tb_srt10_divider: end-to-end test of the 16-digit radix-10 divider.
//
// Random and directed divisions are run through the top level at its default
// size (16 digits) and compared with an exact reference computed here on
// 128-bit integers: Q = x/d scaled to [1, 10), remainder, then rounding in the
// selected mode. Operands are given random (non-canonical) BCD-5211 codes;
// the result is read as BCD-4221. Every division must take n+5 = 21 cycles
// from start to done. The test also counts how often the design's mechanisms
// occur (both initial scalings, negative and magnitude-5 digits, a negative
// last residual, a borrow in the quotient conversion, a rounding increment,
// an exact quotient) and fails if one never happens.
module tb_srt10_divider;
  import bcd_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 16;
  localparam int NRAND = 3000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4*N-1:0] x, d, q;
  round_mode_e mode;
  logic busy, done, exp_dec, inexact;
  int checks = 0, failures = 0;
  int n_xged = 0, n_xltd = 0, n_negq = 0, n_q5 = 0, n_wneg = 0, n_borrow = 0,
      n_inc = 0, n_exact = 0;

  srt10_divider dut (.*);

  always #5 clk = ~clk;

  typedef logic [127:0] u128;

  function automatic logic [4*N-1:0] enc_sig(input longint v);
    logic [4*N-1:0] r;
    for (int j = 0; j < N; j++) begin
      r[4*j +: 4] = rand5211(int'(v % 10));
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint dec_sig4221(input logic [4*N-1:0] c);
    longint v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * 10 + longint'(v4221(c[4*j +: 4]));
    return v;
  endfunction

  // mechanism counters, sampled inside the datapath
  always @(posedge clk) begin
    if (dut.c_init) begin
      if (dut.x_ge_d) n_xged++; else n_xltd++;
    end
    if (dut.c_three || (dut.c_iter && dut.cyc <= 5'(N + 3))) begin
      if (dut.sel_sign) n_negq++;
      if (dut.sel_val == 4'sd5 || dut.sel_val == -4'sd5) n_q5++;
    end
    if (dut.c_final) begin
      if (dut.rw[69]) n_wneg++;
      if (dut.borrow) n_borrow++;
      if (dut.round_inc) n_inc++;
      if (!dut.round_inexact) n_exact++;
    end
  end

  task automatic divide(input longint xv, input longint dv, input round_mode_e m);
    u128 num, qi, r, lim;
    longint qexp;
    bit edec, inx, up;
    int cycles;
    // reference
    edec = (xv < dv);
    num  = u128'(xv) * (edec ? u128'(64'd10000000000000000) : u128'(64'd1000000000000000));
    qi   = num / u128'(dv);
    r    = num % u128'(dv);
    inx  = (r != 0);
    unique case (m)
      RND_NEAREST_EVEN: up = (2 * r > u128'(dv)) || (2 * r == u128'(dv) && qi[0]);
      RND_NEAREST_AWAY: up = (2 * r >= u128'(dv));
      RND_TRUNC:        up = 1'b0;
      default:          up = inx;
    endcase
    if (up) qi = qi + 1;
    lim  = 128'd10000000000000000;
    if (qi >= lim) begin
      failures++;                        // cannot happen for normalized operands
      $display("reference rounded to 10: x=%0d d=%0d", xv, dv);
    end
    qexp = longint'(qi);
    // run
    @(negedge clk);
    x = enc_sig(xv);
    d = enc_sig(dv);
    mode = m;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (dec_sig4221(q) != qexp || exp_dec != edec || inexact != inx
        || cycles != N + 5) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d d=%0d mode=%0d q=%0d exp=%0d dec=%0b/%0b inx=%0b/%0b cycles=%0d",
                 xv, dv, m, dec_sig4221(q), qexp, exp_dec, edec, inexact, inx, cycles);
    end
  endtask

  function automatic longint rand_sig();
    longint v;
    v = longint'({$urandom, $urandom} % 64'd9000000000000000) + 64'd1000000000000000;
    return v;
  endfunction

  initial begin
    x = '0; d = '0; mode = RND_NEAREST_EVEN;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed
    divide(64'd1000000000000000, 64'd1000000000000000, RND_NEAREST_EVEN);   // 1/1
    divide(64'd9999999999999999, 64'd1000000000000000, RND_NEAREST_EVEN);
    divide(64'd1000000000000000, 64'd9999999999999999, RND_NEAREST_EVEN);
    divide(64'd1000000000000000, 64'd3000000000000000, RND_NEAREST_EVEN);   // 1/3
    divide(64'd2000000000000000, 64'd3000000000000000, RND_NEAREST_AWAY);
    divide(64'd9999999999999998, 64'd9999999999999999, RND_UP);             // closest to 10
    divide(64'd1000000000000000, 64'd8000000000000000, RND_NEAREST_EVEN);   // 0.125 exact
    divide(64'd5000000000000000, 64'd1000000000000001, RND_TRUNC);
    for (int i = 0; i < NRAND; i++) begin
      round_mode_e m;
      m = round_mode_e'($urandom_range(3));
      case ($urandom_range(3))
        0: divide(rand_sig(), rand_sig(), m);
        1: divide(rand_sig(), 64'd1000000000000000 + longint'($urandom_range(999999)), m);
        2: divide(rand_sig(), 64'd9999999999999999 - longint'($urandom_range(999999)), m);
        default: begin
          longint dv;
          dv = rand_sig();
          divide(dv * longint'($urandom_range(9, 1)) / 10 + 64'd1000000000000000 * longint'($urandom_range(1)), dv, m);
        end
      endcase
    end
    $display("mechanisms: x>=d %0d, x<d %0d, negative digits %0d, |q|=5 %0d, negative last residual %0d, borrow %0d, round increment %0d, exact %0d",
             n_xged, n_xltd, n_negq, n_q5, n_wneg, n_borrow, n_inc, n_exact);
    if (n_xged == 0) failures++;
    if (n_xltd == 0) failures++;
    if (n_negq == 0) failures++;
    if (n_q5 == 0) failures++;
    if (n_wneg == 0) failures++;
    if (n_borrow == 0) failures++;
    if (n_inc == 0) failures++;
    if (n_exact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NRAND + 20) * (N + 8)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
