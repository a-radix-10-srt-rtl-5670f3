// tb_digit_selection: random divisors, residuals and previous digits shaped
// like a real recurrence step (w[i-1] = (w[i] + q_i*d)/10 with |w[i]| <= 5/9 d).
// The reference truncates the two estimate words itself, adds them as true
// (not modular) values and picks the digit from the thresholds
// m_k = (k-0.5)*d_hat (k = 1..5) and m_k = -m_(1-k) - 0.005 (k <= 0); the design's
// digit, sign, one-hot magnitude and 5211 digit q* must all match it. The
// first-step mode (estimate 10*w[0], no multiple) is tested as well.
module tb_digit_selection;
  import tb_util_pkg::*;

  logic [W-1:0] w_prev, neg_qd;
  logic first;
  logic [17:0] m [1:5];
  logic q_sign;
  logic [4:0] q_abs;
  logic [3:0] q_star;
  logic signed [3:0] q_val;
  int checks = 0, failures = 0;

  digit_selection dut (.*);

  function automatic int dg(input logic [W-1:0] v, input int j);
    return v5211(v[W-2-4*j -: 4]);
  endfunction

  function automatic int top2(input logic [W-1:0] v, input int j);
    return (v[W-2-4*j] ? 5 : 0) + (v[W-3-4*j] ? 2 : 0);
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint dv, wi, wprev, qd;
      int dh, qi, est, expq, a_est, b_est;
      dv = (longint'({$urandom, $urandom} % 64'd9000000000000000) + 64'd1000000000000000) * 100;
      dh = int'(dv / 64'd1000000000000000);                     // d_hat in hundredths
      first = ($urandom_range(9) == 0);
      qi = first ? 0 : int'($urandom_range(10)) - 5;
      wi = (longint'({$urandom, $urandom} % 64'd1000000000000000) * (dv / 64'd1000000000000000)) / 900 * 5 / 10 * 10;
      if ($urandom_range(1)) wi = -wi;
      if (first) begin
        wprev = (longint'({$urandom, $urandom} % 64'd50000000000000000)) / 10 * 10;
        neg_qd = to_word(-5);
      end else begin
        wprev = (wi + longint'(qi) * dv) / 100 * 10;
        qd = -longint'(qi) * dv;
        neg_qd = to_word(wrap20(qi >= 0 ? qd - 5 : qd));
      end
      w_prev = to_word(wprev);
      for (int k = 1; k <= 5; k++) m[k] = to_cword((2 * k - 1) * dh);
      #1;
      // reference estimate in units of 0.005
      if (first) begin
        a_est = (w_prev[W-1] ? -20000 : 0) + 2000 * dg(w_prev, 0) + 200 * dg(w_prev, 1)
              + 20 * dg(w_prev, 2) + 2 * top2(w_prev, 3);
        b_est = 0;
      end else begin
        a_est = -200000 * int'(w_prev[W-1]) + 20000 * dg(w_prev, 0) + 2000 * dg(w_prev, 1)
              + 200 * dg(w_prev, 2) + 20 * dg(w_prev, 3) + 2 * top2(w_prev, 4);
        b_est = (neg_qd[W-1] ? -20000 : 0) + 2000 * dg(neg_qd, 0) + 200 * dg(neg_qd, 1)
              + 20 * dg(neg_qd, 2) + 2 * top2(neg_qd, 3);
      end
      // both words are kept modulo 200; the estimate itself is within +-60
      est  = (a_est + b_est) % 40000;
      if (est < -20000) est += 40000;
      if (est >= 20000) est -= 40000;
      expq = -5;
      for (int k = -4; k <= 5; k++) begin
        int mk;
        mk = (k > 0) ? (2 * k - 1) * dh : -(2 * (1 - k) - 1) * dh - 1;
        if (est >= mk) expq = k;
      end
      checks++;
      if (q_val != 4'(expq) || q_sign != (expq < 0)
          || q_abs != ((expq == 0) ? 5'b0 : 5'(1) << ((expq < 0 ? -expq : expq) - 1))
          || v5211(q_star) != ((expq < 0) ? expq + 10 : expq)) begin
        failures++;
        if (failures < 10) $display("FAIL est=%0d d_hat=%0d first=%0b q=%0d expected %0d", est, dh, first, q_val, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
