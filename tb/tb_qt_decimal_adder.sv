// tb_qt_decimal_adder: self-checking test of the 70-bit decimal adder.
// Random words (random 5211 codes per digit) are added and subtracted with
// every combination of carry-in and increment; the result is compared, as a
// value modulo 20, with integer arithmetic. Directed cases cover long
// all-nines carry chains where the carry-in and the increment meet.
module tb_qt_decimal_adder;
  import tb_util_pkg::*;

  logic [W-1:0] x, y, sum;
  logic         cin, inc, cout, sign;
  int checks = 0, failures = 0;

  qt_decimal_adder dut (.x(x), .y(y), .cin(cin), .inc(inc), .sum(sum), .cout(cout), .sign(sign));

  task automatic check(input longint xv, input longint yv, input bit sub, input bit ci, input bit in);
    longint expv, got;
    x   = to_word(xv);
    y   = to_word(yv);
    if (sub) y = ~y;                   // 9's complement: value -yv - 5
    cin = ci;
    inc = in;
    #1;
    expv = wrap20((sub ? (xv - yv - 5) : (xv + yv)) + 5 * longint'(ci) + 5 * longint'(in));
    got  = from_word(sum);
    checks++;
    if (got != expv || sign != (expv < 0)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d sub=%0b cin=%0b inc=%0b got=%0d exp=%0d", xv, yv, sub, ci, in, got, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++)
      check(rand_val(), rand_val(), 1'($urandom), 1'($urandom), 1'($urandom));
    // carry chains: x = 0.999..95, y = 0 / small
    check(TEN18 - 5, 0, 0, 1, 1);
    check(TEN18 - 10, 0, 0, 1, 1);
    check(TEN18 / 2 - 5, TEN18 / 2 - 5, 0, 1, 1);
    check(TEN18 / 2 - 10, TEN18 / 2 - 5, 0, 1, 1);
    check(123456789, 123456789, 1, 1, 0);
    check(5, 5, 1, 1, 0);
    check(-TEN18, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
