// tb_divisor_multiples: random 16-digit divisors in [1, 10) with random
// BCD-5211 codes; the outputs must equal d, 2d, 4d and 5d modulo 20
// (the divider's word arithmetic), checked with integer arithmetic.
module tb_divisor_multiples;
  import tb_util_pkg::*;

  logic [W-1:0] d, d1, d2, d4, d5;
  int checks = 0, failures = 0;

  divisor_multiples dut (.*);

  task automatic chk(input longint got, input longint expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint dv;
      dv = (longint'({$urandom, $urandom} % 64'd9000000000000000) + 64'd1000000000000000) * 100;
      if (i == 0) dv = 64'd999999999999999900;
      if (i == 1) dv = 64'd100000000000000000;
      d = to_word(dv);
      #1;
      chk(from_word(d1), dv, "1d");
      chk(from_word(d2), wrap20(2 * dv), "2d");
      chk(from_word(d4), wrap20(4 * dv), "4d");
      chk(from_word(d5), wrap20(5 * dv), "5d");
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
