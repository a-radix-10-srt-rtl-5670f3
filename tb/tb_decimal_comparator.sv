// tb_decimal_comparator: random selection-format operands whose sum stays in
// the comparator's range; ge must be 1 exactly when a + b + c + cin >= 0.
// Values near zero are favoured so that the decision is often close.
module tb_decimal_comparator;
  import tb_util_pkg::*;

  logic [17:0] a, b, c;
  logic cin, ge;
  int checks = 0, failures = 0;

  decimal_comparator dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int av, bv, cv, tot;
      av  = int'($urandom_range(19998)) - 9999;
      bv  = int'($urandom_range(19998)) - 9999;
      cv  = ($urandom_range(1)) ? -av - bv + int'($urandom_range(6)) - 3 : int'($urandom_range(19998)) - 9999;
      if (cv < -20000 || cv >= 20000) cv = 0;
      cin = 1'($urandom);
      tot = av + bv + cv + int'(cin);
      if (tot < -20000 || tot >= 20000) continue;
      a = to_cword(av);
      b = to_cword(bv);
      c = to_cword(cv);
      #1;
      checks++;
      if (ge != (tot >= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d cin=%0b ge=%0b", av, bv, cv, cin, ge);
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
