// tb_bcd_pkg: checks every digit table of bcd_pkg against the code weights.
// For each of the 16 codes the value tables must equal the weighted bit sum,
// every recoder must keep the value, and every encoder must produce a code of
// the requested value (and the canonical 5211 code must set its 5-bit exactly
// for values of 5 and above, which the rounding logic relies on).
module tb_bcd_pkg;
  import bcd_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  function automatic int w5421(input logic [3:0] c);
    return (c[3] ? 5 : 0) + int'(c[2:0]);
  endfunction

  initial begin
    for (int c = 0; c < 16; c++) begin
      logic [3:0] cc;
      cc = 4'(c);
      expect_eq(int'(val5211(cc)), v5211(cc), "val5211");
      expect_eq(int'(val4221(cc)), v4221(cc), "val4221");
      expect_eq(v4221(r5211_to_4221(cc)), v5211(cc), "r5211_to_4221");
      expect_eq(v5211(r4221_to_5211(cc)), v4221(cc), "r4221_to_5211");
      expect_eq(w5421(r5211_to_5421(cc)), v5211(cc), "r5211_to_5421");
      expect_eq(int'(par5211(cc)), v5211(cc) % 2, "par5211");
      if (c[2:0] <= 4) expect_eq(v5211(r5421_to_5211(cc)), w5421(cc), "r5421_to_5211");
    end
    for (int v = 0; v < 10; v++) begin
      expect_eq(v5211(enc5211(4'(v))), v, "enc5211");
      expect_eq(v4221(enc4221(4'(v))), v, "enc4221");
      expect_eq(w5421(enc5421(4'(v))), v, "enc5421");
      expect_eq(int'(enc5211(4'(v))) >> 3, (v >= 5) ? 1 : 0, "enc5211 5-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
