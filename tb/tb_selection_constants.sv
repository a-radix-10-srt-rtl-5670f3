// tb_selection_constants: for every divisor estimate d_hat = 1.00 .. 9.99
// (random 5211 codes) the constants must be exactly m_k = (k - 0.5)*d_hat,
// k = 1..5, read from the 18-bit selection format.
module tb_selection_constants;
  import tb_util_pkg::*;

  logic [11:0] d_hat;
  logic [17:0] m [1:5];
  int checks = 0, failures = 0;

  selection_constants dut (.d_hat(d_hat), .m(m));

  initial begin
    for (int dh = 100; dh < 1000; dh++) begin
      d_hat = {rand5211(dh / 100), rand5211((dh / 10) % 10), rand5211(dh % 10)};
      #1;
      for (int k = 1; k <= 5; k++) begin
        // (k - 0.5) * dh/100 in units of 0.005 = (2k - 1) * dh
        checks++;
        if (from_cword(m[k]) != (2 * k - 1) * dh) begin
          failures++;
          if (failures < 10) $display("FAIL d_hat=%0d k=%0d got %0d", dh, k, from_cword(m[k]));
        end
      end
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
