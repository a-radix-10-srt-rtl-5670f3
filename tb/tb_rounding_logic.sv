// tb_rounding_logic: exhaustive check over the last two quotient digits, the
// sign flag of the last digit, the sign and zero-ness of the last residual
// and all four rounding modes. The reference forms the quotient tail below
// the kept part as an exact value (in units of 10^-(n+2), with the residual
// fraction counted as a half unit of "something more"), derives the borrow
// from its sign and rounds by comparing twice the remainder with the unit.
module tb_rounding_logic;
  import bcd_pkg::*;
  import tb_util_pkg::*;

  logic [3:0] q_n1, q_n2;
  logic s_n2, w_neg, w_nonzero, borrow, inc, inexact;
  round_mode_e mode;
  int checks = 0, failures = 0;

  rounding_logic dut (.*);

  // canonical 5211 codes, written out independently of the package
  localparam logic [3:0] C5211 [10] = '{4'b0000, 4'b0001, 4'b0100, 4'b0101, 4'b0111,
                                          4'b1000, 4'b1001, 4'b1100, 4'b1101, 4'b1111};

  initial begin
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++)
        for (int f = 0; f < 8; f++)
          for (int m = 0; m < 4; m++) begin
            int tail, twice, kept_bit;
            bit exp_b, exp_inc, exp_inx;
            if (f[1] && !f[2]) continue;      // a negative residual is never zero
            q_n1 = C5211[a];
            q_n2 = C5211[b];
            s_n2 = f[0];
            w_neg = f[1];
            w_nonzero = f[2];
            mode = round_mode_e'(m);
            tail = (a % 5) * 10 + b - 10 * int'(s_n2) - int'(w_neg);
            exp_b = (tail < 0);
            if (exp_b) tail += 50;
            twice = 2 * tail + (w_nonzero ? 1 : 0);  // remainder vs. unit (= 100 in these units)
            kept_bit = ((a >= 5 ? 1 : 0) + (exp_b ? 1 : 0)) % 2;
            case (m)
              0: exp_inc = (twice > 50) || (twice == 50 && kept_bit == 1);
              1: exp_inc = (twice >= 50);
              2: exp_inc = 1'b0;
              default: exp_inc = (twice > 0);
            endcase
            exp_inx = (twice > 0);
            #1;
            checks++;
            if (borrow != exp_b || inc != exp_inc || inexact != exp_inx) begin
              failures++;
              if (failures < 10)
                $display("FAIL a=%0d b=%0d f=%0d m=%0d: borrow %0b/%0b inc %0b/%0b inexact %0b/%0b",
                         a, b, f, m, borrow, exp_b, inc, exp_inc, inexact, exp_inx);
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
