// small_dec_adder: short BCD-4221 decimal adder for the selection constants.
//
// Adds two ND-digit BCD-4221 vectors and a carry-in; the result is BCD-4221
// and the carry-out of the top digit is dropped (the callers know their
// results fit). Each digit forms its binary sum from the digit values and the
// carries ripple from digit to digit. The document builds these adders (11
// and 13 bits wide) like the main adder; a ripple chain over four digits is
// this design's simpler choice for them. Purely combinational.
module small_dec_adder
  import bcd_pkg::*;
#(
  parameter int unsigned ND = 4
) (
  input  logic [4*ND-1:0] a,
  input  logic [4*ND-1:0] b,
  input  logic            cin,
  output logic [4*ND-1:0] s
);
  always_comb begin
    logic       c;
    logic [4:0] t;
    c = cin;
    for (int i = 0; i < ND; i++) begin
      t = {1'b0, val4221(a[4*i +: 4])} + {1'b0, val4221(b[4*i +: 4])} + {4'b0, c};
      c = (t >= 5'd10);
      if (c) t = t - 5'd10;
      s[4*i +: 4] = enc4221(t[3:0]);
    end
  end
endmodule
