// dec_carry_prefix: quaternary (radix-4) parallel-prefix carry tree.
//
// Each position i supplies a carry generate g[i] (the position produces a
// carry-out whatever its carry-in) and a carry alive a[i] (it produces a
// carry-out if its carry-in is 1; a[i] includes g[i]). The tree combines
// groups four at a time per level (Kogge-Stone style, ceil(log4(D)) levels)
// and returns the carry into every position, c[i], together with the group
// alive signals alive_grp[i] = a[i-1] & ... & a[0] (alive_grp[0] = 1).
// Positions may be decimal digits or single binary bits: the tree does not
// care, which is why the decimal adder and the comparator sign detector share
// it. The document builds a sparse quaternary tree; this one is dense, which
// gives the same carries.
// Purely combinational.
module dec_carry_prefix #(
  parameter int unsigned D = 18
) (
  input  logic [D-1:0] g,
  input  logic [D-1:0] a,
  input  logic         cin,
  output logic [D:0]   c,          // c[0] = cin, c[D] = carry-out
  output logic [D:0]   alive_grp   // alive_grp[i]: all positions below i are alive
);
  localparam int unsigned LEVELS = (D <= 1) ? 1 : ($clog2(D) + 1) / 2;

  // gl[l][i], al[l][i]: group generate / alive of positions i down to
  // max(0, i - 4^l + 1)
  logic [LEVELS:0][D-1:0] gl, al;
  logic [D-1:0]           g_top, a_top;

  assign gl[0] = g;
  assign al[0] = a;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned S = 4 ** l;
    for (genvar i = 0; i < D; i++) begin : g_pos
      if (i >= 3 * S) begin : g_four
        assign gl[l+1][i] = gl[l][i] | (al[l][i] & gl[l][i-S])
                          | (al[l][i] & al[l][i-S] & gl[l][i-2*S])
                          | (al[l][i] & al[l][i-S] & al[l][i-2*S] & gl[l][i-3*S]);
        assign al[l+1][i] = al[l][i] & al[l][i-S] & al[l][i-2*S] & al[l][i-3*S];
      end else if (i >= 2 * S) begin : g_three
        assign gl[l+1][i] = gl[l][i] | (al[l][i] & gl[l][i-S])
                          | (al[l][i] & al[l][i-S] & gl[l][i-2*S]);
        assign al[l+1][i] = al[l][i] & al[l][i-S] & al[l][i-2*S];
      end else if (i >= S) begin : g_two
        assign gl[l+1][i] = gl[l][i] | (al[l][i] & gl[l][i-S]);
        assign al[l+1][i] = al[l][i] & al[l][i-S];
      end else begin : g_one
        assign gl[l+1][i] = gl[l][i];
        assign al[l+1][i] = al[l][i];
      end
    end
  end

  assign g_top = gl[LEVELS];
  assign a_top = al[LEVELS];

  always_comb begin
    c[0]         = cin;
    alive_grp[0] = 1'b1;
    for (int i = 0; i < D; i++) begin
      c[i+1]         = g_top[i] | (a_top[i] & cin);
      alive_grp[i+1] = a_top[i];
    end
  end
endmodule
