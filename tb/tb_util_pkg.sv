// tb_util_pkg: reference helpers for the divider testbenches.
//
// Converts between signed integers and the divider's 70-bit word layout
// (16-digit configuration). An integer v counts units of 10^-17, so the sign
// bit weighs -10^18, digit j (0..16) weighs 10^(17-j) and the extra low bit
// weighs 5. Encoding picks a random valid BCD-5211 code for every digit so
// that the designs are exercised with non-canonical codes too. None of this
// uses the design's own recoders.
package tb_util_pkg;

  localparam int W = 70;
  localparam longint TEN18 = 64'd1000000000000000000;

  function automatic logic [3:0] rand5211(input int v);
    logic [3:0] opts [$];
    for (int c = 0; c < 16; c++) begin
      int s;
      s = (c[3] ? 5 : 0) + (c[2] ? 2 : 0) + c[1] + c[0];
      if (s == v) opts.push_back(4'(c));
    end
    return opts[$urandom_range(opts.size() - 1)];
  endfunction

  function automatic int v5211(input logic [3:0] c);
    return (c[3] ? 5 : 0) + (c[2] ? 2 : 0) + int'(c[1]) + int'(c[0]);
  endfunction

  function automatic int v4221(input logic [3:0] c);
    return (c[3] ? 4 : 0) + (c[2] ? 2 : 0) + (c[1] ? 2 : 0) + int'(c[0]);
  endfunction

  // v must be a multiple of 5 in [-10^18, 10^18)
  function automatic logic [W-1:0] to_word(input longint v);
    logic [W-1:0] w;
    longint rest, p;
    w        = '0;
    w[W-1]   = (v < 0);
    rest     = (v < 0) ? v + TEN18 : v;
    w[0]     = ((rest % 10) == 5);
    p        = 10;
    for (int j = 16; j >= 0; j--) begin
      w[W-2-4*j -: 4] = rand5211(int'((rest / p) % 10));
      p = p * 10;
    end
    return w;
  endfunction

  function automatic longint from_word(input logic [W-1:0] w);
    longint v, p;
    v = w[0] ? 5 : 0;
    p = 10;
    for (int j = 16; j >= 0; j--) begin
      v = v + longint'(v5211(w[W-2-4*j -: 4])) * p;
      p = p * 10;
    end
    if (w[W-1]) v = v - TEN18;
    return v;
  endfunction

  // wrap an integer into the adder's modulo-20 range [-10^18, 10^18)
  function automatic longint wrap20(input longint v);
    longint m;
    m = v % (2 * TEN18);
    if (m < 0) m += 2 * TEN18;
    if (m >= TEN18) m -= 2 * TEN18;
    return m;
  endfunction

  function automatic longint rand_val();
    longint v;
    v = longint'({$urandom, $urandom}) % (2 * TEN18 / 5);
    if (v < 0) v = -v;
    return v * 5 - TEN18;
  endfunction

  // ---- 18-bit selection-format words: units of 0.005, sign weighs -20000 ----
  function automatic logic [17:0] to_cword(input int v);
    logic [17:0] w;
    int rest;
    w       = '0;
    w[17]   = (v < 0);
    rest    = (v < 0) ? v + 20000 : v;
    w[0]    = rest[0];
    w[4:1]  = rand5211((rest / 2) % 10);
    w[8:5]  = rand5211((rest / 20) % 10);
    w[12:9] = rand5211((rest / 200) % 10);
    w[16:13]= rand5211((rest / 2000) % 10);
    return w;
  endfunction

  function automatic int from_cword(input logic [17:0] w);
    return int'(w[0]) + 2 * v5211(w[4:1]) + 20 * v5211(w[8:5]) + 200 * v5211(w[12:9])
           + 2000 * v5211(w[16:13]) - (w[17] ? 20000 : 0);
  endfunction

endpackage
