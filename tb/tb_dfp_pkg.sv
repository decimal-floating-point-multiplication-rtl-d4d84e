// tb_dfp_pkg: reference functions for the decimal32 multiplier testbenches.
//
// Everything here is written independently of the RTL: DPD encoding uses the
// Boolean equations of the IEEE 754-2008 DPD scheme (not the layout table the
// RTL uses), significands are handled as plain integers, and rounding is done
// on integers with round-half-to-even.
package tb_dfp_pkg;

  // Integer value of n BCD digits held in a packed vector (digit 0 lowest).
  function automatic longint unsigned bcd2int(input logic [127:0] v, input int n);
    longint unsigned r = 0;
    for (int d = n - 1; d >= 0; d--) r = r * 10 + longint'(v[4*d +: 4]);
    return r;
  endfunction

  function automatic logic [63:0] int2bcd(input longint unsigned x, input int n);
    logic [63:0] v = '0;
    for (int d = 0; d < n; d++) begin
      v[4*d +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return v;
  endfunction

  // Random n-digit integer; msd_nz forces a non-zero leading digit.
  function automatic longint unsigned rand_digits(input int n, input bit msd_nz);
    longint unsigned r = 0;
    for (int d = 0; d < n; d++) begin
      int unsigned t;
      t = (d == 0 && msd_nz) ? $urandom_range(9, 1) : $urandom_range(9);
      r = r * 10 + longint'(t);
    end
    return r;
  endfunction

  // Three digits (0..999) to a DPD declet, by the encoding equations.
  function automatic logic [9:0] dpd_enc(input int unsigned v);
    logic [3:0] d2, d1, d0;
    logic a, b, c, d, e, f, g, h, i, j, k, m;
    logic p, q, r, s, t, u, vv, w, x, y;
    d2 = 4'(v / 100); d1 = 4'((v / 10) % 10); d0 = 4'(v % 10);
    {a, b, c, d} = d2; {e, f, g, h} = d1; {i, j, k, m} = d0;
    p  = b | (a & j) | (a & f & i);
    q  = c | (a & k) | (a & g & i);
    r  = d;
    s  = (f & (~a | ~i)) | (~a & e & j) | (e & i);
    t  = g | (~a & e & k) | (a & i);
    u  = h;
    vv = a | e | i;
    w  = a | (e & i) | (~e & j);
    x  = e | (a & i) | (~a & k);
    y  = m;
    return {p, q, r, s, t, u, vv, w, x, y};
  endfunction

  // A finite decimal32 word from sign, biased exponent and 7-digit integer.
  function automatic logic [31:0] d32_word(input bit sign, input int unsigned e,
                                           input longint unsigned c);
    int unsigned msd = int'(c / 1000000);
    int unsigned hi3 = int'((c / 1000) % 1000);
    int unsigned lo3 = int'(c % 1000);
    logic [10:0] cf;
    logic [7:0]  ex = 8'(e);
    if (msd >= 8) cf = {2'b11, ex[7:6], 1'(msd & 1), ex[5:0]};
    else          cf = {ex[7:6], 3'(msd), ex[5:0]};
    return {sign, cf, dpd_enc(hi3), dpd_enc(lo3)};
  endfunction

  function automatic logic [31:0] d32_inf(input bit sign);
    return {sign, 5'b11110, 26'd0};
  endfunction

  function automatic logic [31:0] d32_qnan(input bit sign);
    return {sign, 6'b111110, 25'd0};
  endfunction

  function automatic logic [31:0] d32_snan(input bit sign);
    return {sign, 6'b111111, 25'd0};
  endfunction

endpackage
