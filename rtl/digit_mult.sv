// digit_mult: single-digit decimal multiplier, one BCD digit times another
// giving a two-digit BCD product (0..81).
//
// The two digits are multiplied as 4-bit binary numbers and the 7-bit binary
// product is split into a tens and a units digit by comparing it with the
// multiples of ten. This is a plain binary-multiply-and-correct structure; it
// gives the same digits as the faster single-digit multiplier the RPS
// multiplier is built from, whose insides are not reproduced here. Purely
// combinational. Inputs are assumed to be valid BCD digits (0..9).
module digit_mult
  import dfp_pkg::*;
(
  input  bcd_t x,
  input  bcd_t y,
  output bcd_t hi,   // tens digit, 0..8
  output bcd_t lo    // units digit, 0..9
);

  logic [6:0] p;

  always_comb begin
    p  = 7'(x) * 7'(y);
    hi = '0;
    for (int t = 8; t >= 1; t--) begin
      if (hi == '0 && p >= 7'(10 * t)) hi = 4'(t);
    end
    lo = 4'(p - 7'(hi) * 7'd10);
  end

endmodule
