// dpd_declet_enc: three BCD digits to one Densely Packed Decimal declet.
//
// Follows the IEEE 754-2008 DPD encoding table. The top bit of each digit
// (set only for 8 and 9) picks one of eight layouts: all small digits are
// stored with three bits each and b3 = 0; otherwise b3 = 1 and the pattern
// in b2:b1 (and b6:b5 for two or three large digits) records which digits
// are large. Purely combinational; inputs are assumed to be valid BCD.
module dpd_declet_enc
  import dfp_pkg::*;
(
  input  bcd_t [2:0] digits,   // digits[2] is the most significant
  output logic [9:0] declet
);

  // abcd = digits[2], efgh = digits[1], ijkm = digits[0]
  logic a, b, c, d, e, f, g, h, i, j, k, m;
  assign {a, b, c, d} = digits[2];
  assign {e, f, g, h} = digits[1];
  assign {i, j, k, m} = digits[0];

  always_comb begin
    unique case ({a, e, i})
      3'b000: declet = {b, c, d, f, g, h, 1'b0, j, k, m};
      3'b001: declet = {b, c, d, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: declet = {b, c, d, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b011: declet = {b, c, d, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b100: declet = {j, k, d, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b101: declet = {f, g, d, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b110: declet = {j, k, d, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: declet = {1'b0, 1'b0, d, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  end

endmodule
