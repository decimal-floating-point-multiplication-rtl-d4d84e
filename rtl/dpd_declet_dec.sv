// dpd_declet_dec: one Densely Packed Decimal declet (10 bits) to three BCD
// digits.
//
// Decoding follows the IEEE 754-2008 DPD table. Bit b3 tells whether all
// three digits are small (0..7, three bits each). Otherwise b2:b1 and, for
// the case of two or three large digits, b6:b5 say which digits are large
// (8 or 9); a large digit keeps only its low bit in the declet. The six
// non-canonical declets decode like their canonical twins. Purely
// combinational.
module dpd_declet_dec
  import dfp_pkg::*;
(
  input  logic [9:0] declet,
  output bcd_t [2:0] digits   // digits[2] is the most significant
);

  logic [9:0] b;
  assign b = declet;

  always_comb begin
    if (!b[3]) begin
      digits[2] = {1'b0, b[9:7]};
      digits[1] = {1'b0, b[6:4]};
      digits[0] = {1'b0, b[2:0]};
    end else begin
      unique case (b[2:1])
        2'b00: begin
          digits[2] = {1'b0, b[9:7]};
          digits[1] = {1'b0, b[6:4]};
          digits[0] = {3'b100, b[0]};
        end
        2'b01: begin
          digits[2] = {1'b0, b[9:7]};
          digits[1] = {3'b100, b[4]};
          digits[0] = {1'b0, b[6:5], b[0]};
        end
        2'b10: begin
          digits[2] = {3'b100, b[7]};
          digits[1] = {1'b0, b[6:4]};
          digits[0] = {1'b0, b[9:8], b[0]};
        end
        default: begin
          unique case (b[6:5])
            2'b00: begin
              digits[2] = {3'b100, b[7]};
              digits[1] = {3'b100, b[4]};
              digits[0] = {1'b0, b[9:8], b[0]};
            end
            2'b01: begin
              digits[2] = {3'b100, b[7]};
              digits[1] = {1'b0, b[9:8], b[4]};
              digits[0] = {3'b100, b[0]};
            end
            2'b10: begin
              digits[2] = {1'b0, b[9:7]};
              digits[1] = {3'b100, b[4]};
              digits[0] = {3'b100, b[0]};
            end
            default: begin
              digits[2] = {3'b100, b[7]};
              digits[1] = {3'b100, b[4]};
              digits[0] = {3'b100, b[0]};
            end
          endcase
        end
      endcase
    end
  end

endmodule
