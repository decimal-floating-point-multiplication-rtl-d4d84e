// dfp32_decode: unpacks a decimal32 word (IEEE 754-2008, DPD encoding).
//
// Word layout: bit 31 sign, bits 30:20 the 11-bit combination field, bits
// 19:0 two DPD declets holding the six trailing significand digits. The
// combination field carries the two top exponent bits and the most
// significant digit (MSD): if its first two bits are 11 the MSD is 8 or 9
// and the exponent bits follow them, else the MSD is 0..7. A combination
// field starting 11110 is infinity and 11111 a NaN (signalling when the next
// bit is set). The low six exponent bits are bits 25:20.
//
// Output: a dfp32_unpacked_t with the 8-bit biased exponent, seven BCD
// digits and flags for NaN, sNaN, infinity and zero. Purely combinational;
// the multiplier uses it in the first cycle of an operation, together with
// the first partial-product step.
//
// The field layout is the IEEE 754-2008 one; forcing exponent and digits to
// zero for special values is this design's choice.
module dfp32_decode
  import dfp_pkg::*;
(
  input  logic [31:0]     word,
  output dfp32_unpacked_t op
);

  logic [10:0] cf;     // combination field, cf[10] = G0
  logic [1:0]  exp_hi;
  bcd_t        msd;
  logic        special;
  bcd_t [2:0]  dig_hi, dig_lo;

  assign cf = word[30:20];

  dpd_declet_dec u_dec_hi (.declet(word[19:10]), .digits(dig_hi));
  dpd_declet_dec u_dec_lo (.declet(word[9:0]),   .digits(dig_lo));

  always_comb begin
    special = (cf[10:7] == 4'b1111);
    if (cf[10:9] == 2'b11) begin
      exp_hi = cf[8:7];
      msd    = {3'b100, cf[6]};
    end else begin
      exp_hi = cf[10:9];
      msd    = {1'b0, cf[8:6]};
    end

    op.sign    = word[31];
    op.exp     = {exp_hi, cf[5:0]};
    op.sig     = {msd, dig_hi, dig_lo};
    op.is_inf  = special && !cf[6];
    op.is_nan  = special &&  cf[6];
    op.is_snan = special &&  cf[6] && cf[5];
    op.is_zero = !special && (op.sig == '0);
    // Specials carry no significand or exponent for the datapath.
    if (special) begin
      op.exp = '0;
      op.sig = '0;
    end
  end

endmodule
