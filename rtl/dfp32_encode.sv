// dfp32_encode: packs a decimal32 result into its IEEE 754-2008 DPD word.
//
// A finite result (class CLS_FINITE or CLS_ZERO) is written from its sign,
// 8-bit biased exponent (0..191) and seven BCD digits: an MSD of 8 or 9 puts
// 11 in front of the two top exponent bits and keeps only the MSD's low bit;
// the six trailing digits become two DPD declets. Infinity is written as the
// combination field 11110 with all other field bits zero; a NaN result is the
// quiet NaN 11111 0 with a zero payload and the sign given. Purely
// combinational; it is the last stage of the multiplier's final cycle.
//
// The zero NaN payload and the all-zero infinity fields are this design's
// choice; the layout is the IEEE 754-2008 one.
module dfp32_encode
  import dfp_pkg::*;
(
  input  logic                    sign,
  input  logic [DFP32_EXP_W-1:0]  exp,
  input  bcd_t [DFP32_DIGITS-1:0] sig,
  input  dfp_class_t              cls,
  output logic [31:0]             word
);

  logic [9:0]  dec_hi, dec_lo;
  logic [10:0] cf;
  bcd_t        msd;

  assign msd = sig[6];

  dpd_declet_enc u_enc_hi (.digits(sig[5:3]), .declet(dec_hi));
  dpd_declet_enc u_enc_lo (.digits(sig[2:0]), .declet(dec_lo));

  always_comb begin
    if (msd[3]) cf = {2'b11, exp[7:6], msd[0], exp[5:0]};
    else        cf = {exp[7:6], msd[2:0], exp[5:0]};

    unique case (cls)
      CLS_INF: word = {sign, 5'b11110, 26'd0};
      CLS_NAN: word = {sign, 6'b111110, 25'd0};
      default: word = {sign, cf, dec_hi, dec_lo};
    endcase
  end

endmodule
