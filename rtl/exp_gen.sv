// exp_gen: intermediate exponent and sign of a decimal product.
//
// The product of two significands of N digits has 2N digits; keeping the
// top N of them scales the value by 10^N. The intermediate biased exponent
// is therefore E1 + E2 - BIAS + N, which the rounding step later corrects by
// -1 (result taken one digit lower), 0 or +1 (rounding carried into a new
// digit). The sign is the XOR of the operand signs. The result is signed and
// wide enough for every pair of 8-bit exponents. Purely combinational; the
// multiplier registers it in the first cycle of an operation.
//
// Sign by XOR is the scheme's; the +N form of the exponent is this design's
// way of accounting for the top-N digits kept.
module exp_gen
  import dfp_pkg::*;
#(
  parameter int unsigned N      = DFP32_DIGITS,
  parameter int unsigned EXP_W  = DFP32_EXP_W,
  parameter int          BIAS   = DFP32_BIAS
) (
  input  logic                    s1,
  input  logic                    s2,
  input  logic [EXP_W-1:0]        e1,
  input  logic [EXP_W-1:0]        e2,
  output logic                    sign,
  output logic signed [EXP_W+2:0] exp_pre
);

  assign sign    = s1 ^ s2;
  assign exp_pre = $signed({2'b00, e1}) + $signed({2'b00, e2})
                 - (EXP_W+3)'(BIAS) + (EXP_W+3)'(N);

endmodule
