// exp_adjust_exc: final exponent adjustment and exception setting.
//
// For a finite product the intermediate exponent is corrected by the
// rounding unit's exp_adj (-1, 0, +1). A biased exponent above EMAX means the
// value exceeds the largest number (9999999 x 10^90 for decimal32): the
// result becomes infinity with overflow and inexact. A biased exponent below
// 0 means it is below the smallest number this multiplier represents
// (1000000 x 10^-101): the result becomes zero with underflow and inexact.
// Otherwise inexact is the rounding unit's. A zero product takes the
// exponent E1 + E2 - BIAS (intermediate exponent minus N), clamped into
// 0..EMAX, and raises nothing; NaN and infinity pass through, NaN with the
// invalid flag from the operand check. Purely combinational.
//
// Overflow to infinity and flush to zero on underflow follow the scheme;
// raising inexact with them and the zero-result exponent are this design's
// choices.
module exp_adjust_exc
  import dfp_pkg::*;
#(
  parameter int unsigned N     = DFP32_DIGITS,
  parameter int unsigned EXP_W = DFP32_EXP_W,
  parameter int          EMAX  = DFP32_EMAX_B
) (
  input  dfp_class_t              cls_in,
  input  logic                    invalid_in,
  input  logic signed [EXP_W+2:0] exp_pre,
  input  logic signed [1:0]       exp_adj,
  input  bcd_t [N-1:0]            sig_in,
  input  logic                    inexact_in,
  output dfp_class_t              cls,
  output logic [EXP_W-1:0]        exp,
  output bcd_t [N-1:0]            sig,
  output dfp_flags_t              flags
);

  localparam int unsigned W = EXP_W + 3;

  logic signed [W-1:0] e_fin, e_zero;

  assign e_fin  = exp_pre + W'(exp_adj);
  assign e_zero = exp_pre - W'(N);

  always_comb begin
    cls   = cls_in;
    exp   = '0;
    sig   = '0;
    flags = '0;
    unique case (cls_in)
      CLS_NAN: flags.invalid = invalid_in;
      CLS_INF: ;
      CLS_ZERO: begin
        if (e_zero < 0)                   exp = '0;
        else if (e_zero > W'(EMAX))       exp = EXP_W'(EMAX);
        else                              exp = EXP_W'(e_zero);
      end
      default: begin
        if (e_fin > W'(EMAX)) begin
          cls             = CLS_INF;
          flags.overflow  = 1'b1;
          flags.inexact   = 1'b1;
        end else if (e_fin < 0) begin
          cls             = CLS_ZERO;
          flags.underflow = 1'b1;
          flags.inexact   = 1'b1;
        end else begin
          exp             = EXP_W'(e_fin);
          sig             = sig_in;
          flags.inexact   = inexact_in;
        end
      end
    endcase
  end

endmodule
