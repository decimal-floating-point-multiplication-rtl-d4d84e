// dfp_pkg: types and constants shared by the decimal32 floating-point
// multiplier.
//
// decimal32 (IEEE 754-2008, DPD encoding) carries a 7-digit significand, an
// 8-bit biased exponent (bias 101, biased range 0..191, i.e. unbiased
// -101..+90) and a sign. Values are written v = (-1)^s x C x 10^q with an
// integer significand C. The multiplier works on unpacked operands: a sign,
// the biased exponent, seven BCD digits and flags for the special values.
package dfp_pkg;

  // decimal32 format constants
  localparam int unsigned DFP32_DIGITS = 7;    // P_limit
  localparam int unsigned DFP32_EXP_W  = 8;    // biased exponent width
  localparam int          DFP32_BIAS   = 101;
  localparam int          DFP32_EMAX_B = 191;  // largest biased exponent

  // One binary-coded decimal digit, 0..9.
  typedef logic [3:0] bcd_t;

  // Operand after DPD decoding.
  typedef struct packed {
    logic                           sign;
    logic [DFP32_EXP_W-1:0]         exp;      // biased exponent
    bcd_t [DFP32_DIGITS-1:0]        sig;      // sig[DFP32_DIGITS-1] is the MSD
    logic                           is_nan;   // quiet or signalling NaN
    logic                           is_snan;  // signalling NaN
    logic                           is_inf;
    logic                           is_zero;  // finite with significand 0
  } dfp32_unpacked_t;

  // Class of a result before the exponent is checked.
  typedef enum logic [1:0] {
    CLS_FINITE = 2'd0,
    CLS_ZERO   = 2'd1,
    CLS_INF    = 2'd2,
    CLS_NAN    = 2'd3
  } dfp_class_t;

  // IEEE 754-2008 exception flags a multiplication can raise.
  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } dfp_flags_t;

endpackage
