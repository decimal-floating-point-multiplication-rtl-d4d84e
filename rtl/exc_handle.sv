// exc_handle: decides the class of a product from the operands' special
// values, before any arithmetic result is known.
//
// Rules, in priority order:
//  * either operand NaN            -> NaN; invalid if either is a signalling NaN
//  * infinity times zero           -> NaN, invalid
//  * infinity times anything else  -> infinity
//  * zero times a finite number    -> zero
//  * otherwise                     -> finite, computed by the datapath
// The sign of the result is handled elsewhere (XOR of the operand signs).
// Overflow, underflow and inexact can only come from a finite product and
// are set after rounding. Purely combinational.
//
// The rules are those of IEEE 754-2008 for multiplication; the class
// encoding is this design's.
module exc_handle
  import dfp_pkg::*;
(
  input  dfp32_unpacked_t op1,
  input  dfp32_unpacked_t op2,
  output dfp_class_t      cls,
  output logic            invalid
);

  always_comb begin
    invalid = 1'b0;
    if (op1.is_nan || op2.is_nan) begin
      cls     = CLS_NAN;
      invalid = op1.is_snan || op2.is_snan;
    end else if ((op1.is_inf && op2.is_zero) || (op2.is_inf && op1.is_zero)) begin
      cls     = CLS_NAN;
      invalid = 1'b1;
    end else if (op1.is_inf || op2.is_inf) begin
      cls = CLS_INF;
    end else if (op1.is_zero || op2.is_zero) begin
      cls = CLS_ZERO;
    end else begin
      cls = CLS_FINITE;
    end
  end

endmodule
