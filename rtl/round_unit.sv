// round_unit: rounds the 2N-digit product to N digits, round-half-to-even,
// without a shifter.
//
// The product of two N-digit significands has 2N or 2N-1 significant digits
// (inputs with a non-zero MSD). Instead of shifting first, both candidate
// results are rounded in parallel:
//  * path 2 keeps the top N digits FP_(2N-1)..FP_N. G = FP_(N-1) is the
//    first dropped digit, R and the sticky bit Sb cover the rest. It rounds
//    up when G > 5, or G = 5 and (R != 0 or Sb), and on the tie G = 5,
//    R = 0, Sb = 0 when the kept LSD is odd (nearest even).
//  * path 1 keeps the N digits below the MSD, FP_(2N-2)..FP_(N-1), for a
//    product whose MSD is zero (a one-digit left shift). R is then the first
//    dropped digit and Sb covers the rest, with the same rule.
// Each path has an incrementer that always forms the kept digits plus one;
// the round decision picks the truncated or the incremented value. The
// final multiplexer is steered by the MSD of the top N digits that enter
// the path-2 incrementer: non-zero takes path 2, zero takes path 1. The one
// exception is path 1 rounding all nines up; path 2 then gives the same
// value (10^(N-1) one digit higher) and is taken. Steering by the MSD of
// the rounded path-2 result instead would misround products such as
// 0999999|5|0... (path 2 rounds to 1000000 where 9999995 one digit lower is
// exact), so the truncated MSD is used. If path 2 rounds all nines up to
// 10^N, the result is 10^(N-1) with the exponent raised by one.
//
// exp_adj tells the exponent correction relative to keeping the top N
// digits: +1 (carry out of path 2), 0 (path 2) or -1 (path 1, shifted).
// inexact is set when a non-zero digit was dropped. Purely combinational.
module round_unit
  import dfp_pkg::*;
#(
  parameter int unsigned N = DFP32_DIGITS
) (
  input  bcd_t [N-1:0]    hi,      // FP_(2N-1)..FP_N
  input  bcd_t            g,       // FP_(N-1)
  input  bcd_t            r,       // FP_(N-2)
  input  logic            sb,      // OR of FP_(N-3)..FP_0 non-zero
  output bcd_t [N-1:0]    sig,
  output logic signed [1:0] exp_adj,
  output logic            shifted, // path 1 selected
  output logic            inexact
);

  bcd_t [N-1:0] k1, k2;     // truncated candidates
  bcd_t [N-1:0] i1, i2;     // incremented candidates
  bcd_t [N-1:0] r1, r2;     // rounded candidates
  logic         co1, co2, up1, up2, rco2;

  assign k2 = hi;
  assign k1 = {hi[N-2:0], g};


  bcd_incr #(.N(N)) u_incr1 (.a(k1), .y(i1), .cout(co1));
  bcd_incr #(.N(N)) u_incr2 (.a(k2), .y(i2), .cout(co2));

  // Round-half-to-even decisions (first dropped digit, then the rest).
  always_comb begin
    up2 = (g > 4'd5) || (g == 4'd5 && (r != 4'd0 || sb))
       || (g == 4'd5 && r == 4'd0 && !sb && k2[0][0]);
    up1 = (r > 4'd5) || (r == 4'd5 && sb)
       || (r == 4'd5 && !sb && k1[0][0]);
    r2   = up2 ? i2 : k2;
    rco2 = up2 && co2;
    r1   = up1 ? i1 : k1;
  end

  always_comb begin
    if (rco2) begin
      sig          = '0;
      sig[N-1]     = 4'd1;
      exp_adj      = 2'sd1;
      shifted      = 1'b0;
      inexact      = 1'b1;
    end else if (hi[N-1] != 4'd0 || (up1 && co1)) begin
      sig          = r2;
      exp_adj      = 2'sd0;
      shifted      = 1'b0;
      inexact      = (g != 4'd0) || (r != 4'd0) || sb;
    end else begin
      sig          = r1;
      exp_adj      = -2'sd1;
      shifted      = 1'b1;
      inexact      = (r != 4'd0) || sb;
    end
  end

endmodule
