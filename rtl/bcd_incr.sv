// bcd_incr: adds one to an N-digit BCD number.
//
// A carry ripples up from the least significant digit: each digit that is
// 9 while the carry reaches it becomes 0 and passes the carry on, the first
// digit below 9 is incremented and stops it. The carry out of the top digit
// is set only when the input is all nines (the result is then all zeros).
// Purely combinational. The rounding unit uses two of these, one for the top
// N product digits and one for the N digits below the MSD.
//
// The two incrementers are part of the rounding scheme; their rippling
// structure is this design's choice.
module bcd_incr
  import dfp_pkg::*;
#(
  parameter int unsigned N = DFP32_DIGITS
) (
  input  bcd_t [N-1:0] a,
  output bcd_t [N-1:0] y,
  output logic         cout
);

  always_comb begin
    logic c;
    c = 1'b1;
    for (int unsigned d = 0; d < N; d++) begin
      if (c && a[d] == 4'd9) begin
        y[d] = 4'd0;
      end else begin
        y[d] = a[d] + 4'(c);
        c    = 1'b0;
      end
    end
    cout = c;
  end

endmodule
