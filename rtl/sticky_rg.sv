// sticky_rg: forms the sticky bit, round digit and guard digit of an N x N
// digit product on the fly, from the product digits the DFxP multiplier
// retires one per cycle, least significant first.
//
// With the 2N-digit product FP_(2N-1)..FP_0 and rounding to the top N
// digits, the guard digit G is FP_(N-1), the round digit R is FP_(N-2), and
// the sticky bit Sb is the OR of "digit is non-zero" over the N-2 lowest
// digits FP_(N-3)..FP_0. Sb is therefore complete once digit N-3 has
// retired, R one cycle later and G one cycle after that, all before the
// multiplication ends.
//
// Interface and timing: one digit per cycle on col_valid with its index
// col_idx. Index 0 restarts the sticky bit. Outputs are registered and hold
// their value until the next operation's digit 0 arrives.
//
// The digit positions of Sb, R and G follow the rounding scheme; the
// index-driven capture is this design's choice.
module sticky_rg
  import dfp_pkg::*;
#(
  parameter int unsigned N = DFP32_DIGITS,
  localparam int unsigned IDX_W = $clog2(2 * N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             col_valid,
  input  logic [IDX_W-1:0] col_idx,
  input  bcd_t             col_digit,
  output logic             sb,
  output bcd_t             r,
  output bcd_t             g
);

  logic nz;
  assign nz = (col_digit != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb <= 1'b0;
      r  <= '0;
      g  <= '0;
    end else if (col_valid) begin
      if (col_idx == '0)                     sb <= nz;
      else if (col_idx < IDX_W'(N - 2))      sb <= sb | nz;
      if (col_idx == IDX_W'(N - 2))          r  <= col_digit;
      if (col_idx == IDX_W'(N - 1))          g  <= col_digit;
    end
  end

endmodule
