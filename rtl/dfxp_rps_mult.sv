// dfxp_rps_mult: iterative N-digit x N-digit decimal fixed-point (DFxP)
// multiplier that builds the 2N-digit product column by column from the
// least significant end and retires one final product digit per cycle.
//
// How it works. Each iteration multiplies the whole multiplicand A by one
// multiplier digit b_i with N single-digit multipliers. Every digit product
// a_j*b_i is split into its units digit L_j (column j) and tens digit H_j
// (column j+1), and both are added column by column into a decimal
// carry-save accumulator: per column a sum digit s_j (0..9) and an incoming
// carry c_j (0..2). A column total s_j + c_j + L_j + H_(j-1) is at most 28,
// so each column only forms its own digit and a carry of 0..2 for the
// column above; no carry runs along the accumulator inside the loop. Column
// 0 then receives nothing more, so its digit is a final product digit: it
// is retired (shifted out) and the accumulator moves down one column. After
// N iterations the low N product digits FP_(N-1)..FP_0 have been retired and
// one more cycle adds the sum and carry digits of the upper N columns with a
// rippling decimal adder. The final product is therefore ready after N+1
// cycles. The retiring digit and its index are put out each iteration so the
// sticky bit, round digit and guard digit can be formed while the
// multiplication is still running.
//
// The RPS algorithm this follows is only characterised by its behaviour
// (partial products generated for column accumulation from the least
// significant end, final product in N+1 cycles); the carry-save column
// accumulator above is this design's own way to meet that behaviour.
//
// Interface and timing. start is taken when ready is high, together with a
// and b. The cycle in which start is taken is iteration 1 (it uses a and
// b[0] directly), iterations 2..N follow, and cycle N+1 is the final
// addition. done is high for one cycle after that, with prod holding the
// product; prod stays until the next start is taken. ready is high again in
// the cycle done is high, so a new operation can start every N+1 cycles.
// col_valid/col_idx/col_digit report, combinationally, the digit retired in
// the current iteration (it is final; index 0 is the least significant).
module dfxp_rps_mult
  import dfp_pkg::*;
#(
  parameter int unsigned N = DFP32_DIGITS,
  localparam int unsigned IDX_W = $clog2(2 * N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  bcd_t [N-1:0]     a,
  input  bcd_t [N-1:0]     b,
  output logic             ready,
  output logic             col_valid,
  output logic [IDX_W-1:0] col_idx,
  output bcd_t             col_digit,
  output logic             done,
  output bcd_t [2*N-1:0]   prod
);

  localparam int unsigned CNT_W = $clog2(N + 1);

  logic             busy_q;
  logic [CNT_W-1:0] cnt_q;      // iterations completed
  logic             done_q;
  bcd_t [N-1:0]     a_q, b_q;
  bcd_t [N-1:0]     s_q;        // carry-save accumulator: sum digits
  logic [N-1:0][1:0] c_q;       // carry-save accumulator: carries 0..2
  bcd_t [N-1:0]     lo_q;       // retired digits FP_(N-1)..FP_0
  bcd_t [N-1:0]     hi_q;       // upper product digits FP_(2N-1)..FP_N

  logic             take, iter, cpa;
  bcd_t [N-1:0]     a_cur, s_cur;
  logic [N-1:0][1:0] c_cur;
  bcd_t             b_dig;
  bcd_t [N-1:0]     pp_hi, pp_lo;
  bcd_t [N:0]       col_d;
  logic [N:0][1:0]  col_q;
  bcd_t [N-1:0]     sum_hi;
  logic             cpa_cout;

  assign ready = !busy_q;
  assign take  = start && !busy_q;
  assign iter  = take || (busy_q && cnt_q < CNT_W'(N));
  assign cpa   = busy_q && cnt_q == CNT_W'(N);

  // Operands of this iteration: straight from the inputs in iteration 1.
  always_comb begin
    a_cur = take ? a    : a_q;
    b_dig = take ? b[0] : b_q[0];
    s_cur = take ? '0   : s_q;
    c_cur = take ? '0   : c_q;
  end

  // One row of single-digit products A x b_i.
  for (genvar j = 0; j < N; j++) begin : g_pp
    digit_mult u_dm (.x(a_cur[j]), .y(b_dig), .hi(pp_hi[j]), .lo(pp_lo[j]));
  end

  // Column accumulation: each column forms its digit and a 0..2 carry.
  always_comb begin
    for (int unsigned j = 0; j <= N; j++) begin
      logic [4:0] t;
      t = '0;
      if (j < N) t = 5'(s_cur[j]) + 5'(c_cur[j]) + 5'(pp_lo[j]);
      if (j > 0) t = t + 5'(pp_hi[j-1]);
      if (t >= 5'd20) begin
        col_q[j] = 2'd2;
        col_d[j] = 4'(t - 5'd20);
      end else if (t >= 5'd10) begin
        col_q[j] = 2'd1;
        col_d[j] = 4'(t - 5'd10);
      end else begin
        col_q[j] = 2'd0;
        col_d[j] = 4'(t);
      end
    end
  end

  assign col_valid = iter;
  assign col_idx   = take ? '0 : IDX_W'(cnt_q);
  assign col_digit = col_d[0];

  // Final carry-propagate addition of the upper N columns.
  always_comb begin
    logic       cy;
    logic [4:0] u;
    cy = 1'b0;
    for (int unsigned j = 0; j < N; j++) begin
      u = 5'(s_q[j]) + 5'(c_q[j]) + 5'(cy);
      if (u >= 5'd10) begin
        sum_hi[j] = 4'(u - 5'd10);
        cy        = 1'b1;
      end else begin
        sum_hi[j] = 4'(u);
        cy        = 1'b0;
      end
    end
    cpa_cout = cy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      done_q <= 1'b0;
      a_q    <= '0;
      b_q    <= '0;
      s_q    <= '0;
      c_q    <= '0;
      lo_q   <= '0;
      hi_q   <= '0;
    end else begin
      done_q <= cpa;
      if (take) begin
        busy_q <= 1'b1;
        a_q    <= a;
        b_q    <= b >> 4;
      end else if (iter) begin
        b_q    <= b_q >> 4;
      end
      if (iter) begin
        cnt_q <= take ? CNT_W'(1) : cnt_q + 1'b1;
        for (int unsigned j = 0; j < N; j++) begin
          s_q[j] <= col_d[j+1];
          c_q[j] <= col_q[j];
        end
        lo_q <= {col_d[0], lo_q[N-1:1]};
      end
      if (cpa) begin
        busy_q <= 1'b0;
        cnt_q  <= '0;
        hi_q   <= sum_hi;
      end
    end
  end

  assign done = done_q;
  assign prod = {hi_q, lo_q};

  // The top column never carries and the final sum fits in N digits,
  // because an N x N digit product has at most 2N digits.
  a_top_col_no_carry : assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> col_q[N] == 2'd0);
  a_cpa_no_carry : assert property (@(posedge clk) disable iff (!rst_n)
    cpa |-> !cpa_cout);
  a_retired_digit_bcd : assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> col_d[0] <= 4'd9);

endmodule
