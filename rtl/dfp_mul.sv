// dfp_mul: iterative decimal32 floating-point multiplier (IEEE 754-2008,
// DPD encoding) built around an RPS-style decimal fixed-point multiplier that
// retires product digits from the least significant end.
//
// Datapath. Both operands are decoded (dfp32_decode) into sign, biased
// exponent and seven BCD digits; special values go to the operand exception
// check (exc_handle), the exponents to exp_gen (E1 + E2 - bias + 7) and the
// significands to the 7 x 7 digit multiplier (dfxp_rps_mult). While that
// multiplier runs, sticky_rg collects the sticky bit from the five lowest
// product digits, then the round digit and the guard digit, so the rounding
// decision is ready when the last digits arrive. round_unit rounds both the
// top seven product digits and the seven digits below the MSD and picks one
// by the product's MSD, so no normalising shifter is needed.
// exp_adjust_exc corrects the exponent and sets overflow, underflow and
// inexact; dfp32_encode packs the result.
//
// Timing (n = 7 significand digits). Cycle 1: decode, exponent, exception
// check and the first multiplier iteration (operands taken on start).
// Cycles 2..n: further iterations. Cycle n+1: final addition of the upper
// product digits. Cycle n+2: rounding, exponent adjustment, exceptions and
// encoding; result and flags are registered at the end of it and out_valid
// is high for one cycle. Latency is n+2 = 9 cycles. ready is high again in
// cycle n+2, so the next operation's first cycle overlaps the current one's
// last and a new multiplication can start every n+1 = 8 cycles.
//
// Interface: start must only be raised while ready is high (asserted); x
// and y are sampled with it. result and flags hold until the next out_valid.
// Reset is asynchronous and active low.
//
// Inputs are expected to have a non-zero MSD (normalised significands), as
// the design assumes; a finite non-zero product then has 13 or 14 digits and
// at most one digit of shift is needed. Results below 1000000 x 10^-101 are
// flushed to zero with underflow (no subnormal results).
module dfp_mul
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic        ready,
  output logic        out_valid,
  output logic [31:0] result,
  output dfp_flags_t  flags
);

  localparam int unsigned N     = DFP32_DIGITS;
  localparam int unsigned IDX_W = $clog2(2 * N);

  // ---- cycle 1: decode, exponent, sign, operand exceptions ----
  dfp32_unpacked_t op1, op2;
  dfp_class_t      cls_c;
  logic            inv_c, sign_c;
  logic signed [DFP32_EXP_W+2:0] exp_pre_c;

  dfp32_decode u_dec1 (.word(x), .op(op1));
  dfp32_decode u_dec2 (.word(y), .op(op2));

  exc_handle u_exc1 (.op1(op1), .op2(op2), .cls(cls_c), .invalid(inv_c));

  exp_gen #(.N(N)) u_expg (
    .s1(op1.sign), .s2(op2.sign), .e1(op1.exp), .e2(op2.exp),
    .sign(sign_c), .exp_pre(exp_pre_c)
  );

  logic take;
  assign take = start && ready;

  dfp_class_t                    cls_q;
  logic                          inv_q, sign_q;
  logic signed [DFP32_EXP_W+2:0] exp_pre_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls_q     <= CLS_ZERO;
      inv_q     <= 1'b0;
      sign_q    <= 1'b0;
      exp_pre_q <= '0;
    end else if (take) begin
      cls_q     <= cls_c;
      inv_q     <= inv_c;
      sign_q    <= sign_c;
      exp_pre_q <= exp_pre_c;
    end
  end

  // ---- cycles 1..n+1: significand multiplication, sticky/round/guard ----
  logic             col_valid, mul_done;
  logic [IDX_W-1:0] col_idx;
  bcd_t             col_digit;
  bcd_t [2*N-1:0]   prod;
  logic             sb;
  bcd_t             rd, gd;

  dfxp_rps_mult #(.N(N)) u_mul (
    .clk, .rst_n, .start(take), .a(op1.sig), .b(op2.sig), .ready,
    .col_valid, .col_idx, .col_digit, .done(mul_done), .prod
  );

  sticky_rg #(.N(N)) u_srg (
    .clk, .rst_n, .col_valid, .col_idx, .col_digit, .sb, .r(rd), .g(gd)
  );

  // The low product digits are consumed through sticky_rg only.
  bcd_t [N-1:0] prod_lo_unused;
  assign prod_lo_unused = prod[N-1:0];

  // ---- cycle n+2: rounding, exponent adjust, exceptions, encoding ----
  bcd_t [N-1:0]     sig_rnd, sig_fin;
  logic signed [1:0] exp_adj;
  logic             shifted, inexact_rnd;
  dfp_class_t       cls_fin;
  logic [DFP32_EXP_W-1:0] exp_fin;
  dfp_flags_t       flags_c;
  logic [31:0]      word_c;

  round_unit #(.N(N)) u_rnd (
    .hi(prod[2*N-1:N]), .g(gd), .r(rd), .sb,
    .sig(sig_rnd), .exp_adj, .shifted, .inexact(inexact_rnd)
  );

  exp_adjust_exc #(.N(N)) u_adj (
    .cls_in(cls_q), .invalid_in(inv_q), .exp_pre(exp_pre_q), .exp_adj,
    .sig_in(sig_rnd), .inexact_in(inexact_rnd),
    .cls(cls_fin), .exp(exp_fin), .sig(sig_fin), .flags(flags_c)
  );

  dfp32_encode u_enc (
    .sign(sign_q), .exp(exp_fin), .sig(sig_fin), .cls(cls_fin), .word(word_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= mul_done;
      if (mul_done) begin
        result <= word_c;
        flags  <= flags_c;
      end
    end
  end

  a_start_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready);

endmodule
