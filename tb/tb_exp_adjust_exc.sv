// tb_exp_adjust_exc: checks the final exponent adjustment and exception
// setting: finite results inside the range, overflow to infinity, underflow
// to zero, zero results with a clamped ideal exponent, and NaN and infinity
// passing through with the invalid flag.
module tb_exp_adjust_exc;
  import dfp_pkg::*;

  dfp_class_t cls_in, cls;
  logic invalid_in, inexact_in;
  logic signed [10:0] exp_pre;
  logic signed [1:0] exp_adj;
  bcd_t [6:0] sig_in, sig;
  logic [7:0] exp;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

  exp_adjust_exc dut (.cls_in, .invalid_in, .exp_pre, .exp_adj, .sig_in, .inexact_in,
                      .cls, .exp, .sig, .flags);

  task automatic check(input dfp_class_t k, input int ep, input int adj, input bit inv,
                       input bit inx);
    dfp_class_t ecls;
    int eexp;
    logic [27:0] esig;
    dfp_flags_t ef;
    cls_in = k; exp_pre = 11'(ep); exp_adj = 2'(adj); invalid_in = inv; inexact_in = inx;
    sig_in = 28'h9876543;
    ef = '0; eexp = 0; esig = '0; ecls = k;
    if (k == CLS_NAN) ef.invalid = inv;
    else if (k == CLS_ZERO) eexp = (ep - 7 < 0) ? 0 : (ep - 7 > 191) ? 191 : ep - 7;
    else if (k == CLS_FINITE) begin
      if (ep + adj > 191) begin ecls = CLS_INF; ef.overflow = 1; ef.inexact = 1; n_ovf++; end
      else if (ep + adj < 0) begin ecls = CLS_ZERO; ef.underflow = 1; ef.inexact = 1; n_unf++; end
      else begin eexp = ep + adj; esig = 28'h9876543; ef.inexact = inx; end
    end
    #1;
    checks++;
    if (cls != ecls || int'(exp) != eexp || 28'(sig) != esig || flags != ef) begin
      failures++;
      $display("FAIL cls %0d ep %0d adj %0d: cls %0d exp %0d flags %b", k, ep, adj, cls, exp, flags);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(CLS_FINITE, 191, 0, 0, 1);
    check(CLS_FINITE, 191, 1, 0, 0);
    check(CLS_FINITE, 192, -1, 0, 0);
    check(CLS_FINITE, 0, -1, 0, 0);
    check(CLS_FINITE, 0, 0, 0, 0);
    check(CLS_FINITE, -95, 1, 0, 0);
    check(CLS_ZERO, -95, 0, 0, 0);
    check(CLS_ZERO, 289, 0, 0, 0);
    check(CLS_ZERO, 100, 0, 0, 0);
    check(CLS_NAN, 5, 0, 1, 0);
    check(CLS_NAN, 5, 0, 0, 1);
    check(CLS_INF, 5, 0, 0, 1);
    for (int t = 0; t < 2000; t++)
      check(dfp_class_t'($urandom_range(3)), $urandom_range(384) - 95,
            $urandom_range(2) - 1, 1'($urandom), 1'($urandom));
    checks++;
    if (n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
