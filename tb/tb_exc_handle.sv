// tb_exc_handle: applies every combination of operand kinds (finite, zero,
// infinity, quiet NaN, signalling NaN) and checks the result class and the
// invalid flag against the multiplication rules of IEEE 754-2008.
module tb_exc_handle;
  import dfp_pkg::*;

  dfp32_unpacked_t op1, op2;
  dfp_class_t cls;
  logic invalid;
  int checks = 0, failures = 0;

  exc_handle dut (.op1, .op2, .cls, .invalid);

  // kind: 0 finite, 1 zero, 2 inf, 3 qNaN, 4 sNaN
  function automatic dfp32_unpacked_t mk(input int kind);
    dfp32_unpacked_t o;
    o = '0;
    o.sign    = 1'($urandom);
    o.exp     = 8'($urandom_range(191));
    o.sig     = kind == 0 ? 28'h1234567 : '0;
    o.is_zero = kind == 1;
    o.is_inf  = kind == 2;
    o.is_nan  = kind >= 3;
    o.is_snan = kind == 4;
    return o;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k1 = 0; k1 < 5; k1++) begin
      for (int k2 = 0; k2 < 5; k2++) begin
        dfp_class_t ecls;
        bit einv;
        op1 = mk(k1); op2 = mk(k2);
        einv = 0;
        if (k1 >= 3 || k2 >= 3) begin
          ecls = CLS_NAN; einv = (k1 == 4 || k2 == 4);
        end else if ((k1 == 2 && k2 == 1) || (k1 == 1 && k2 == 2)) begin
          ecls = CLS_NAN; einv = 1;
        end else if (k1 == 2 || k2 == 2) ecls = CLS_INF;
        else if (k1 == 1 || k2 == 1)     ecls = CLS_ZERO;
        else                             ecls = CLS_FINITE;
        #1;
        checks++;
        if (cls != ecls || invalid != einv) begin
          failures++;
          $display("FAIL kinds %0d %0d: cls %0d inv %0b", k1, k2, cls, invalid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
