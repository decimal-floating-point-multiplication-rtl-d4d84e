// tb_dfp32_encode: checks the decimal32 DPD encoder against the reference
// package (DPD by its Boolean equations): all three-digit groups in both
// declets, random finite values with MSD 0..9, a known constant, and the
// infinity and NaN encodings.
module tb_dfp32_encode;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  logic sign;
  logic [7:0] exp;
  bcd_t [6:0] sig;
  dfp_class_t cls;
  logic [31:0] word;
  int checks = 0, failures = 0;

  dfp32_encode dut (.sign, .exp, .sig, .cls, .word);

  task automatic check(input bit s, input int unsigned e, input longint unsigned c,
                       input dfp_class_t k, input logic [31:0] expect_w);
    sign = s; exp = 8'(e); sig = 28'(int2bcd(c, 7)); cls = k;
    #1;
    checks++;
    if (word != expect_w) begin
      failures++;
      $display("FAIL s %0b e %0d c %0d cls %0d: %h expected %h", s, e, c, k, word, expect_w);
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
    for (int v = 0; v < 1000; v++) begin
      check(0, 101, longint'(v), CLS_FINITE, d32_word(0, 101, longint'(v)));
      check(1, 190, longint'(v) * 1000 + 9000000, CLS_FINITE,
            d32_word(1, 190, longint'(v) * 1000 + 9000000));
    end
    for (int t = 0; t < 3000; t++) begin
      bit s;
      int unsigned e;
      longint unsigned c;
      s = 1'($urandom);
      e = $urandom_range(191);
      c = rand_digits(7, 0);
      check(s, e, c, CLS_FINITE, d32_word(s, e, c));
    end
    check(0, 101, 1, CLS_FINITE, 32'h2250_0001);
    check(1, 50, 0, CLS_ZERO, d32_word(1, 50, 0));
    check(1, 50, 1234567, CLS_INF, d32_inf(1));
    check(0, 50, 1234567, CLS_NAN, d32_qnan(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
