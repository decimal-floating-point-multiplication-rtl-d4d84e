// tb_exp_gen: checks the intermediate exponent E1 + E2 - 101 + 7 and the
// product sign over the corners and random biased exponents 0..191.
module tb_exp_gen;
  logic s1, s2, sign;
  logic [7:0] e1, e2;
  logic signed [10:0] exp_pre;
  int checks = 0, failures = 0;

  exp_gen dut (.s1, .s2, .e1, .e2, .sign, .exp_pre);

  task automatic check(input int a, input int b, input bit x1, input bit x2);
    e1 = 8'(a); e2 = 8'(b); s1 = x1; s2 = x2;
    #1;
    checks++;
    if (int'(exp_pre) != a + b - 101 + 7 || sign != (x1 ^ x2)) begin
      failures++;
      $display("FAIL %0d %0d -> %0d", a, b, exp_pre);
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
    check(0, 0, 0, 0); check(191, 191, 1, 0); check(101, 101, 0, 1);
    check(0, 191, 1, 1); check(255, 255, 0, 0);
    for (int t = 0; t < 1000; t++)
      check($urandom_range(191), $urandom_range(191), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
