// tb_digit_mult: exhaustive check of the single-digit BCD multiplier.
// All 100 digit pairs are applied; tens*10 + units must equal x*y and both
// outputs must be decimal digits.
module tb_digit_mult;
  import dfp_pkg::*;

  bcd_t x, y, hi, lo;
  int checks = 0, failures = 0;

  digit_mult dut (.x, .y, .hi, .lo);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 10; j++) begin
        x = 4'(i); y = 4'(j);
        #1;
        checks++;
        if (int'(hi) * 10 + int'(lo) != i * j || lo > 9 || hi > 9) begin
          failures++;
          $display("FAIL %0d x %0d gave %0d%0d", i, j, hi, lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
