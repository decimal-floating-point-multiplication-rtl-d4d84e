// tb_dfp32_decode: checks the decimal32 DPD decoder.
// Every three-digit group 000..999 is placed in each declet position; then
// random finite words (random sign, biased exponent 0..191 and 7-digit
// significand, MSD 0..9, so both combination-field layouts appear), known
// constants and the special values are decoded. Words are built with the
// reference package, which encodes DPD by its Boolean equations.
module tb_dfp32_decode;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  logic [31:0] word;
  dfp32_unpacked_t op;
  int checks = 0, failures = 0;

  dfp32_decode dut (.word, .op);

  task automatic check_finite(input bit s, input int unsigned e, input longint unsigned c);
    word = d32_word(s, e, c);
    #1;
    checks++;
    if (op.sign != s || op.exp != 8'(e) || bcd2int(64'(op.sig), 7) != c ||
        op.is_nan || op.is_snan || op.is_inf || op.is_zero != (c == 0)) begin
      failures++;
      $display("FAIL word %h: s %0b e %0d c %0d", word, op.sign, op.exp, bcd2int(64'(op.sig), 7));
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
      check_finite(0, 101, longint'(v));
      check_finite(1, 37, longint'(v) * 1000 + 5000000);
    end
    for (int t = 0; t < 3000; t++)
      check_finite(1'($urandom), $urandom_range(191), rand_digits(7, 0));
    check_finite(0, 191, 9999999);
    check_finite(1, 0, 8000000);
    // Known constant: +1 x 10^0 is 0x22500001.
    word = 32'h2250_0001;
    #1;
    checks++;
    if (op.exp != 8'd101 || bcd2int(64'(op.sig), 7) != 1 || op.sign) failures++;
    // Known declets: 999 -> 0FF, 555 -> 2D5, 080 -> 00A, 099 -> 05F.
    word = {1'b0, 11'b01000100101, 10'h0FF, 10'h2D5};
    #1;
    checks++;
    if (bcd2int(64'(op.sig), 7) != 999555) failures++;
    word = {1'b0, 11'b01000100101, 10'h00A, 10'h05F};
    #1;
    checks++;
    if (bcd2int(64'(op.sig), 7) != 80099) failures++;
    // Specials.
    word = d32_inf(1);
    #1;
    checks++;
    if (!op.is_inf || op.is_nan || !op.sign || op.is_zero) failures++;
    word = d32_qnan(0);
    #1;
    checks++;
    if (!op.is_nan || op.is_snan || op.is_inf) failures++;
    word = d32_snan(0);
    #1;
    checks++;
    if (!op.is_nan || !op.is_snan || op.is_inf) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
