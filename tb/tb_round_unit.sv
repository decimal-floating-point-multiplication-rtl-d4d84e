// tb_round_unit: checks the dual-path rounding unit (N = 7) against an
// integer reference. The reference takes the top digits, G, R and the
// sticky bit as one number, drops two digits (product MSD non-zero) or one
// digit (MSD zero) with round-half-to-even, and renormalises a carry into a
// new digit. Directed cases cover every row of the rounding table (G > 5,
// G = 5 with R != 0, G = 5 with Sb, G < 5, exact ties to even both ways),
// both paths, the carry out of all nines and the 0999999 corner.
module tb_round_unit;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  localparam int N = 7;
  localparam longint unsigned TEN_N = 10000000;
  bcd_t [N-1:0] hi, sig;
  bcd_t g, r;
  logic sb, shifted, inexact;
  logic signed [1:0] exp_adj;
  int checks = 0, failures = 0;
  int n_path1 = 0, n_path2 = 0, n_carry = 0, n_tie_even = 0, n_tie_up = 0;

  round_unit #(.N(N)) dut (.hi, .g, .r, .sb, .sig, .exp_adj, .shifted, .inexact);

  task automatic check(input longint unsigned h, input int gg, input int rr, input bit s);
    longint unsigned x, q, rem, half, p10;
    int k, adj;
    bit up, inex;
    x = h * 100 + longint'(gg) * 10 + longint'(rr);
    k = (h >= TEN_N / 10) ? 2 : 1;
    p10 = (k == 2) ? 100 : 10;
    half = p10 / 2;
    q = x / p10; rem = x % p10;
    up = (rem > half) || (rem == half && s) || (rem == half && !s && q[0]);
    if (rem == half && !s) begin
      if (q[0]) n_tie_up++; else n_tie_even++;
    end
    inex = (rem != 0) || s;
    q = q + longint'(up);
    adj = (k == 2) ? 0 : -1;
    if (q == TEN_N) begin q = TEN_N / 10; adj++; end
    hi = (N*4)'(int2bcd(h, N)); g = 4'(gg); r = 4'(rr); sb = s;
    #1;
    checks++;
    if (shifted) n_path1++; else n_path2++;
    if (exp_adj == 1) n_carry++;
    if (bcd2int(64'(sig), N) != q || int'(exp_adj) != adj || inexact != inex) begin
      failures++;
      $display("FAIL %07d|%0d|%0d|%0b: got %0d adj %0d inx %0b, want %0d adj %0d inx %0b",
               h, gg, rr, s, bcd2int(64'(sig), N), exp_adj, inexact, q, adj, inex);
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
    check(1234567, 6, 0, 0);   // G > 5
    check(1234567, 5, 1, 0);   // G = 5, R != 0
    check(1234567, 5, 0, 1);   // G = 5, Sb
    check(1234567, 4, 9, 1);   // G < 5
    check(1234567, 5, 0, 0);   // tie, odd -> up
    check(1234568, 5, 0, 0);   // tie, even -> stays
    check(1234568, 0, 0, 0);   // exact
    check(9999999, 6, 0, 0);   // carry out of path 2
    check(9999999, 5, 0, 0);   // tie, odd, carry
    check(699999, 6, 9, 0);    // path 1 (example: 6999996|9...)
    check(699999, 6, 5, 0);    // path 1 tie, even
    check(699999, 7, 5, 0);    // path 1 tie, odd
    check(999999, 9, 6, 0);    // path 1 all nines rounds up
    check(999999, 9, 4, 0);    // 0999999|9|4: stays 9999999
    check(999999, 5, 0, 0);    // 0999999|5|0: exact 9999995
    check(999999, 6, 1, 1);
    check(1000000, 0, 0, 0);
    for (int t = 0; t < 5000; t++) begin
      longint unsigned h;
      h = (t % 2 == 0) ? rand_digits(N - 1, 1) : rand_digits(N, 1);
      check(h, $urandom_range(9), (t % 5 == 0) ? 0 : $urandom_range(9), 1'($urandom));
    end
    if (n_path1 == 0 || n_path2 == 0 || n_carry == 0 || n_tie_even == 0 || n_tie_up == 0) begin
      failures++;
      $display("FAIL coverage p1 %0d p2 %0d carry %0d tie_even %0d tie_up %0d",
               n_path1, n_path2, n_carry, n_tie_even, n_tie_up);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
