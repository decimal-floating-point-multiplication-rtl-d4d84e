// tb_bcd_incr: checks the N-digit BCD incrementer (N = 7) against integer
// arithmetic on edge values (0, all nines, runs of trailing nines) and on
// random numbers.
module tb_bcd_incr;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  localparam int N = 7;
  bcd_t [N-1:0] a, y;
  logic cout;
  int checks = 0, failures = 0;

  bcd_incr #(.N(N)) dut (.a, .y, .cout);

  task automatic check(input longint unsigned v);
    longint unsigned exp_v = v + 1;
    a = (N*4)'(int2bcd(v, N));
    #1;
    checks++;
    if (bcd2int(64'(y), N) != exp_v % 10000000 || cout != (exp_v == 10000000)) begin
      failures++;
      $display("FAIL %0d + 1 gave %0d cout %0b", v, bcd2int(64'(y), N), cout);
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
    check(0); check(9999999); check(9); check(99); check(1299999);
    check(999999); check(8999999); check(1234567);
    for (int t = 0; t < 2000; t++) check(rand_digits(N, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
