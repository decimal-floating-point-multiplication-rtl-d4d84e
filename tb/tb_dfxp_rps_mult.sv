// tb_dfxp_rps_mult: checks the iterative 7 x 7 digit decimal fixed-point
// multiplier.
// Random significands (and corners: zeros, all nines, single digits) are
// multiplied and the 14-digit product is compared with integer arithmetic.
// Also checked: each retired digit and its index against the expected
// product digit, done arriving exactly N+1 cycles after the start cycle
// (N iterations plus the final addition), ready low while busy, and
// back-to-back operations started in the cycle done is high, one every
// N+1 cycles.
module tb_dfxp_rps_mult;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  logic start, ready, col_valid, done;
  bcd_t [N-1:0] a, b;
  logic [3:0] col_idx;
  bcd_t col_digit;
  bcd_t [2*N-1:0] prod;
  int checks = 0, failures = 0;
  int cycle = 0, n_b2b = 0;

  dfxp_rps_mult #(.N(N)) dut (.clk, .rst_n, .start, .a, .b, .ready, .col_valid,
                              .col_idx, .col_digit, .done, .prod);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned exp_prod;
  int start_cycle;
  int last_start = -100;

  // Checks one operation started at the next clock edge.
  task automatic run(input longint unsigned x, input longint unsigned y, input bit b2b);
    int ndig;
    ndig = 0;
    @(negedge clk);
    if (!b2b) while (!ready) @(negedge clk);
    if (!ready) begin
      failures++;
      $display("FAIL not ready for back-to-back start");
    end
    start = 1; a = (N*4)'(int2bcd(x, N)); b = (N*4)'(int2bcd(y, N));
    exp_prod = x * y;
    @(posedge clk);
    start_cycle = cycle;
    if (start_cycle - last_start == N + 1) n_b2b++;
    last_start = start_cycle;
    // iteration 1 happens in this cycle
    checks++;
    if (!col_valid || col_idx != 0 || col_digit != 4'(exp_prod % 10)) begin
      failures++;
      $display("FAIL digit 0 of %0d x %0d", x, y);
    end
    ndig = 1;
    #1;
    start = 0;
    forever begin
      @(posedge clk);
      if (col_valid) begin
        longint unsigned p10 = 1;
        for (int k = 0; k < ndig; k++) p10 *= 10;
        checks++;
        if (int'(col_idx) != ndig || col_digit != 4'((exp_prod / p10) % 10)) begin
          failures++;
          $display("FAIL digit %0d of %0d x %0d", ndig, x, y);
        end
        ndig++;
      end
      #1;
      if (done) break;
      checks++;
      if (ready) begin
        failures++;
        $display("FAIL ready while busy");
      end
    end
    checks++;
    if (cycle - start_cycle != N + 1 || ndig != N || !ready) begin
      failures++;
      $display("FAIL timing: done after %0d cycles, %0d digits", cycle - start_cycle, ndig);
    end
    checks++;
    if (bcd2int(64'(prod), 2 * N) != exp_prod) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, got %0d", x, y, exp_prod, bcd2int(64'(prod), 2 * N));
    end
  endtask

  initial begin
    start = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0, 0);
    run(9999999, 9999999, 0);
    run(3333330, 3000003, 1);
    run(2333330, 3000003, 1);
    run(1, 9999999, 0);
    run(1000000, 1000000, 0);
    for (int t = 0; t < 400; t++) begin
      longint unsigned x, y;
      x = rand_digits(N, 0);
      y = rand_digits(N, 0);
      run(x, y, (t % 2) == 1);
      if (t % 7 == 0) repeat ($urandom_range(3)) @(posedge clk);
    end
    checks++;
    if (n_b2b == 0) begin
      failures++;
      $display("FAIL no back-to-back operation");
    end
    $display("back-to-back operations: %0d", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
