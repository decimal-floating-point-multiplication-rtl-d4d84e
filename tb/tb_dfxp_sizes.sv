// tb_dfxp_sizes: runs the iterative decimal multiplier and the sticky/round/
// guard unit at digit counts other than the default 7 (N = 3 and N = 9),
// checking products, the N+1-cycle timing and Sb, R and G.
module tb_dfxp_sizes;
  logic clk = 0, rst_n = 0;
  int c3, f3, c9, f9;
  logic d3, d9;
  int checks, failures;

  dfxp_size_check #(.N(3), .OPS(300)) u3 (.clk, .rst_n, .checks(c3), .failures(f3), .finished(d3));
  dfxp_size_check #(.N(9), .OPS(300)) u9 (.clk, .rst_n, .checks(c9), .failures(f9), .finished(d9));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c9, f3 + f9 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d3 && d9);
    checks = c3 + c9;
    failures = f3 + f9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
