// tb_sticky_rg: feeds streams of 2N product digits (N = 7), one per clock
// from the least significant, into the sticky/round/guard unit and checks
// that after the stream Sb = OR(FP_4..FP_0 != 0), R = FP_5 and G = FP_6.
// Streams with only zeros below R, and with a single non-zero digit, are
// included so the sticky bit is seen both clear and set, and the outputs are
// also checked right after digit N-1, before the multiplication would end.
module tb_sticky_rg;
  import dfp_pkg::*;

  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  logic col_valid;
  logic [3:0] col_idx;
  bcd_t col_digit, r, g;
  logic sb;
  int checks = 0, failures = 0;

  sticky_rg #(.N(N)) dut (.clk, .rst_n, .col_valid, .col_idx, .col_digit, .sb, .r, .g);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcd_t dig [2*N];
    col_valid = 0; col_idx = 0; col_digit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit esb;
      for (int d = 0; d < 2*N; d++) dig[d] = 4'($urandom_range(9));
      if (t % 3 == 0) for (int d = 0; d < N-2; d++) dig[d] = 0;
      if (t % 3 == 1) begin
        for (int d = 0; d < N-2; d++) dig[d] = 0;
        dig[$urandom_range(N-3)] = 4'($urandom_range(9, 1));
      end
      esb = 0;
      for (int d = 0; d < N-2; d++) esb |= (dig[d] != 0);
      for (int d = 0; d < 2*N; d++) begin
        @(negedge clk);
        col_valid = 1; col_idx = 4'(d); col_digit = dig[d];
        @(posedge clk);
        #1;
        if (d == N-1) begin
          checks++;
          if (sb != esb || r != dig[N-2] || g != dig[N-1]) begin
            failures++;
            $display("FAIL stream %0d: sb %0b/%0b r %0d/%0d g %0d/%0d",
                     t, sb, esb, r, dig[N-2], g, dig[N-1]);
          end
        end
      end
      @(negedge clk);
      col_valid = 0;
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
      checks++;
      if (sb != esb || r != dig[N-2] || g != dig[N-1]) begin
        failures++;
        $display("FAIL hold after stream %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
