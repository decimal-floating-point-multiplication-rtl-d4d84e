// dfxp_size_check: drives one dfxp_rps_mult of N digits, together with a
// sticky_rg of the same size, through random multiplications and compares
// the product, the N+1-cycle timing and the sticky bit, round digit and
// guard digit with integer arithmetic. Used by tb_dfxp_sizes for digit
// counts other than the default. N may be at most 9 (products must fit in
// 64 bits).
module dfxp_size_check
  import dfp_pkg::*;
  import tb_dfp_pkg::*;
#(
  parameter int N    = 3,
  parameter int OPS  = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int IDX_W = $clog2(2 * N);

  logic start, ready, col_valid, done, sb;
  bcd_t [N-1:0] a, b;
  logic [IDX_W-1:0] col_idx;
  bcd_t col_digit, r, g;
  bcd_t [2*N-1:0] prod;

  dfxp_rps_mult #(.N(N)) u_mul (.clk, .rst_n, .start, .a, .b, .ready, .col_valid,
                                .col_idx, .col_digit, .done, .prod);
  sticky_rg #(.N(N)) u_srg (.clk, .rst_n, .col_valid, .col_idx, .col_digit, .sb, .r, .g);

  initial begin
    checks = 0; failures = 0; finished = 0;
    start = 0; a = '0; b = '0;
    @(posedge rst_n);
    for (int t = 0; t < OPS; t++) begin
      longint unsigned x, y, p, p10;
      int cyc;
      bit esb;
      x = rand_digits(N, 0);
      y = rand_digits(N, 0);
      if (t % 4 == 0) y = y - y % 1000;   // zeros at the bottom: sticky clear
      p = x * y;
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1; a = (4*N)'(int2bcd(x, N)); b = (4*N)'(int2bcd(y, N));
      @(posedge clk);
      #1;
      start = 0;
      cyc = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      esb = 0;
      p10 = 1;
      for (int d = 0; d < N - 2; d++) begin
        esb |= ((p / p10) % 10) != 0;
        p10 *= 10;
      end
      checks++;
      if (bcd2int(128'(prod), 2 * N) != p || cyc != N || sb != esb ||
          longint'(r) != (p / p10) % 10 || longint'(g) != (p / (p10 * 10)) % 10) begin
        failures++;
        $display("FAIL N=%0d: %0d x %0d gave %0d after %0d cycles, sb %0b r %0d g %0d",
                 N, x, y, bcd2int(128'(prod), 2 * N), cyc + 1, sb, r, g);
      end
    end
    finished = 1;
  end
endmodule
