// tb_dfp_mul: end-to-end test of the decimal32 multiplier at its default
// configuration (7 significand digits).
//
// Operands are built from sign, biased exponent and significand and the
// expected result comes from an integer reference: the exact product is
// rounded to 7 digits, round-half-to-even over all dropped digits, then
// range-checked (overflow to infinity, flush to zero below 1000000 x
// 10^-101) and encoded with the reference DPD equations. Special operands
// follow IEEE 754-2008 multiplication rules.
//
// Checked per operation: result word, the four flags, and the latency (the
// result is registered at the end of the 9th cycle counting the start cycle).
// Operations are also issued back to back, one every 8 cycles. Each
// mechanism of the design is counted and must occur at least once: rounding
// up for G > 5, for G = 5 with R != 0 and with only the sticky bit, rounding
// down, both outcomes of an exact tie, the one-digit-lower (shifted) result,
// rounding of all nines into a new digit, overflow, underflow, inexact and
// exact results, zero, infinity and NaN operands, invalid operations and
// back-to-back issue.
module tb_dfp_mul;
  import dfp_pkg::*;
  import tb_dfp_pkg::*;

  localparam int N = 7;
  localparam longint unsigned TEN7 = 10000000;

  logic clk = 0, rst_n = 0;
  logic start, ready, out_valid;
  logic [31:0] x, y, result;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int cycle = 0;

  dfp_mul dut (.clk, .rst_n, .start, .x, .y, .ready, .out_valid, .result, .flags);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {
    M_UP_G, M_UP_GR, M_UP_GSB, M_DOWN, M_TIE_EVEN, M_TIE_UP, M_SHIFT, M_NEWDIGIT,
    M_OVF, M_UNF, M_INEXACT, M_EXACT, M_ZERO, M_INF, M_NAN, M_INVALID, M_B2B, M_NUM
  } mech_t;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"round up G>5", "round up G=5 R!=0", "round up G=5 sticky",
    "round down", "tie kept even", "tie rounded up", "shifted result",
    "rounding into new digit", "overflow", "underflow", "inexact", "exact",
    "zero operand", "infinity operand", "NaN operand", "invalid", "back-to-back"};

  typedef struct {
    logic [31:0] word;
    dfp_flags_t  fl;
    int          start_cycle;
  } exp_t;
  exp_t expq[$];

  // kinds: 0 finite, 1 inf, 2 qNaN, 3 sNaN (zero is a finite with c = 0)
  function automatic void reference(input bit s1, input int e1, input longint unsigned c1,
                                    input int k1, input bit s2, input int e2,
                                    input longint unsigned c2, input int k2,
                                    output logic [31:0] w, output dfp_flags_t fl);
    bit s = s1 ^ s2;
    fl = '0;
    if (k1 >= 2 || k2 >= 2) begin
      mech[M_NAN]++;
      w = d32_qnan(s);
      fl.invalid = (k1 == 3 || k2 == 3);
      if (fl.invalid) mech[M_INVALID]++;
    end else if ((k1 == 1 && k2 == 0 && c2 == 0) || (k2 == 1 && k1 == 0 && c1 == 0)) begin
      mech[M_INF]++; mech[M_INVALID]++;
      w = d32_qnan(s);
      fl.invalid = 1;
    end else if (k1 == 1 || k2 == 1) begin
      mech[M_INF]++;
      w = d32_inf(s);
    end else if (c1 == 0 || c2 == 0) begin
      int ez = e1 + e2 - 101;
      mech[M_ZERO]++;
      if (ez < 0) ez = 0;
      if (ez > 191) ez = 191;
      w = d32_word(s, ez, 0);
    end else begin
      longint unsigned p, q, rem, half, p10;
      int digits, k, e;
      bit up;
      p = c1 * c2;
      digits = 0;
      for (longint unsigned t = p; t != 0; t /= 10) digits++;
      k = digits - N;
      p10 = 1;
      for (int i = 0; i < k; i++) p10 *= 10;
      q = p / p10; rem = p % p10; half = p10 / 2;
      up = rem > half || (rem == half && q[0]);
      // classify the rounding case by the first dropped digit and the rest
      begin
        longint unsigned first = rem / (p10 / 10);
        longint unsigned rest  = rem % (p10 / 10);
        if (k == N - 1) mech[M_SHIFT]++;
        if (rem == half) begin
          if (q[0]) mech[M_TIE_UP]++; else mech[M_TIE_EVEN]++;
        end else if (first > 5) mech[M_UP_G]++;
        else if (first == 5 && k == N && rest / (p10 / 100) != 0) mech[M_UP_GR]++;
        else if (first == 5) mech[M_UP_GSB]++;
        else mech[M_DOWN]++;
      end
      q = q + longint'(up);
      if (q == TEN7) begin
        q = TEN7 / 10; k++;
        mech[M_NEWDIGIT]++;
      end
      e = e1 + e2 - 101 + k;
      if (e > 191) begin
        mech[M_OVF]++;
        w = d32_inf(s);
        fl.overflow = 1; fl.inexact = 1;
      end else if (e < 0) begin
        mech[M_UNF]++;
        w = d32_word(s, 0, 0);
        fl.underflow = 1; fl.inexact = 1;
      end else begin
        w = d32_word(s, e, q);
        fl.inexact = (rem != 0);
      end
      if (fl.inexact) mech[M_INEXACT]++; else mech[M_EXACT]++;
    end
  endfunction

  function automatic logic [31:0] mkword(input bit s, input int e, input longint unsigned c,
                                         input int k);
    case (k)
      1: return d32_inf(s);
      2: return d32_qnan(s);
      3: return d32_snan(s);
      default: return d32_word(s, e, c);
    endcase
  endfunction

  int last_take = -100;

  task automatic issue(input bit s1, input int e1, input longint unsigned c1, input int k1,
                       input bit s2, input int e2, input longint unsigned c2, input int k2,
                       input int gap);
    exp_t ex;
    repeat (gap) @(negedge clk);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1;
    x = mkword(s1, e1, c1, k1);
    y = mkword(s2, e2, c2, k2);
    reference(s1, e1, c1, k1, s2, e2, c2, k2, ex.word, ex.fl);
    @(posedge clk);
    #1;
    start = 0;
    ex.start_cycle = cycle;
    if (cycle - last_take == N + 1) mech[M_B2B]++;
    last_take = cycle;
    expq.push_back(ex);
  endtask

  task automatic fin(input longint unsigned c1, input longint unsigned c2, input int e1,
                     input int e2, input int gap);
    issue(1'($urandom), e1, c1, 0, 1'($urandom), e2, c2, 0, gap);
  endtask

  // result monitor
  initial forever begin
    @(posedge clk);
    #1;
    if (rst_n && out_valid) begin
      exp_t ex;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", result);
      end else begin
        ex = expq.pop_front();
        if (result != ex.word || flags != ex.fl || cycle - ex.start_cycle != N + 1) begin
          failures++;
          $display("FAIL got %h flags %b after %0d cycles, want %h flags %b",
                   result, flags, cycle - ex.start_cycle + 1, ex.word, ex.fl);
        end
      end
    end
  end

  initial begin
    start = 0; x = '0; y = '0;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Worked cases: 2333330 x 3000003 rounds one digit lower to 6999997.
    fin(2333330, 3000003, 101, 101, 0);
    fin(3333333, 3000000, 101, 101, 0);
    // Ties: kept even, rounded up, sticky only, shifted ties.
    fin(2000001, 5000000, 90, 100, 0);
    fin(2000003, 5000000, 90, 100, 0);
    fin(2000001, 5000003, 90, 100, 0);
    fin(1100000, 5000005, 90, 100, 0);
    fin(1100000, 5000015, 90, 100, 0);
    fin(1000000, 5000005, 90, 100, 0);
    // Exponent range: overflow, underflow, largest and smallest results.
    fin(9999999, 9999999, 191, 191, 0);
    fin(1000000, 1000000, 0, 0, 0);
    fin(9999999, 1000000, 191, 94, 0);
    fin(1000000, 1000000, 0, 95, 0);
    // Products that round into a new digit (9999999|5.. one digit lower).
    begin
      int found;
      found = 0;
      for (longint unsigned c1 = 1000001; c1 < 9999999 && found < 6; c1 += 7919) begin
        longint unsigned c2;
        c2 = (64'd9999999500000 + c1 - 1) / c1;
        if (c2 <= 9999999 && c2 >= 1000000 && c1 * c2 < 64'd10000000000000) begin
          fin(c1, c2, 120, 80, 0);
          found++;
        end
      end
    end
    // Specials.
    issue(0, 101, 1234567, 1, 1, 101, 7654321, 0, 0);   // inf x finite
    issue(0, 101, 0, 0, 1, 101, 0, 1, 0);               // 0 x inf: invalid
    issue(1, 101, 0, 2, 0, 101, 7654321, 0, 0);         // qNaN
    issue(1, 101, 0, 3, 0, 101, 7654321, 0, 0);         // sNaN: invalid
    issue(0, 20, 0, 0, 1, 60, 7654321, 0, 0);           // zero, clamped exponent
    issue(0, 150, 0, 0, 1, 160, 7654321, 0, 0);         // zero, clamped at the top
    // Random normalised operands, back to back and with gaps.
    for (int t = 0; t < 1500; t++) begin
      fin(rand_digits(N, 1), rand_digits(N, 1), $urandom_range(191), $urandom_range(191),
          (t % 3 == 0) ? $urandom_range(4) : 0);
    end
    repeat (N + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    foreach (mech[i]) begin
      $display("%-26s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
