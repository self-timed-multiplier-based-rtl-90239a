// tb_csd_digit_stats: recoding statistics of a 64-bit multiplier.
//
// Runs the end-to-end test of tb_csd_multiplier on a 64 x 8 multiplier
// (a short multiplicand keeps the array small; the recoding only depends on
// the 64-bit multiplier b) and checks that about a third of the digits are
// zero (33.1 % expected for 64-bit random operands, within 3 points). It
// prints the share of every digit value for comparison with the expected
// 33.1 / 17.0 / 16.5 / 17.0 / 16.5 % for 0 / +1 / +2 / -1 / -2.
// It also checks that the average longest chain of recoder stages whose
// carry waits for the stage below stays within 0.5 of 0.5*log2(N).
module tb_csd_digit_stats;
  localparam int N = 64;
  localparam int M = 8;
  localparam int K = N / 2;
  localparam int P = N + M;
  localparam int NRAND = 3000;
  localparam int MAX_TICKS = 400;
  localparam real ZERO_REF = 33.1;  // expected share of zero digits, %

  logic clk = 1'b0;
  logic r;
  logic [M-1:0] a;
  logic [N-1:0] b;
  logic [P-1:0] p;
  logic done;
  logic [K-1:0] null_rows;

  int checks = 0, failures = 0;
  int n_val [5] = '{default: 0};  // digits -2 .. +2
  int n_null = 0, n_neg = 0, n_two = 0, n_chain = 0, n_allnull = 0, n_digits = 0;
  int t_min = 1 << 30, t_max = 0;
  longint t_sum = 0;
  int n_ops = 0;
  longint prop_sum = 0;
  int t_m1x1 = 0;

  csd_multiplier #(.N(N), .M(M)) dut (.clk(clk), .r(r), .a(a), .b(b), .p(p), .done(done),
                      .null_rows(null_rows));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference CSD recoding of b: digits and the longest run of carries.
  // longest_prop: longest run of stages whose carry out has to wait for
  // their carry in (b_mid differs from both b_lo and b_hi).
  function automatic void ref_recode(input logic [N-1:0] bb, output int dig [K],
                                     output int longest_run, output int longest_prop);
    int c = 0, run = 0, prop = 0;
    longest_run = 0;
    longest_prop = 0;
    for (int j = 0; j < K; j++) begin
      int lo = int'(bb[2*j]);
      int mid = int'(bb[2*j+1]);
      int hi = (2*j+2 < N) ? int'(bb[2*j+2]) : int'(bb[N-1]);
      int rr = lo + c + 2 * mid;
      int co;
      case (rr)
        0: begin dig[j] = 0;  co = 0; end
        1: begin dig[j] = 1;  co = 0; end
        2: begin dig[j] = (hi != 0) ? -2 : 2; co = hi; end
        3: begin dig[j] = -1; co = 1; end
        default: begin dig[j] = 0; co = 1; end
      endcase
      run = (co != 0) ? run + 1 : 0;
      prop = (mid != lo && mid != hi) ? prop + 1 : 0;
      if (prop > longest_prop) longest_prop = prop;
      if (run > longest_run) longest_run = run;
      c = co;
    end
  endfunction

  task automatic do_op(input logic [M-1:0] aa, input logic [N-1:0] bb);
    int ticks;
    int dig [K];
    int run, prop;
    logic signed [P-1:0] pa, pb;
    logic [P-1:0] expected;
    logic [K-1:0] exp_null;
    bit allnull;

    // precharge
    @(negedge clk);
    r = 1'b0;
    @(negedge clk);
    checks++;
    if (done !== 1'b0 || p !== '0) begin
      failures++;
      $display("FAIL precharge: done=%b p=%h", done, p);
    end
    a = aa;
    b = bb;
    @(negedge clk);
    r = 1'b1;
    ticks = 0;
    while (!done && ticks < MAX_TICKS) begin
      @(negedge clk);
      ticks++;
    end
    pa = P'($signed(aa));
    pb = P'($signed(bb));
    expected = pa * pb;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL no done: a=%h b=%h", aa, bb);
    end else if (p !== expected) begin
      failures++;
      $display("FAIL product: a=%h b=%h p=%h expected=%h", aa, bb, p, expected);
    end
    ref_recode(bb, dig, run, prop);
    prop_sum += longint'(prop);
    allnull = 1'b1;
    for (int j = 0; j < K; j++) begin
      exp_null[j] = (dig[j] == 0);
      n_digits++;
      n_val[dig[j] + 2]++;
      if (dig[j] == 0) n_null++;
      else allnull = 1'b0;
      if (dig[j] < 0) n_neg++;
      if (dig[j] == 2 || dig[j] == -2) n_two++;
    end
    if (run >= 2) n_chain++;
    if (allnull) n_allnull++;
    checks++;
    if (null_rows !== exp_null) begin
      failures++;
      $display("FAIL null rows: b=%h got %b expected %b", bb, null_rows, exp_null);
    end
    if (done) begin
      n_ops++;
      t_sum += longint'(ticks);
      if (ticks < t_min) t_min = ticks;
      if (ticks > t_max) t_max = ticks;
    end
    if (aa == M'(-1) && bb == N'(1)) t_m1x1 = ticks;
  endtask

  initial begin
    logic [M-1:0] ca [6];
    logic [N-1:0] cb [6];
    r = 1'b0;
    a = '0;
    b = '0;
    ca = '{M'(0), M'(1), M'(-1), {1'b0, {(M-1){1'b1}}}, {1'b1, {(M-1){1'b0}}}, M'(3)};
    cb = '{N'(0), N'(1), N'(-1), {1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}}, {(N/2){2'b01}}};
    repeat (3) @(posedge clk);
    for (int i = 0; i < 6; i++)
      for (int k = 0; k < 6; k++)
        do_op(ca[i], cb[k]);
    for (int i = 0; i < NRAND; i++)
      do_op(M'({$urandom, $urandom}), N'({$urandom, $urandom}));

    $display("ops=%0d ticks r->done: min=%0d avg=%0.2f max=%0d, (-1)x1: %0d",
             n_ops, t_min, real'(t_sum) / real'(n_ops), t_max, t_m1x1);
    $display("digits=%0d null=%0d (%0.1f%%) negative=%0d +-2=%0d carry runs>=2: %0d all-null: %0d",
             n_digits, n_null, 100.0 * real'(n_null) / real'(n_digits), n_neg, n_two,
             n_chain, n_allnull);
    $display("digit shares %%: 0=%0.1f +1=%0.1f +2=%0.1f -1=%0.1f -2=%0.1f",
             100.0 * n_val[2] / n_digits, 100.0 * n_val[3] / n_digits,
             100.0 * n_val[4] / n_digits, 100.0 * n_val[1] / n_digits,
             100.0 * n_val[0] / n_digits);
    $display("average longest carry-propagation path of the recoder: %0.2f stages (bound ~0.5*log2(N) = %0.1f)",
             real'(prop_sum) / real'(n_ops), 0.5 * $clog2(N));
    checks++;
    if (real'(prop_sum) / real'(n_ops) > 0.5 * $clog2(N) + 0.5) begin
      failures++;
      $display("FAIL recoder carry propagation longer than expected on average");
    end
    checks++;
    if (n_null == 0 || n_neg == 0 || n_two == 0 || n_chain == 0 || n_allnull == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    if (t_min == t_max) begin
      failures++;
      $display("FAIL evaluation time does not depend on the data");
    end
    checks++;
    // Share of zero digits; the corner operands shift it little.
    if (100.0 * n_null / n_digits < ZERO_REF - 3.0 || 100.0 * n_null / n_digits > ZERO_REF + 3.0) begin
      failures++;
      $display("FAIL share of zero digits out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
