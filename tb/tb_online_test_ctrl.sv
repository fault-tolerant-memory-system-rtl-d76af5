// tb_online_test_ctrl: runs the online test sequencer for m = 4 (six
// modules) with a small module (8 words) and period T = 100 cycles, using a
// behavioural BIST (done 40 cycles after start) and a model of the state
// register. It checks:
//  - the order of the tested modules: down to M1, back up to M(m+2), ...
//  - test starts exactly T cycles apart, including after a failure;
//  - the intervals at which each module is tested (2mT at the ends,
//    2(j-1)T and 2(m-j+1)T alternately in between, with m+1 working modules);
//  - each copy: source is the next module, destination the module just
//    tested, every word once in order, host stalled meanwhile;
//  - SR always marks exactly the module under test plus failed modules;
//  - a failed BIST retires the module, the stand-by module takes over as
//    the module under test, and a second failure stops testing.
module tb_online_test_ctrl;
  localparam int M      = 4;
  localparam int N      = M + 2;
  localparam int ADDR_W = 3;
  localparam int DEPTH  = 1 << ADDR_W;
  localparam int T      = 100;
  localparam int BIST_LEN = 40;
  localparam int IW     = $clog2(N);

  logic clk = 1'b0, rst_n, enable;
  logic [N-1:0] sr, sr_set, sr_clr, test_start, test_done, test_fail, failed;
  logic copy_active, stall, halted;
  logic [IW-1:0] copy_src, copy_dst, under_test;
  logic [ADDR_W-1:0] copy_addr;
  int checks = 0, failures = 0;

  online_test_ctrl #(.M(M), .ADDR_W(ADDR_W), .TEST_PERIOD(T)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .sr(sr), .sr_set(sr_set),
    .sr_clr(sr_clr), .test_start(test_start), .test_done(test_done),
    .test_fail(test_fail), .copy_active(copy_active), .copy_src(copy_src),
    .copy_dst(copy_dst), .copy_addr(copy_addr), .stall(stall),
    .under_test(under_test), .failed(failed), .halted(halted));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // state register model
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr <= N'(1) << (N - 1);
    else        sr <= (sr & ~sr_clr) | sr_set;

  // behavioural BIST of every module; fail_now[k] decides the result
  logic [N-1:0] fail_now;
  int           bist_cnt [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_done <= '0;
      test_fail <= '0;
      for (int k = 0; k < N; k++) bist_cnt[k] <= 0;
    end else begin
      test_done <= '0;
      for (int k = 0; k < N; k++) begin
        if (test_start[k]) begin
          bist_cnt[k]  <= BIST_LEN;
          test_fail[k] <= 1'b0;
        end else if (bist_cnt[k] == 1) begin
          bist_cnt[k]  <= 0;
          test_done[k] <= 1'b1;
          test_fail[k] <= fail_now[k];
        end else if (bist_cnt[k] > 1) begin
          bist_cnt[k] <= bist_cnt[k] - 1;
        end
      end
    end
  end

  initial begin
    repeat (80 * T + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference sweep over the list of working modules
  int good[$];
  int pos, dir_up, n_tests, last_start, prev_idx;
  int last_test_of [N];
  int prev_gap_of  [N];
  int n_swaps, n_copy_words, n_fail_events, n_interval_checks;
  logic [N-1:0] exp_failed;
  int fail_plan [2] = '{2, 4};   // modules to fail, in this order
  int fail_after [2] = '{8, 40}; // ... at their first test after this many tests

  always @(negedge clk) if (rst_n) begin
    // SR marks the module under test (unless halted) and the failed modules
    if (!halted && !stall)
      check(sr == (exp_failed | (N'(1) << under_test)),
            $sformatf("sr=%b failed=%b under_test=%0d", sr, exp_failed, under_test));
    if (copy_active) begin
      check(copy_dst == IW'(good[pos]), $sformatf("copy destination %0d", copy_dst));
      check(copy_addr == ADDR_W'(n_copy_words % DEPTH), "copy address order");
      check(stall, "host not stalled during copy");
      n_copy_words++;
    end
    if (|sr_clr) n_swaps++;
  end

  always @(negedge clk) if (rst_n && |test_start) begin
    int idx, exp_idx;
    idx = $clog2(int'(test_start));
    check($onehot(test_start), "test_start not one-hot");
    // expected module
    if (n_tests == 0) begin
      exp_idx = N - 1;
    end else if (prev_idx < 0) begin
      exp_idx = good[$];          // after a failure: the last working module
    end else begin
      if (dir_up == 0 && pos == 0) dir_up = 1;
      if (dir_up == 1 && pos == good.size() - 1) dir_up = 0;
      pos = dir_up ? pos + 1 : pos - 1;
      exp_idx = good[pos];
    end
    if (n_tests > 0) begin
      check(cyc - last_start == T,
            $sformatf("test start %0d cycles after the previous, want %0d", cyc - last_start, T));
      check(n_copy_words == ((prev_idx < 0) ? 0 : DEPTH), $sformatf("copied %0d words", n_copy_words));
    end
    check(idx == exp_idx, $sformatf("tested module %0d, expected %0d", idx, exp_idx));
    foreach (good[g]) if (good[g] == idx) pos = g;
    // per-module intervals, Eqs. (10)/(11), while m+1 modules are working
    if (good.size() == M + 1 && last_test_of[idx] >= 0 && prev_gap_of[idx] >= -1) begin
      int gap, j, mm;
      gap = (cyc - last_test_of[idx]) / T;
      j = pos + 1;
      mm = M;
      if (j == 1 || j == mm + 1) check(gap == 2 * mm, $sformatf("end module %0d interval %0dT", idx, gap));
      else begin
        check(gap == 2 * (j - 1) || gap == 2 * (mm - j + 1),
              $sformatf("module %0d interval %0dT", idx, gap));
        if (prev_gap_of[idx] > 0)
          check(gap + prev_gap_of[idx] == 2 * mm, "intervals do not alternate");
      end
      prev_gap_of[idx] = gap;
      n_interval_checks++;
    end
    if (good.size() == M + 1) last_test_of[idx] = cyc;
    last_start = cyc;
    n_copy_words = 0;
    prev_idx = idx;
    n_tests++;
    // decide the result of this test
    fail_now = '0;
    for (int f = 0; f < 2; f++)
      if (idx == fail_plan[f] && n_tests > fail_after[f] && !exp_failed[idx] &&
          (f == 0 || exp_failed[fail_plan[0]]))
        fail_now[idx] = 1'b1;
  end

  // track failures as the BIST reports them
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++)
      if (test_done[k] && test_fail[k]) begin
        exp_failed[k] = 1'b1;
        n_fail_events++;
        foreach (good[g]) if (good[g] == k) begin good.delete(g); break; end
        prev_idx = -1;
        dir_up = 0;
        for (int i = 0; i < N; i++) begin last_test_of[i] = -1; prev_gap_of[i] = -2; end
        // from now on, per-module intervals are checked only with m+1 working
        // modules, i.e. after the first failure
        if (good.size() == M + 1) for (int i = 0; i < N; i++) prev_gap_of[i] = -1;
      end
  end

  initial begin
    rst_n = 1'b0; enable = 1'b0; fail_now = '0; exp_failed = '0;
    n_tests = 0; pos = N - 1; dir_up = 0; prev_idx = N - 1;
    n_swaps = 0; n_copy_words = 0; n_fail_events = 0; n_interval_checks = 0;
    for (int i = 0; i < N; i++) begin good.push_back(i); last_test_of[i] = -1; prev_gap_of[i] = -2; end
    #23 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(n_tests == 0, "test started before enable");
    enable = 1'b1;
    // run until testing stops after the second failure
    wait (halted);
    repeat (3 * T) @(posedge clk);
    check(n_fail_events == 2, $sformatf("%0d failures seen, want 2", n_fail_events));
    check(failed == ((N'(1) << 2) | (N'(1) << 4)), $sformatf("failed=%b", failed));
    check($countones(sr) == 2, $sformatf("sr=%b after halt", sr));
    check(n_tests > 20, $sformatf("only %0d tests run", n_tests));
    check(n_swaps > 15, $sformatf("only %0d swaps", n_swaps));
    check(n_interval_checks > 3, $sformatf("only %0d interval checks", n_interval_checks));
    $display("tests=%0d swaps=%0d failures_seen=%0d interval_checks=%0d", n_tests, n_swaps, n_fail_events, n_interval_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
