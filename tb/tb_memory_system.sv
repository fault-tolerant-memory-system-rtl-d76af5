// tb_memory_system: end-to-end test of the memory system at reduced size
// (m = 5 logic modules of 16 words, seven modules, T = 200 cycles).
// A random host reads and writes the whole logic address space every cycle
// while online testing walks across the modules; every read is compared
// with a model of the logic memory, which must be unaffected by the
// copying, the SR swaps and the module failures. Two modules are made to
// fail in turn; the first is replaced by the stand-by module, the second
// stops the testing, and the memory keeps working on the m modules left.
// Each mechanism is counted and must occur: host reads and writes, requests
// refused during a copy, copies, turns of the test sweep at both ends,
// retirement of a module with take-over by the stand-by module, the stop of
// testing, and accesses to a module number beyond m. The control-unit self
// check must never fire.
module tb_memory_system;
  localparam int M      = 5;
  localparam int N      = M + 2;
  localparam int ADDR_W = 4;
  localparam int DATA_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  localparam int T      = 200;
  localparam int SEL_W  = $clog2(M);
  localparam int IW     = $clog2(N);

  logic clk = 1'b0, rst_n;
  logic req, we, ready, test_enable, test_halted, cu_err, mem_fail, addr_error;
  logic [SEL_W+ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [N-1:0] sr, failed, fault_inject;
  logic [IW-1:0] under_test;
  logic [1:0] x_total;

  memory_system #(.M(M), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .TEST_PERIOD(T)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .ready(ready), .test_enable(test_enable), .sr(sr),
    .failed(failed), .under_test(under_test), .test_halted(test_halted),
    .cu_err(cu_err), .mem_fail(mem_fail), .x_total(x_total),
    .addr_error(addr_error), .fault_inject(fault_inject));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // logic memory model
  logic [DATA_W-1:0] model [M * DEPTH];
  logic              valid [M * DEPTH];

  // mechanism counters
  int n_write, n_read, n_refused, n_copy, n_turn_up, n_turn_down;
  int n_retire, n_halt, n_oor, n_tests;
  int prev_ut, prev_step;
  logic [N-1:0] prev_failed;
  logic prev_halted, prev_ready;

  // random host, one request per cycle
  always @(negedge clk) if (rst_n) begin
    req   = ($urandom_range(0, 9) < 8);
    we    = $urandom_range(0, 1);
    addr  = (SEL_W + ADDR_W)'($urandom_range(0, (1 << (SEL_W + ADDR_W)) - 1));
    wdata = DATA_W'($urandom);
    #1;
    if (req && ready) begin
      int sel, la;
      sel = int'(addr >> ADDR_W);
      la  = sel * DEPTH + int'(addr[ADDR_W-1:0]);
      if (sel >= M) begin
        n_oor++;
        check(addr_error && rdata == '0, "out-of-range access");
      end else if (!we) begin
        if (valid[la]) begin
          check(rdata == model[la], $sformatf("read %0d got %h want %h", la, rdata, model[la]));
          n_read++;
        end
      end
    end
    if (req && !ready) n_refused++;
  end

  // writes take effect at the clock edge
  always @(posedge clk) if (rst_n && req && we && ready) begin
    int sel;
    sel = int'(addr >> ADDR_W);
    if (sel < M) begin
      model[sel * DEPTH + int'(addr[ADDR_W-1:0])] <= wdata;
      valid[sel * DEPTH + int'(addr[ADDR_W-1:0])] <= 1'b1;
      n_write++;
    end
  end

  // status observation
  always @(negedge clk) if (rst_n) begin
    check(!cu_err, $sformatf("control unit self check: sr=%b x=%b", sr, x_total));
    check(!mem_fail, "memory reported failed");
    if (!ready && prev_ready) n_copy++;
    if (int'(under_test) != prev_ut) begin
      int step;
      step = int'(under_test) - prev_ut;
      if (prev_failed == failed) begin
        if (step > 0 && prev_step < 0) n_turn_up++;
        if (step < 0 && prev_step > 0) n_turn_down++;
        prev_step = step;
      end else begin
        prev_step = -1;
      end
      prev_ut = int'(under_test);
      n_tests++;
    end
    if (failed != prev_failed) begin
      n_retire++;
      check($countones(failed) == $countones(prev_failed) + 1, "one module retired at a time");
      if (!test_halted)
        check(sr == (failed | (N'(1) << under_test)) && !failed[under_test],
              $sformatf("stand-by did not take over: sr=%b failed=%b ut=%0d", sr, failed, under_test));
    end
    if (test_halted && !prev_halted) begin
      n_halt++;
      check(sr == failed && $countones(failed) == 2, $sformatf("halt with sr=%b", sr));
    end
    prev_failed = failed;
    prev_halted = test_halted;
    prev_ready  = ready;
  end

  initial begin
    rst_n = 1'b0; req = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    test_enable = 1'b0; fault_inject = '0;
    for (int i = 0; i < M * DEPTH; i++) valid[i] = 1'b0;
    n_write = 0; n_read = 0; n_refused = 0; n_copy = 0; n_turn_up = 0;
    n_turn_down = 0; n_retire = 0; n_halt = 0; n_oor = 0; n_tests = 0;
    prev_ut = N - 1; prev_step = -1; prev_failed = '0; prev_halted = 1'b0; prev_ready = 1'b1;
    #23 rst_n = 1'b1;
    test_enable = 1'b1;
    // two full sweeps with all modules working
    repeat (2 * 2 * (N - 1) * T) @(posedge clk);
    check(failed == '0, "failure without a fault");
    // a cell of module 2 sticks while it holds no data (under test); the
    // running self test retires it
    wait (under_test == IW'(2));
    @(negedge clk);
    fault_inject[2] = 1'b1;
    wait (failed[2]);
    // one more sweep on the remaining modules, then module 5 fails too
    repeat (2 * (N - 2) * T) @(posedge clk);
    wait (under_test == IW'(5));
    @(negedge clk);
    fault_inject[5] = 1'b1;
    wait (test_halted);
    repeat (10 * T) @(posedge clk);
    @(negedge clk);
    req = 1'b0;
    #1;
    $display("writes=%0d reads=%0d refused=%0d copies=%0d turns_up=%0d turns_down=%0d retired=%0d halts=%0d out_of_range=%0d tests=%0d",
             n_write, n_read, n_refused, n_copy, n_turn_up, n_turn_down, n_retire, n_halt, n_oor, n_tests);
    check(n_write > 0, "no host write");
    check(n_read > 0, "no checked host read");
    check(n_refused > 0, "no request refused during a copy");
    check(n_copy > 0, "no copy");
    check(n_turn_up > 0, "sweep never turned at M1");
    check(n_turn_down > 0, "sweep never turned at the last module");
    check(n_retire == 2, "modules retired");
    check(n_halt == 1, "testing did not stop after the second failure");
    check(n_oor > 0, "no out-of-range access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
