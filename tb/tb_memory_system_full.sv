// tb_memory_system_full: the memory system at its default size (m = 8 logic
// modules of 1024 x 8 bits, ten modules, T = 16384 cycles), taken through
// one complete test cycle of the array: the module under test walks from
// M10 down to M1 and back to M10, eighteen tests with a 1024-word copy
// before each. A random host reads and writes all 8192 logic words every
// cycle, checked against a model. Then a cell of M5 sticks while it is
// under test; its self test retires it and the stand-by module becomes the
// module under test, and the walk goes on over the nine working modules.
module tb_memory_system_full;
  localparam int M      = 8;
  localparam int N      = M + 2;
  localparam int ADDR_W = 10;
  localparam int DATA_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  localparam int T      = 16384;
  localparam int SEL_W  = 3;
  localparam int IW     = 4;

  logic clk = 1'b0, rst_n;
  logic req, we, ready, test_enable, test_halted, cu_err, mem_fail, addr_error;
  logic [SEL_W+ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [N-1:0] sr, failed, fault_inject;
  logic [IW-1:0] under_test;
  logic [1:0] x_total;

  memory_system dut (
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
    repeat (40 * T) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] model [M * DEPTH];
  logic              valid [M * DEPTH];
  int n_write, n_read, n_refused, n_tests, cyc, last_start;
  int order[$];
  logic [IW-1:0] prev_ut;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    req   = ($urandom_range(0, 9) < 9);
    we    = $urandom_range(0, 1);
    addr  = (SEL_W + ADDR_W)'($urandom);
    wdata = DATA_W'($urandom);
    #1;
    if (req && ready && !we) begin
      int la;
      la = int'(addr);
      if (valid[la]) begin
        check(rdata == model[la], $sformatf("read %0d got %h want %h", la, rdata, model[la]));
        n_read++;
      end
    end
    if (req && !ready) n_refused++;
  end

  always @(posedge clk) if (rst_n && req && we && ready) begin
    model[int'(addr)] <= wdata;
    valid[int'(addr)] <= 1'b1;
    n_write++;
  end

  always @(negedge clk) if (rst_n) begin
    check(!cu_err && !mem_fail, "control unit self check");
    if (under_test != prev_ut) begin
      order.push_back(int'(under_test));
      prev_ut = under_test;
    end
  end

  initial begin
    int exp_order[$];
    rst_n = 1'b0; req = 1'b0; we = 1'b0; addr = '0; wdata = '0; cyc = 0;
    test_enable = 1'b0; fault_inject = '0; prev_ut = IW'(N - 1);
    n_write = 0; n_read = 0; n_refused = 0;
    for (int i = 0; i < M * DEPTH; i++) valid[i] = 1'b0;
    #23 rst_n = 1'b1;
    test_enable = 1'b1;
    // one complete test cycle: M10 down to M1 and back up to M10
    wait (order.size() == 2 * (N - 1));
    for (int k = N - 2; k >= 0; k--) exp_order.push_back(k);
    for (int k = 1; k < N; k++) exp_order.push_back(k);
    check(order == exp_order, "order of the tested modules");
    check(cyc > 2 * (N - 1) * T - T && cyc < 2 * (N - 1) * T + T,
          $sformatf("test cycle took %0d cycles, expected about %0d", cyc, 2 * (N - 1) * T));
    check(failed == '0 && sr == (N'(1) << (N - 1)), "state after a test cycle");
    // a stuck cell in M5 while it is under test
    wait (under_test == IW'(4));
    @(negedge clk);
    fault_inject[4] = 1'b1;
    wait (failed[4]);
    @(negedge clk);
    check(sr == ((N'(1) << 4) | (N'(1) << (N - 1))), $sformatf("after retirement sr=%b", sr));
    check(under_test == IW'(N - 1), "stand-by module did not become the module under test");
    wait (under_test == IW'(3));
    wait (under_test == IW'(2));
    @(negedge clk);
    req = 1'b0;
    $display("writes=%0d reads=%0d refused=%0d tests=%0d", n_write, n_read, n_refused, order.size());
    check(n_read > 1000 && n_write > 1000 && n_refused > 0, "host traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
