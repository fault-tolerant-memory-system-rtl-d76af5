// tb_bist_ram: normal reads and writes against a model, then the March C-
// self test: it must take 10 cycles per word, pass on a good array, leave the
// array cleared, ignore host writes while running, and fail when a stuck-at
// cell is injected.
module tb_bist_ram;
  localparam int ADDR_W = 6;
  localparam int DATA_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;

  logic clk = 1'b0, rst_n;
  logic cs, we, test_start, fi_stuck;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic test_busy, test_done, test_fail;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  bist_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .FI_ADDR(5)) dut (
    .clk(clk), .rst_n(rst_n), .cs(cs), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .test_start(test_start), .test_busy(test_busy),
    .test_done(test_done), .test_fail(test_fail), .fi_stuck(fi_stuck));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; we = 1'b1; addr = ADDR_W'(a); wdata = d;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
  endtask

  // runs one self test, returns its length in cycles and its result
  task automatic run_test(output int cycles, output logic fail);
    @(negedge clk);
    test_start = 1'b1;
    cycles = 0;
    @(negedge clk);
    test_start = 1'b0;
    cycles = 1;
    // a host write while the test runs must be ignored
    cs = 1'b1; we = 1'b1; addr = ADDR_W'(3); wdata = 8'hA5;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
    cycles++;
    while (!test_done) begin
      @(negedge clk);
      cycles++;
    end
    fail = test_fail;
  endtask

  initial begin
    int cyc;
    logic fl;
    rst_n = 1'b0; cs = 1'b0; we = 1'b0; test_start = 1'b0; fi_stuck = 1'b0;
    addr = '0; wdata = '0;
    #22 rst_n = 1'b1;
    // normal operation
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = DATA_W'($urandom);
      write(a, model[a]);
    end
    for (int a = 0; a < DEPTH; a++) begin
      addr = ADDR_W'(a);
      #1;
      check(rdata == model[a], $sformatf("read %0d got %h want %h", a, rdata, model[a]));
    end
    // self test on a good array
    run_test(cyc, fl);
    check(cyc == 10 * DEPTH + 1, $sformatf("test length %0d cycles, want %0d", cyc, 10 * DEPTH + 1));
    check(fl == 1'b0, "good array reported as failing");
    check(test_busy == 1'b0, "busy after done");
    for (int a = 0; a < DEPTH; a++) begin
      addr = ADDR_W'(a);
      #1;
      check(rdata == '0, $sformatf("word %0d not cleared by the test: %h", a, rdata));
    end
    // stuck-at-1 cell in word 5
    fi_stuck = 1'b1;
    run_test(cyc, fl);
    check(fl == 1'b1, "stuck-at fault not detected");
    check(cyc == 10 * DEPTH + 1, "test length with fault");
    // a new good test clears the result
    fi_stuck = 1'b0;
    run_test(cyc, fl);
    check(fl == 1'b0, "result not cleared by a passing test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
