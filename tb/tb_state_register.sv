// tb_state_register: reset value, random set/clear sequences against a
// model, and the one-cycle hand-over of the "under test" mark.
module tb_state_register;
  localparam int N = 10;
  logic clk = 1'b0, rst_n;
  logic [N-1:0] set, clr, sr, model;
  int checks = 0, failures = 0;

  state_register #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .set(set), .clr(clr), .sr(sr));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; set = '0; clr = '0;
    #12;
    checks++;
    if (sr !== 10'b10_0000_0000) begin
      failures++;
      $display("FAIL reset value %b", sr);
    end
    rst_n = 1'b1;
    model = 10'b10_0000_0000;
    // hand the mark from module 9 to module 8 in one clock
    @(negedge clk);
    clr = 10'b10_0000_0000; set = 10'b01_0000_0000;
    @(negedge clk);
    model = 10'b01_0000_0000;
    checks++;
    if (sr !== model) begin failures++; $display("FAIL swap %b", sr); end
    for (int k = 0; k < 500; k++) begin
      set = N'($urandom); clr = N'($urandom);
      if ($urandom_range(0, 1)) set = '0;
      @(negedge clk);
      model = (model & ~clr) | set;
      checks++;
      if (sr !== model) begin
        failures++;
        $display("FAIL step %0d: sr=%b model=%b", k, sr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
