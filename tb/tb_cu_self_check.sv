// tb_cu_self_check: drives every state-register value of ten modules with
// the correct count code and with each wrong one; err must flag exactly the
// wrong ones and mem_fail must follow "more than two ones".
module tb_cu_self_check
  import fts_pkg::*;
;
  localparam int N = 10;
  logic [N-1:0] sr;
  cnt_code_t    x_total;
  logic         err, mem_fail;
  int checks = 0, failures = 0;

  cu_self_check #(.N(N)) dut (.sr(sr), .x_total(x_total), .err(err), .mem_fail(mem_fail));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic [1:0] good;
    for (int v = 0; v < (1 << N); v++) begin
      sr = N'(v);
      ones = $countones(sr);
      good = (ones == 0) ? 2'b00 : (ones == 1) ? 2'b01 : (ones == 2) ? 2'b10 : 2'b11;
      for (int c = 0; c < 4; c++) begin
        x_total = 2'(c);
        #1;
        checks++;
        if (err !== (2'(c) != good) || mem_fail !== (ones > 2)) begin
          failures++;
          $display("FAIL sr=%b x=%0d: err=%b mem_fail=%b", sr, c, err, mem_fail);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
