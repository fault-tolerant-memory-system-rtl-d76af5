// tb_mem_ctrl_unit: exhaustive check of the cellular memory control unit at
// its default size (m = 8, ten modules): every state-register value and every
// one-hot logic address, plus no address.
// Reference: module j (0-based) is selected for logic module i (0-based) when
// SR(j) = 0, i = j - b, where b is the number of ones in SR below j, and
// b <= 2. The final count code must be that of min(ones(SR), 3).
module tb_mem_ctrl_unit
  import fts_pkg::*;
;
  localparam int M = 8;
  localparam int N = M + 2;

  logic [M-1:0] a;
  logic [N-1:0] sr, s, exp_s;
  cnt_code_t    x_total;
  int checks = 0, failures = 0;

  mem_ctrl_unit #(.M(M)) dut (.a(a), .sr(sr), .s(s), .x_total(x_total));

  function automatic logic [1:0] code(input int n);
    return (n == 0) ? 2'b00 : (n == 1) ? 2'b01 : (n == 2) ? 2'b10 : 2'b11;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int below, ones;
    for (int v = 0; v < (1 << N); v++) begin
      for (int i = -1; i < M; i++) begin
        sr = N'(v);
        a  = (i < 0) ? '0 : M'(1) << i;
        #1;
        exp_s = '0;
        below = 0;
        for (int j = 0; j < N; j++) begin
          if (!sr[j] && i >= 0 && below <= 2 && j - below == i) exp_s[j] = 1'b1;
          below += int'(sr[j]);
        end
        ones = below;
        checks++;
        if (s !== exp_s || x_total !== code(ones > 3 ? 3 : ones)) begin
          failures++;
          if (failures < 10)
            $display("FAIL sr=%b i=%0d: s=%b expected %b, x=%b", sr, i, s, exp_s, x_total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
