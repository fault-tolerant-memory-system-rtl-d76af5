// tb_sb_spare1: exhaustive check of selection block SB(m+1).
// Reference: with c inoperable modules among M1..Mm (code 11 = more than
// two), M(m+1) serves logic module m+1-c, which exists only for c = 1
// (Am) and c = 2 (A(m-1)), and only when SR(m+1) = 0; the code is extended
// with SR(m+1), saturating at 11.
module tb_sb_spare1
  import fts_pkg::*;
;
  logic a_m, a_mm1, sr, s;
  cnt_code_t x_in, x_out;
  int checks = 0, failures = 0;

  sb_spare1 dut (.a_m(a_m), .a_mm1(a_mm1), .x_in(x_in), .sr(sr), .s(s), .x_out(x_out));

  function automatic logic [1:0] code(input int n);
    return (n == 0) ? 2'b00 : (n == 1) ? 2'b01 : (n == 2) ? 2'b10 : 2'b11;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_s;
    // d: active address is A(m+1-d); d = 1 -> Am, d = 2 -> A(m-1), d = 3 none
    for (int d = 1; d < 4; d++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 2; r++) begin
          a_m = (d == 1); a_mm1 = (d == 2);
          x_in = code(c); sr = r[0];
          #1;
          exp_s = (r == 0) && (d == c) && (d < 3);
          checks++;
          if (s !== exp_s || x_out !== code((c + r > 3) ? 3 : c + r)) begin
            failures++;
            $display("FAIL d=%0d c=%0d sr=%0d: s=%b x=%b", d, c, r, s, x_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
