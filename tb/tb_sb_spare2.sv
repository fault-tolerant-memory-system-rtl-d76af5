// tb_sb_spare2: exhaustive check of selection block SB(m+2).
// Reference: M(m+2) serves logic module m only when exactly two of
// M1..M(m+1) are inoperable and SR(m+2) = 0; the output code counts all
// m+2 modules, saturating at 11.
module tb_sb_spare2
  import fts_pkg::*;
;
  logic a_m, sr, s;
  cnt_code_t x_in, x_out;
  int checks = 0, failures = 0;

  sb_spare2 dut (.a_m(a_m), .x_in(x_in), .sr(sr), .s(s), .x_out(x_out));

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
    for (int am = 0; am < 2; am++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 2; r++) begin
          a_m = am[0]; x_in = code(c); sr = r[0];
          #1;
          checks++;
          if (s !== (am == 1 && c == 2 && r == 0) ||
              x_out !== code((c + r > 3) ? 3 : c + r)) begin
            failures++;
            $display("FAIL am=%0d c=%0d sr=%0d: s=%b x=%b", am, c, r, s, x_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
