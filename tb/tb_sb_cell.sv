// tb_sb_cell: exhaustive check of the identical selection cell SBj.
// Reference: with c = number of inoperable modules among M1..M(j-1) (code 11
// meaning more than two), Mj is selected for A(j-c), c <= 2, when SRj = 0;
// the new code is that of min(c + SRj, 3).
module tb_sb_cell
  import fts_pkg::*;
;
  logic a_j, a_jm1, a_jm2, sr, s;
  cnt_code_t x_in, x_out;
  int checks = 0, failures = 0;

  sb_cell dut (.a_j(a_j), .a_jm1(a_jm1), .a_jm2(a_jm2), .x_in(x_in), .sr(sr),
               .s(s), .x_out(x_out));

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
    // d: active address is A(j-d); d = 3 means none
    for (int d = 0; d < 4; d++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 2; r++) begin
          a_j = (d == 0); a_jm1 = (d == 1); a_jm2 = (d == 2);
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
