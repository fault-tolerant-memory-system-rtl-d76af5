// tb_sb_second: exhaustive check of selection block SB2.
// Reference: with c = number of inoperable modules among M1 (0 or 1), M2 is
// selected for A(2-c) when SR2 = 0; the new count is c + SR2, coded
// 0 -> {x2,x1}=00, 1 -> 01, 2 -> 10.
module tb_sb_second
  import fts_pkg::*;
;
  logic a1, a2, x_in, sr, s;
  cnt_code_t x_out;
  int checks = 0, failures = 0;

  sb_second dut (.a1(a1), .a2(a2), .x_in(x_in), .sr(sr), .s(s), .x_out(x_out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, n, d;
    logic exp_s;
    logic [1:0] exp_x;
    // d = 0: A2 active, d = 1: A1 active, d = 2: no address
    for (d = 0; d < 3; d++)
      for (c = 0; c < 2; c++)
        for (int r = 0; r < 2; r++) begin
          a2 = (d == 0); a1 = (d == 1); x_in = c[0]; sr = r[0];
          #1;
          exp_s = (r == 0) && (d == c);
          n = c + r;
          exp_x = (n == 0) ? 2'b00 : (n == 1) ? 2'b01 : 2'b10;
          checks++;
          if (s !== exp_s || x_out !== exp_x) begin
            failures++;
            $display("FAIL d=%0d c=%0d sr=%0d: s=%b x=%b", d, c, r, s, x_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
