// tb_sb_first: exhaustive check of selection block SB1.
// M1 must be selected exactly when A1 is active and SR1 is 0, and the count
// output must equal SR1.
module tb_sb_first;
  logic a1, sr, s, x;
  int checks = 0, failures = 0;

  sb_first dut (.a1(a1), .sr(sr), .s(s), .x(x));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a1, sr} = 2'(i);
      #1;
      checks++;
      if (s !== (a1 && !sr) || x !== sr) begin
        failures++;
        $display("FAIL a1=%b sr=%b: s=%b x=%b", a1, sr, s, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
