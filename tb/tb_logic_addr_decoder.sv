// tb_logic_addr_decoder: every field value, with and without a request, for
// m = 8 (a full field) and m = 5 (values 5..7 out of range).
module tb_logic_addr_decoder;
  logic       req8, req5;
  logic [2:0] sel8, sel5;
  logic [7:0] a8;
  logic [4:0] a5;
  logic       oor8, oor5;
  int checks = 0, failures = 0;

  logic_addr_decoder #(.M(8)) dut8 (.req(req8), .sel(sel8), .a(a8), .out_of_range(oor8));
  logic_addr_decoder #(.M(5)) dut5 (.req(req5), .sel(sel5), .a(a5), .out_of_range(oor5));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 8; v++) begin
        req8 = r[0]; req5 = r[0]; sel8 = 3'(v); sel5 = 3'(v);
        #1;
        checks += 2;
        if (a8 !== (r ? 8'(1) << v : 8'h0) || oor8 !== 1'b0) begin
          failures++;
          $display("FAIL m=8 req=%0d sel=%0d a=%b", r, v, a8);
        end
        if (a5 !== ((r && v < 5) ? 5'(1) << v : 5'h0) || oor5 !== (r && v >= 5)) begin
          failures++;
          $display("FAIL m=5 req=%0d sel=%0d a=%b oor=%b", r, v, a5, oor5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
