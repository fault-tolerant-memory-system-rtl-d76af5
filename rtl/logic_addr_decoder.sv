// logic_addr_decoder: one-hot logic address for the memory control unit.
//
// The host address is split into a logic-module field (upper bits) and an
// offset inside the module (lower bits). This decoder turns the module field
// into the one-hot logic address A1..Am the control unit works on, and only
// when a request is present; a field value of m or more addresses no module
// and leaves A all zero (out_of_range is raised). The paper states that
// only one logic address is active at a time; the binary field and its
// decoding are this design's choice. Purely combinational.
module logic_addr_decoder #(
  parameter int unsigned M     = 8,                     // primary modules
  parameter int unsigned SEL_W = (M > 1) ? $clog2(M) : 1 // module field width
) (
  input  logic             req,          // access requested
  input  logic [SEL_W-1:0] sel,          // logic module number, 0 = module 1
  output logic [M-1:0]     a,            // one-hot logic address
  output logic             out_of_range  // sel >= M with req
);
  always_comb begin
    a = '0;
    out_of_range = 1'b0;
    if (req) begin
      if (int'(sel) < int'(M)) a[sel] = 1'b1;
      else                     out_of_range = 1'b1;
    end
  end
endmodule
