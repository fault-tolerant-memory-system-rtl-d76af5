// cu_self_check: checks the memory control unit against the state register.
//
// The count code {x2,x1} leaving the last selection block must match the
// number of ones in SR: 00 for none, 01 for one, 10 for two, 11 for more.
// This block counts the ones in SR independently and raises err on a
// mismatch; mem_fail is raised when more than two modules are inoperable, so
// that fewer than m modules remain and some logic modules are unreachable.
// The paper lets the host processor make this comparison; doing it in
// hardware here is this design's choice. Purely combinational.
module cu_self_check
  import fts_pkg::*;
#(
  parameter int unsigned N = 10  // number of modules, m + 2
) (
  input  logic [N-1:0] sr,        // state register
  input  cnt_code_t    x_total,   // count code from SB(m+2)
  output logic         err,       // control unit disagrees with SR
  output logic         mem_fail   // more than two modules inoperable
);
  localparam cnt_code_t CNT_NONE = '{x2: 1'b0, x1: 1'b0};
  localparam cnt_code_t CNT_ONE  = '{x2: 1'b0, x1: 1'b1};
  localparam cnt_code_t CNT_TWO  = '{x2: 1'b1, x1: 1'b0};
  localparam cnt_code_t CNT_MANY = '{x2: 1'b1, x1: 1'b1};

  int unsigned ones;
  cnt_code_t   expect_code;

  always_comb begin
    ones = 0;
    for (int i = 0; i < int'(N); i++) ones += int'(sr[i]);
    unique case (ones)
      0:       expect_code = CNT_NONE;
      1:       expect_code = CNT_ONE;
      2:       expect_code = CNT_TWO;
      default: expect_code = CNT_MANY;
    endcase
    err      = (x_total != expect_code);
    mem_fail = (ones > 2);
  end
endmodule
