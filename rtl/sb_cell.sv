// sb_cell: selection block SBj (j = 3..m) of the memory control unit.
//
// All the cells SB3..SBm are identical. Module Mj is selected, when it is
// operable, for logic address Aj if none of M1..M(j-1) is inoperable, for
// A(j-1) if one is, and for A(j-2) if two are:
//   Sj = ~SRj & ( Aj & ~x1 & ~x2 | A(j-1) & x1 & ~x2 | A(j-2) & ~x1 & x2 )
// with {x2,x1} the count code of M1..M(j-1). The cell then adds SRj to the
// count, saturating at "more than two" (code 11):
//   x1' = ~x2 & (x1 ^ SRj) | x2 & (x1 | SRj),  x2' = x2 | x1 & SRj.
// The x2' equation is the paper's. For x1' this design follows the
// paper's definition of the code (count kept at one when SRj = 0), which
// needs the term x1 & ~x2 & ~SRj that the paper's simplified x1 equation
// lacks.
// Purely combinational; address to select is two gate levels.
module sb_cell
  import fts_pkg::*;
(
  input  logic      a_j,    // logic address j
  input  logic      a_jm1,  // logic address j-1
  input  logic      a_jm2,  // logic address j-2
  input  cnt_code_t x_in,   // count code of M1..M(j-1)
  input  logic      sr,     // SRj
  output logic      s,      // select module Mj
  output cnt_code_t x_out   // count code of M1..Mj
);
  logic p0_n, p1_n, p2_n;

  always_comb begin
    // NAND-NAND form: one NAND per product term, one NAND for the sum;
    // only the address inputs are on the access path
    p0_n = ~(~sr & a_j   & ~x_in.x1 & ~x_in.x2);
    p1_n = ~(~sr & a_jm1 &  x_in.x1 & ~x_in.x2);
    p2_n = ~(~sr & a_jm2 & ~x_in.x1 &  x_in.x2);
    s    = ~(p0_n & p1_n & p2_n);
    x_out.x1 = (~x_in.x2 & (x_in.x1 ^ sr)) | (x_in.x2 & (x_in.x1 | sr));
    x_out.x2 = x_in.x2 | (x_in.x1 & ~x_in.x2 & sr);
  end
endmodule
