// sb_spare1: selection block SB(m+1), for the first additional module.
//
// Module M(m+1) takes logic address Am when one of M1..Mm is inoperable and
// A(m-1) when two are:
//   S(m+1) = ~SR(m+1) & ( Am & x1 & ~x2 | A(m-1) & ~x1 & x2 ).
// It never serves Am with no failure, since then M1..Mm hold all m logic
// modules. The count code is extended with SR(m+1) as in the SBj cells.
// Purely combinational; equations after the paper, port names this
// design's.
module sb_spare1
  import fts_pkg::*;
(
  input  logic      a_m,    // logic address m
  input  logic      a_mm1,  // logic address m-1
  input  cnt_code_t x_in,   // count code of M1..Mm
  input  logic      sr,     // SR(m+1)
  output logic      s,      // select module M(m+1)
  output cnt_code_t x_out   // count code of M1..M(m+1)
);
  logic p0_n, p1_n;

  always_comb begin
    // NAND-NAND form, address inputs on the access path only
    p0_n = ~(~sr & a_m   &  x_in.x1 & ~x_in.x2);
    p1_n = ~(~sr & a_mm1 & ~x_in.x1 &  x_in.x2);
    s    = ~(p0_n & p1_n);
    x_out.x1 = (~x_in.x2 & (x_in.x1 ^ sr)) | (x_in.x2 & (x_in.x1 | sr));
    x_out.x2 = x_in.x2 | (x_in.x1 & ~x_in.x2 & sr);
  end
endmodule
