// sb_spare2: selection block SB(m+2), for the second additional module.
//
// Module M(m+2) is used only when two of M1..M(m+1) are inoperable; it then
// holds logic module m:
//   S(m+2) = ~SR(m+2) & Am & ~x1 & x2.
// Its count output {x2,x1} covers all m+2 modules and is brought out so the
// host (or cu_self_check) can compare it with the number of ones in SR, which
// is how the paper proposes to test the control unit.
// Purely combinational.
module sb_spare2
  import fts_pkg::*;
(
  input  logic      a_m,    // logic address m
  input  cnt_code_t x_in,   // count code of M1..M(m+1)
  input  logic      sr,     // SR(m+2)
  output logic      s,      // select module M(m+2)
  output cnt_code_t x_out   // count code of all m+2 modules
);
  always_comb begin
    s = ~sr & a_m & ~x_in.x1 & x_in.x2;
    x_out.x1 = (~x_in.x2 & (x_in.x1 ^ sr)) | (x_in.x2 & (x_in.x1 | sr));
    x_out.x2 = x_in.x2 | (x_in.x1 & ~x_in.x2 & sr);
  end
endmodule
