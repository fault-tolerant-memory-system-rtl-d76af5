// sb_second: selection block SB2 of the memory control unit.
//
// Module M2 is selected for logic address A2 when M1 and M2 are operable,
// and for A1 when M1 is inoperable and M2 operable:
//   S2 = ~SR2 & A2 & ~x1  |  ~SR2 & A1 & x1.
// It turns the one-bit count of SB1 into the two-bit code {x2,x1} used by
// the later cells: x1 = x ^ SR2 (exactly one of M1,M2 inoperable), x2 = x & SR2
// (both inoperable). Purely combinational; the address-to-select path is two
// gate levels. The equations are the paper's; port names are this design's.
module sb_second
  import fts_pkg::*;
(
  input  logic      a1,     // logic address 1
  input  logic      a2,     // logic address 2
  input  logic      x_in,   // count from SB1 (M1 inoperable)
  input  logic      sr,     // SR2
  output logic      s,      // select module M2
  output cnt_code_t x_out   // count code for M1..M2
);
  logic p0_n, p1_n;

  always_comb begin
    // NAND-NAND form, address inputs on the access path only
    p0_n     = ~(~sr & a2 & ~x_in);
    p1_n     = ~(~sr & a1 &  x_in);
    s        = ~(p0_n & p1_n);
    x_out.x1 = (x_in & ~sr) | (~x_in & sr);
    x_out.x2 = x_in & sr;
  end
endmodule
