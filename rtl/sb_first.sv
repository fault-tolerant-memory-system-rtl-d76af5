// sb_first: selection block SB1 of the memory control unit.
//
// Module M1 is selected when it is operable (SR1 = 0) and the first logic
// address A1 is active: S1 = ~SR1 & A1. The block also starts the chain of
// inoperable counts with x1 = SR1, the count of failed modules among M1, so
// that output is the SR1 input passed on to SB2.
// Purely combinational; A1 to S1 is one gate level (two in a NAND-NAND form).
// The equation follows the paper; the port names are this design's.
module sb_first (
  input  logic a1,   // logic address 1 active
  input  logic sr,   // SR1: module M1 inoperable
  output logic s,    // select module M1
  output logic x     // count code for M1 (1 = M1 inoperable)
);
  always_comb begin
    s = ~sr & a1;
    x = sr;
  end
endmodule
