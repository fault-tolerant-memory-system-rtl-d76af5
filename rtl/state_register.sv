// state_register: the state register SR of the memory system.
//
// One bit per module; 1 marks the module inoperable, either because it failed
// its self test or because it is the module currently under test, and the
// memory control unit then skips it. Bits are changed with a set mask and a
// clear mask in the same cycle (set wins), which lets the test sequencer
// hand the "under test" mark from one module to its neighbour in a single
// clock, so the address mapping never sees an intermediate state.
// Reset marks the last module, M(m+2), as the first module under test, the
// starting point of the test cycle; the masks and the reset value are this
// design's choices; the register itself and its meaning follow the paper.
// Timing: new value visible the cycle after set/clr.
module state_register #(
  parameter int unsigned N = 10  // number of modules, m + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] set,  // bits to mark inoperable
  input  logic [N-1:0] clr,  // bits to mark available
  output logic [N-1:0] sr    // current state register
);
  localparam logic [N-1:0] RESET_VALUE = {1'b1, {(N-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= RESET_VALUE;
    else        sr <= (sr & ~clr) | set;
  end
endmodule
