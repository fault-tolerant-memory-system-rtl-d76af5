// fts_pkg: types shared by the fault-tolerant memory system.
//
// The memory control unit passes a two-bit "inoperable count" code from one
// selection block to the next. Bit x1 and bit x2 encode how many of the
// modules M1..Mj are marked inoperable in the state register:
//   {x2,x1} = 00 : none, 01 : one, 10 : two, 11 : more than two.
// This encoding is the one the selection-block equations are written in.
// The package also holds the state type of the online test sequencer and the
// march-element type of the BIST-RAM, which are choices of this design.
package fts_pkg;

  // Two-bit inoperable-count code carried along the selection-block chain.
  typedef struct packed {
    logic x2;  // set: two modules inoperable (or more than two, with x1)
    logic x1;  // set: one module inoperable (or more than two, with x2)
  } cnt_code_t;

  // Online test sequencer states.
  typedef enum logic [2:0] {
    SEQ_IDLE,   // waiting for test enable (first test after reset)
    SEQ_HOLD,   // waiting for the period to end before a test without copy
    SEQ_START,  // one-cycle start pulse to the BIST of the target module
    SEQ_TEST,   // BIST running
    SEQ_WAIT,   // BIST done, waiting for the next period
    SEQ_COPY,   // copying the next module into the freed module
    SEQ_SWAP,   // exchanging the two SR bits
    SEQ_HALT    // no spare left: online testing stopped
  } seq_state_e;

  // March C- elements run by the BIST-RAM.
  typedef enum logic [2:0] {
    ME_W0_UP,     // up   (w0)
    ME_R0W1_UP,   // up   (r0,w1)
    ME_R1W0_UP,   // up   (r1,w0)
    ME_R0W1_DN,   // down (r0,w1)
    ME_R1W0_DN,   // down (r1,w0)
    ME_R0_UP,     // up   (r0)
    ME_DONE
  } march_elem_e;

endpackage
