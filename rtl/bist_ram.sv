// bist_ram: a RAM module with built-in self test (BIST-RAM).
//
// A DEPTH x DATA_W memory with an asynchronous-read, clocked-write port for
// normal use, and a March C- self test started by test_start:
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// where 0 and 1 are the all-zeros and all-ones word. Each read or write
// takes one clock, so a test lasts 10*DEPTH cycles: test_done pulses in the
// cycle after the last read, with test_fail holding the result until the
// next start. While test_busy is high the normal port is ignored. The test
// destroys the contents, which is why the system moves a module's data away
// before testing it.
// The paper builds the system from BIST-RAM devices and names the march
// test it uses only by reference; the March C- algorithm, the port timing and
// the sizes are this design's choices.
// fi_stuck is a fault-injection input for verification: when high, bit 0 of
// word FI_ADDR reads as 1 whatever was written (a stuck-at-1 cell). Tie it
// to 0 in use.
module bist_ram
  import fts_pkg::*;
#(
  parameter int unsigned ADDR_W  = 10,  // word address bits
  parameter int unsigned DATA_W  = 8,   // bits per word
  parameter int unsigned FI_ADDR = 0    // word hit by fi_stuck
) (
  input  logic              clk,
  input  logic              rst_n,
  // normal port
  input  logic              cs,        // module select
  input  logic              we,        // write enable (with cs)
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,     // combinational read of addr
  // self test
  input  logic              test_start, // one-cycle start pulse
  output logic              test_busy,
  output logic              test_done,  // one-cycle pulse at the end
  output logic              test_fail,  // result of the last test
  // verification hook
  input  logic              fi_stuck
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(DEPTH - 1);

  logic [DATA_W-1:0] mem [DEPTH];

  march_elem_e       elem;
  logic [ADDR_W-1:0] taddr;
  logic              phase;   // 0: read step of a (r,w) element, 1: write step

  // read path, with the injected cell fault
  function automatic logic [DATA_W-1:0] read_word(input logic [ADDR_W-1:0] a);
    logic [DATA_W-1:0] d;
    d = mem[a];
    if (fi_stuck && a == ADDR_W'(FI_ADDR)) d[0] = 1'b1;
    return d;
  endfunction

  assign rdata = read_word(addr);

  // per-element operation
  logic              op_write, op_read, wval, rexp, going_down, last_step;
  always_comb begin
    op_write   = 1'b0;
    op_read    = 1'b0;
    wval       = 1'b0;
    rexp       = 1'b0;
    going_down = 1'b0;
    unique case (elem)
      ME_W0_UP:   begin op_write = 1'b1; wval = 1'b0; end
      ME_R0W1_UP: begin op_read = ~phase; op_write = phase; rexp = 1'b0; wval = 1'b1; end
      ME_R1W0_UP: begin op_read = ~phase; op_write = phase; rexp = 1'b1; wval = 1'b0; end
      ME_R0W1_DN: begin op_read = ~phase; op_write = phase; rexp = 1'b0; wval = 1'b1; going_down = 1'b1; end
      ME_R1W0_DN: begin op_read = ~phase; op_write = phase; rexp = 1'b1; wval = 1'b0; going_down = 1'b1; end
      ME_R0_UP:   begin op_read = 1'b1; rexp = 1'b0; end
      default:    ;
    endcase
    // the address advances after the last operation of an element on it
    last_step = (elem == ME_W0_UP || elem == ME_R0_UP) ? 1'b1 : phase;
  end

  logic mismatch;
  assign mismatch = op_read && (read_word(taddr) != {DATA_W{rexp}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elem      <= ME_DONE;
      taddr     <= '0;
      phase     <= 1'b0;
      test_busy <= 1'b0;
      test_done <= 1'b0;
      test_fail <= 1'b0;
    end else begin
      test_done <= 1'b0;
      if (test_start && !test_busy) begin
        elem      <= ME_W0_UP;
        taddr     <= '0;
        phase     <= 1'b0;
        test_busy <= 1'b1;
        test_fail <= 1'b0;
      end else if (test_busy) begin
        if (mismatch) test_fail <= 1'b1;
        if (!last_step) begin
          phase <= 1'b1;
        end else begin
          phase <= 1'b0;
          if (taddr == (going_down ? '0 : LAST)) begin
            // element finished: next element, starting address by direction
            if (elem == ME_R0_UP) begin
              elem      <= ME_DONE;
              test_busy <= 1'b0;
              test_done <= 1'b1;
            end else begin
              elem  <= march_elem_e'(elem + 3'd1);
              taddr <= (elem == ME_R1W0_UP || elem == ME_R0W1_DN) ? LAST : '0;
            end
          end else begin
            taddr <= going_down ? taddr - 1'b1 : taddr + 1'b1;
          end
        end
      end
    end
  end

  // memory array: self-test writes or normal writes
  always_ff @(posedge clk) begin
    if (test_busy) begin
      if (op_write) mem[taddr] <= {DATA_W{wval}};
    end else if (cs && we) begin
      mem[addr] <= wdata;
    end
  end
endmodule
