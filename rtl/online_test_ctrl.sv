// online_test_ctrl: sequencer for the concurrent online testing of the
// memory modules.
//
// At any time one working module is "under test" and marked 1 in SR; the
// memory control unit maps the m logic modules onto the other working
// modules. Every TEST_PERIOD cycles (the period T) the mark moves to the
// nearest working neighbour k of the tested module h, first towards M1
// (decreasing order), then back towards M(m+2) (increasing order), so that
// a test cycle visits the modules as m+1, m, ..., 1, 2, ..., m+1. Moving the
// mark takes three steps: the contents of k are copied word by word into h
// while the host is stalled; SR(h) is cleared and SR(k) set in one clock;
// then the BIST of k is started. Because h and k are neighbours among the
// working modules, the i-th available module still holds logic module i
// after the swap. When a BIST fails, the module stays marked in SR and is
// recorded in failed; if a stand-by module is left (more than m modules
// available), the last available one becomes the new module under test and
// the sweep restarts towards M1; otherwise testing stops (halted) and the
// memory keeps running on the m remaining modules.
//
// Timing: test starts are exactly TEST_PERIOD cycles apart as long as the
// BIST and the copy fit in the period (TEST_PERIOD >= 11*2^ADDR_W + 8).
// The copy takes 2^ADDR_W cycles plus one cycle for the SR swap, during
// which stall is high. After reset the sequencer waits for enable, then
// tests M(m+2), which reset marks as under test.
// The order of testing and the three preparatory steps follow the paper,
// where the host processor carries them out; doing them in a hardware
// sequencer, the period counter and the handling of a failed module are
// this design's choices.
module online_test_ctrl
  import fts_pkg::*;
#(
  parameter int unsigned M           = 8,      // primary modules
  parameter int unsigned ADDR_W      = 10,     // word address bits per module
  parameter int unsigned TEST_PERIOD = 16384,  // T, cycles between test starts
  localparam int unsigned N          = M + 2,
  localparam int unsigned IW         = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,      // allow online testing to proceed
  // state register
  input  logic [N-1:0]      sr,
  output logic [N-1:0]      sr_set,
  output logic [N-1:0]      sr_clr,
  // BIST control of every module
  output logic [N-1:0]      test_start,
  input  logic [N-1:0]      test_done,
  input  logic [N-1:0]      test_fail,
  // data transfer
  output logic              copy_active, // copy cycle: src -> dst at copy_addr
  output logic [IW-1:0]     copy_src,
  output logic [IW-1:0]     copy_dst,
  output logic [ADDR_W-1:0] copy_addr,
  output logic              stall,       // host access not accepted
  // status
  output logic [IW-1:0]     under_test,  // module marked as under test
  output logic [N-1:0]      failed,      // modules retired after a failed BIST
  output logic              halted       // no spare left, testing stopped
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned COPY_AT = TEST_PERIOD - DEPTH - 2;

  seq_state_e        state;
  logic [IW-1:0]     hole;     // module under test
  logic [IW-1:0]     target;   // next module to test
  logic              dir_up;   // sweep direction
  logic [31:0]       cnt;      // cycles since the last test start
  logic [ADDR_W-1:0] caddr;

  // nearest working neighbour of the hole in each direction
  logic [IW-1:0] dn_k, up_k;
  logic          dn_found, up_found;
  always_comb begin
    dn_k = '0; dn_found = 1'b0;
    up_k = '0; up_found = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (i < int'(hole) && !failed[i]) begin
        dn_k = IW'(i); dn_found = 1'b1;          // keeps the largest below
      end
    end
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (i > int'(hole) && !failed[i]) begin
        up_k = IW'(i); up_found = 1'b1;          // keeps the smallest above
      end
    end
  end

  // available modules and the last of them (stand-by when more than m)
  int unsigned   n_avail;
  logic [IW-1:0] last_avail;
  always_comb begin
    n_avail    = 0;
    last_avail = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (!sr[i]) begin
        n_avail++;
        last_avail = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SEQ_IDLE;
      hole   <= IW'(N - 1);
      target <= IW'(N - 1);
      dir_up <= 1'b0;
      cnt    <= '0;
      caddr  <= '0;
      failed <= '0;
    end else begin
      cnt <= cnt + 1;
      unique case (state)
        SEQ_IDLE: if (enable) state <= SEQ_START;
        SEQ_HOLD: if (cnt >= TEST_PERIOD - 1 && enable) state <= SEQ_START;
        SEQ_START: begin
          cnt   <= 32'd1;
          state <= SEQ_TEST;
        end
        SEQ_TEST: if (test_done[hole]) begin
          if (test_fail[hole]) begin
            failed[hole] <= 1'b1;
            if (n_avail > M) begin
              // the stand-by module becomes the module under test
              hole   <= last_avail;
              target <= last_avail;
              dir_up <= 1'b0;
              state  <= SEQ_HOLD;
            end else begin
              state <= SEQ_HALT;
            end
          end else begin
            state <= SEQ_WAIT;
          end
        end
        SEQ_WAIT: if (cnt >= COPY_AT && enable && (dn_found || up_found)) begin
          if (dir_up ? up_found : !dn_found) begin
            target <= up_k;
            dir_up <= 1'b1;
          end else begin
            target <= dn_k;
            dir_up <= 1'b0;
          end
          caddr <= '0;
          state <= SEQ_COPY;
        end
        SEQ_COPY: begin
          caddr <= caddr + 1'b1;
          if (caddr == ADDR_W'(DEPTH - 1)) state <= SEQ_SWAP;
        end
        SEQ_SWAP: begin
          hole  <= target;
          state <= SEQ_START;
        end
        SEQ_HALT: ;
        default:  state <= SEQ_IDLE;
      endcase
    end
  end

  always_comb begin
    sr_set     = '0;
    sr_clr     = '0;
    test_start = '0;
    if (state == SEQ_SWAP) begin
      sr_clr[hole]   = 1'b1;
      sr_set[target] = 1'b1;
    end
    if (state == SEQ_TEST && test_done[hole] && test_fail[hole] && n_avail > M)
      sr_set[last_avail] = 1'b1;
    if (state == SEQ_START) test_start[hole] = 1'b1;
  end

  assign copy_active = (state == SEQ_COPY);
  assign copy_src    = target;
  assign copy_dst    = hole;
  assign copy_addr   = caddr;
  assign stall       = (state == SEQ_COPY) || (state == SEQ_SWAP);
  assign under_test  = hole;
  assign halted      = (state == SEQ_HALT);

  initial assert (TEST_PERIOD >= 11 * DEPTH + 8)
    else $error("online_test_ctrl: TEST_PERIOD too short for BIST and copy");

  // the module under test is always marked inoperable in SR
  property p_hole_marked;
    @(posedge clk) disable iff (!rst_n) (state inside {SEQ_TEST, SEQ_WAIT}) |-> sr[hole];
  endproperty
  a_hole_marked: assert property (p_hole_marked);
endmodule
