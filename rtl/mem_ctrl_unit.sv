// mem_ctrl_unit: the cellular memory control unit (m primary + 2 additional
// modules).
//
// Given a one-hot logic address A[0..M-1] (A[i] stands for logic module i+1)
// and the state register SR[0..M+1] (1 = module inoperable: failed or under
// test), it raises the select S[j] of the module that holds logic module i:
// the i-th module counted from M1 upward, skipping those marked in SR. It is a
// chain of selection blocks SB1, SB2, SB3..SBm (identical), SB(m+1) and
// SB(m+2); each passes the two-bit inoperable count of the modules to its left
// to the next. Up to two inoperable modules are tolerated; with more, the
// logic modules past the third inoperable module are not selected and
// x_total reads 11.
//
// Purely combinational. The address-to-select path crosses only the gates of
// one selection block (two levels); the count chain ripples through all
// cells but depends only on SR, which changes rarely. The structure is the
// paper's; parameter and port names are this design's. M >= 2.
module mem_ctrl_unit
  import fts_pkg::*;
#(
  parameter int unsigned M = 8  // number of primary (logic) modules
) (
  input  logic [M-1:0]   a,       // one-hot logic address, bit i = A(i+1)
  input  logic [M+1:0]   sr,      // state register, bit j = SR(j+1)
  output logic [M+1:0]   s,       // module selects, bit j = S(j+1)
  output cnt_code_t      x_total  // {x2,x1} of SB(m+2): count over all modules
);
  // count code leaving each cell; x_chain[j] covers modules M1..M(j+1)
  cnt_code_t x_chain [M+2];
  logic      x_first;

  sb_first u_sb1 (
    .a1 (a[0]),
    .sr (sr[0]),
    .s  (s[0]),
    .x  (x_first)
  );
  assign x_chain[0] = '{x2: 1'b0, x1: x_first};

  sb_second u_sb2 (
    .a1    (a[0]),
    .a2    (a[1]),
    .x_in  (x_first),
    .sr    (sr[1]),
    .s     (s[1]),
    .x_out (x_chain[1])
  );

  for (genvar j = 2; j < M; j++) begin : g_cell
    sb_cell u_sbj (
      .a_j   (a[j]),
      .a_jm1 (a[j-1]),
      .a_jm2 (a[j-2]),
      .x_in  (x_chain[j-1]),
      .sr    (sr[j]),
      .s     (s[j]),
      .x_out (x_chain[j])
    );
  end

  sb_spare1 u_sbm1 (
    .a_m   (a[M-1]),
    .a_mm1 (a[M-2]),
    .x_in  (x_chain[M-1]),
    .sr    (sr[M]),
    .s     (s[M]),
    .x_out (x_chain[M])
  );

  sb_spare2 u_sbm2 (
    .a_m   (a[M-1]),
    .x_in  (x_chain[M]),
    .sr    (sr[M+1]),
    .s     (s[M+1]),
    .x_out (x_chain[M+1])
  );

  assign x_total = x_chain[M+1];

  initial assert (M >= 2) else $error("mem_ctrl_unit: M must be at least 2");
endmodule
