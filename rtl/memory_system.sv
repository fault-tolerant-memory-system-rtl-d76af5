// memory_system: RAM with active redundancy and concurrent online testing.
//
// The memory is split into M equal logic modules held in M+2 identical
// BIST-RAM modules. At any time one working module is under self test and
// one (when no module has failed) is in stand-by; the state register SR marks
// the module under test and every failed module with 1. The memory control
// unit maps each logic module i onto the i-th module not marked in SR, so the
// host never sees which physical modules are in use. The online test
// sequencer walks the test across the modules, copying data out of each
// module before it is tested; a module whose BIST fails is retired and the
// stand-by module takes its place, so two module failures are tolerated.
//
// Host port: a request (req, we, addr, wdata) is carried out in the cycle it
// is presented while ready is high; reads are combinational through the
// control unit and the selected module (rdata valid in the same cycle),
// writes take effect at the clock edge. While ready is low (a module copy
// and the SR swap, 2^ADDR_W + 1 cycles once per TEST_PERIOD) requests are
// ignored and must be repeated. addr = {logic module number, word offset};
// module numbers of M or more select nothing and read 0.
// Status: sr and failed per module, the module under test, the control-unit
// self check (cu_err), mem_fail when more than two modules are inoperable,
// and test_halted when no spare is left for testing.
// fault_inject is a verification hook: bit j makes a cell of module j stuck,
// so that its next BIST fails. Tie it to 0 in use.
// The organisation (M+2 modules, SR, cellular control unit, online testing
// one module at a time in alternating order) is the paper's; the host
// port, the stall handshake and the sizes are this design's choices.
module memory_system
  import fts_pkg::*;
#(
  parameter int unsigned M           = 8,      // primary (logic) modules
  parameter int unsigned ADDR_W      = 10,     // word address bits per module
  parameter int unsigned DATA_W      = 8,      // bits per word
  parameter int unsigned TEST_PERIOD = 16384,  // cycles between test starts
  localparam int unsigned N          = M + 2,
  localparam int unsigned SEL_W      = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned IW         = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host port
  input  logic                    req,
  input  logic                    we,
  input  logic [SEL_W+ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0]       wdata,
  output logic [DATA_W-1:0]       rdata,
  output logic                    ready,
  // online test control and status
  input  logic                    test_enable,
  output logic [N-1:0]            sr,
  output logic [N-1:0]            failed,
  output logic [IW-1:0]           under_test,
  output logic                    test_halted,
  output logic                    cu_err,
  output logic                    mem_fail,
  output logic [1:0]              x_total,      // {x2,x1} of SB(m+2)
  output logic                    addr_error,   // request to a module number >= M
  // verification hook
  input  logic [N-1:0]            fault_inject
);
  logic [M-1:0]  a;
  logic          out_of_range;
  assign addr_error = out_of_range;
  logic [N-1:0]  s;
  cnt_code_t     xcode;

  logic [N-1:0]  sr_set, sr_clr;
  logic [N-1:0]  t_start, t_busy, t_done, t_fail;
  logic          copy_active, stall;
  logic [IW-1:0] copy_src, copy_dst;
  logic [ADDR_W-1:0] copy_addr;

  logic [DATA_W-1:0] mod_rdata [N];
  logic [DATA_W-1:0] src_data;

  assign ready = ~stall;

  logic_addr_decoder #(.M(M)) u_dec (
    .req          (req & ready),
    .sel          (addr[ADDR_W +: SEL_W]),
    .a            (a),
    .out_of_range (out_of_range)
  );

  state_register #(.N(N)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .set   (sr_set),
    .clr   (sr_clr),
    .sr    (sr)
  );

  mem_ctrl_unit #(.M(M)) u_cu (
    .a       (a),
    .sr      (sr),
    .s       (s),
    .x_total (xcode)
  );
  assign x_total = xcode;

  cu_self_check #(.N(N)) u_chk (
    .sr       (sr),
    .x_total  (xcode),
    .err      (cu_err),
    .mem_fail (mem_fail)
  );

  online_test_ctrl #(
    .M           (M),
    .ADDR_W      (ADDR_W),
    .TEST_PERIOD (TEST_PERIOD)
  ) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (test_enable),
    .sr          (sr),
    .sr_set      (sr_set),
    .sr_clr      (sr_clr),
    .test_start  (t_start),
    .test_done   (t_done),
    .test_fail   (t_fail),
    .copy_active (copy_active),
    .copy_src    (copy_src),
    .copy_dst    (copy_dst),
    .copy_addr   (copy_addr),
    .stall       (stall),
    .under_test  (under_test),
    .failed      (failed),
    .halted      (test_halted)
  );

  assign src_data = mod_rdata[copy_src];

  for (genvar j = 0; j < N; j++) begin : g_mod
    logic              m_cs, m_we;
    logic [ADDR_W-1:0] m_addr;
    logic [DATA_W-1:0] m_wdata;

    always_comb begin
      if (copy_active) begin
        m_cs    = (IW'(j) == copy_dst);
        m_we    = (IW'(j) == copy_dst);
        m_addr  = copy_addr;
        m_wdata = src_data;
      end else begin
        m_cs    = s[j];
        m_we    = we;
        m_addr  = addr[ADDR_W-1:0];
        m_wdata = wdata;
      end
    end

    bist_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
      .clk        (clk),
      .rst_n      (rst_n),
      .cs         (m_cs),
      .we         (m_we),
      .addr       (m_addr),
      .wdata      (m_wdata),
      .rdata      (mod_rdata[j]),
      .test_start (t_start[j]),
      .test_busy  (t_busy[j]),
      .test_done  (t_done[j]),
      .test_fail  (t_fail[j]),
      .fi_stuck   (fault_inject[j])
    );
  end

  // read data of the selected module (at most one select is active)
  always_comb begin
    rdata = '0;
    for (int j = 0; j < int'(N); j++)
      if (s[j]) rdata |= mod_rdata[j];
  end

  // the control unit never selects more than one module
  a_one_select: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s));
  // a module under self test is never selected for host access
  a_no_busy_select: assert property (@(posedge clk) disable iff (!rst_n) (s & t_busy) == '0);
endmodule
