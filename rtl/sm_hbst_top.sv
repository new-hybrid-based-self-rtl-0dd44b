// sm_hbst_top: the signature multi-mode hardware-based self-test (SM-HBST)
// tester, the external half of the hybrid self-test of a microcontroller
// board.
//
// The tester drives up to 48 inputs of a circuit under test (CUT) with test
// patterns on GTPG(47:0), clocks the CUT with GCLK_CUT and clears it with
// CLR_CUT, and compacts the response of one probed node, DATA, into a
// 24-bit signature SIG(23:0) that is compared with the signature of a
// known-good board. The microcontroller on that board runs its own test
// subroutines and puts their results on its port pins, where this tester
// probes them like any other node. The blocks are:
//   cu_det    the PC interface: CPort decoder, IC(15:0) and TPG_IS(47:0)
//   csig_gen  three-phase test clocks, test gate, single-shot clocks
//   tpg       pseudorandom and deterministic pattern generators, HPDT mix
//   trc       signature analyser (degree 23) and edge detection compactor
//   status_port, seg7_display, debouncer  the board-level interface
//
// Test modes (IC(6:4)):
//   0 PRT   pseudorandom patterns, internal three-phase clocks and test gate
//   1 DET   deterministic patterns from the PC; the PC gives DCLK_TPG,
//           DCLK_CUT and DCLK_SIG through CPort, IC(11) clears the SA and
//           IC(12) clears the CUT
//   2 DET programming, handled as mode 1
//   3 HPDT  GTPG(47:DET_LSB) deterministic, the rest pseudorandom, with the
//           internal clocks and gate as in mode 0
//   4/5 SS  the EDC measures the time between edges of DATA in us / ms; the
//           trigger patterns come from DET_TPG under PC control
//   6, 7    unused codes, handled as mode 1
// In modes 0 and 3 the gate is opened once per rising edge of ENABLE
// (MOD_SEL low) or repeatedly while ENABLE is high (MOD_SEL high); ST goes
// high when a new signature is held on SIG.
//
// Interface: clk_int is the 50 MHz system clock; clk_ext the external
// clock used when SW_CLK is high; clk_syc synchronises a second tester.
// mclr_n (active low) and the three switches are debounced for
// DEB_CYCLES clocks; the master clear is held for that long after power-up.
// The PC ports dport/cport/status and the probe data are asynchronous.
//
// The blocks, modes, ports and code layout follow the tester's description;
// the single system clock with enable strobes, the handling of mode 2, the
// use of the PC clocks in the SS modes and the board-level details are this
// design's choices, stated in each block.
module sm_hbst_top
  import hbst_pkg::*;
#(
  parameter int unsigned CLK_PERIOD_NS  = 20,
  parameter int unsigned DEB_CYCLES     = 1000000,
  parameter int unsigned REFRESH_CYCLES = 50000,
  parameter int unsigned DET_LSB        = 42
) (
  input  logic             clk_int,
  input  logic             clk_ext,
  input  logic             mclr_n,
  input  logic             enable_sw,
  input  logic             mod_sel_sw,
  input  logic             sw_clk_sw,
  input  logic [7:0]       dport,
  input  logic [3:0]       cport,
  output logic [3:0]       status,
  input  logic             data,
  output logic [TPG_W-1:0] gtpg,
  output logic             gclk_tpg,
  output logic             gclk_cut,
  output logic             gclk_sig,
  output logic             clr_cut,
  output logic             clk_syc,
  output logic             test_gate,
  output logic             st,
  output logic [23:0]      sig,
  output logic [6:0]       seg_n,
  output logic [5:0]       an_n
);

  logic clk;
  assign clk = clk_int;

  // Board inputs.
  logic mclr_db, enable, mod_sel, sw_clk, rst;

  debouncer #(.CYCLES(DEB_CYCLES), .INIT(1'b0)) u_db_mclr (
    .clk(clk), .din(mclr_n), .dout(mclr_db));
  debouncer #(.CYCLES(DEB_CYCLES), .INIT(1'b0)) u_db_en (
    .clk(clk), .din(enable_sw), .dout(enable));
  debouncer #(.CYCLES(DEB_CYCLES), .INIT(1'b0)) u_db_mod (
    .clk(clk), .din(mod_sel_sw), .dout(mod_sel));
  debouncer #(.CYCLES(DEB_CYCLES), .INIT(1'b0)) u_db_clk (
    .clk(clk), .din(sw_clk_sw), .dout(sw_clk));

  assign rst = !mclr_db;

  // PC interface.
  logic [7:0]       pdata;
  det_ctl_t         ctl;
  ic_t              ic;
  logic [TPG_W-1:0] tpg_is;

  cu_det u_cu_det (
    .clk    (clk),
    .rst    (rst),
    .cport  (cport),
    .dport  (dport),
    .data   (pdata),
    .ctl    (ctl),
    .ic     (ic),
    .tpg_is (tpg_is)
  );

  test_mode_e mode;
  logic       gate_mode;

  assign mode      = test_mode_e'(ic.mode);
  assign gate_mode = (mode == MODE_PRT) || (mode == MODE_HPDT);

  // Clocks, gate and single-shot clocks.
  logic g_tpg, g_cut, g_sig, g_cut_rise, gate_clr, tpg_load, tpg_step;
  logic gate_shift, gate_done, ss_tick, ed_tick;

  csig_gen #(.CLK_PERIOD_NS(CLK_PERIOD_NS)) u_csig (
    .clk       (clk),
    .rst       (rst),
    .enable    (enable && gate_mode),
    .mod_sel   (mod_sel),
    .sw_clk    (sw_clk),
    .clk_ext   (clk_ext),
    .ic_n      (ic.clk_div),
    .gate_code (ic.gate_code),
    .ms_range  (mode == MODE_SS_MS),
    .gclk_tpg  (g_tpg),
    .gclk_cut  (g_cut),
    .gclk_sig  (g_sig),
    .cut_rise  (g_cut_rise),
    .clk_syc   (clk_syc),
    .test_gate (test_gate),
    .gate_clr  (gate_clr),
    .tpg_load  (tpg_load),
    .tpg_step  (tpg_step),
    .sa_shift  (gate_shift),
    .gate_done (gate_done),
    .st        (st),
    .ss_tick   (ss_tick),
    .ed_tick   (ed_tick)
  );

  // Pattern generation.
  tpg #(.DET_LSB(DET_LSB)) u_tpg (
    .clk      (clk),
    .rst      (rst),
    .mode     (ic.mode),
    .data     (pdata),
    .byte_ld  (ctl.byte_ld),
    .det_xfer (ctl.tpg_rise),
    .seed     (tpg_is),
    .prt_load (tpg_load),
    .prt_step (tpg_step),
    .gtpg     (gtpg)
  );

  // Response compaction.
  logic [23:0] sa_sig;
  logic        ss_new;

  trc u_trc (
    .clk       (clk),
    .rst       (rst),
    .data      (data),
    .mode      (ic.mode),
    .sa_clr    (gate_mode ? gate_clr   : ic.clr_sa),
    .sa_shift  (gate_mode ? gate_shift : ctl.sig_fall),
    .gate_done (gate_done),
    .ed_tick   (ed_tick),
    .ss_tick   (ss_tick),
    .sig       (sig),
    .sa_sig    (sa_sig),
    .ss_new    (ss_new)
  );

  // Clocks and clear towards the CUT.
  assign gclk_tpg = gate_mode ? g_tpg    : ctl.dclk_tpg;
  assign gclk_cut = gate_mode ? g_cut    : ctl.dclk_cut;
  assign gclk_sig = gate_mode ? g_sig    : ctl.dclk_sig;
  assign clr_cut  = gate_mode ? gate_clr : ic.clr_cut;

  status_port u_status (
    .clk       (clk),
    .rst       (rst),
    .sel       (ic.stat_sel),
    .sig       (sig),
    .st        (st),
    .test_gate (test_gate),
    .ss_new    (ss_new),
    .status    (status)
  );

  seg7_display #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_seg (
    .clk   (clk),
    .rst   (rst),
    .value (sig),
    .seg_n (seg_n),
    .an_n  (an_n)
  );

endmodule
