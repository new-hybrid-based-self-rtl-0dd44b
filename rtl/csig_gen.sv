// csig_gen: clock and control-signal generator (CSIG_GEN) of the tester.
//
// It produces every timing signal the tester itself generates:
//  - the three-phase test clocks GCLK_TPG, GCLK_CUT, GCLK_SIG and their
//    strobes (three_phase_clk), from the internal clock or from CLK_EXT;
//  - the test gate, the clear signals at its start, the pattern-generator
//    and signature-analyser strobes and ST (test_gate_ctrl);
//  - the two single-shot clocks as strobes: CLK_SS at 1 MHz and CLK_ED at
//    5 MHz in the microsecond range, CLK_SS at 1 kHz and CLK_ED at 1 MHz in
//    the millisecond range (ms_range = 1).
// The three-phase clocks run only while enable is high.
//
// Interface: clk (system clock, CLK_PERIOD_NS ns), rst (synchronous, active
// high), enable, mod_sel, sw_clk, clk_ext, ic_n (IC(3:0)), gate_code
// (IC(10:7)), ms_range; outputs as described above.
//
// The clock rates and the signals follow the tester's description; the
// 50 MHz system clock (20 ns, the step of the delay column of the clock
// table) is this design's choice. Each divider needs CLK_PERIOD_NS to
// divide its period.
module csig_gen #(
  parameter int unsigned CLK_PERIOD_NS = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       mod_sel,
  input  logic       sw_clk,
  input  logic       clk_ext,
  input  logic [3:0] ic_n,
  input  logic [3:0] gate_code,
  input  logic       ms_range,
  output logic       gclk_tpg,
  output logic       gclk_cut,
  output logic       gclk_sig,
  output logic       cut_rise,
  output logic       clk_syc,
  output logic       test_gate,
  output logic       gate_clr,
  output logic       tpg_load,
  output logic       tpg_step,
  output logic       sa_shift,
  output logic       gate_done,
  output logic       st,
  output logic       ss_tick,
  output logic       ed_tick
);

  localparam int unsigned SS_US_DIV = 1000 / CLK_PERIOD_NS;
  localparam int unsigned SS_MS_DIV = 1000000 / CLK_PERIOD_NS;
  localparam int unsigned ED_US_DIV = 200 / CLK_PERIOD_NS;
  localparam int unsigned ED_MS_DIV = 1000 / CLK_PERIOD_NS;

  logic tpg_rise, cut_fall, sig_fall, tick;

  three_phase_clk u_clk (
    .clk      (clk),
    .rst      (rst),
    .run      (enable),
    .n        (ic_n),
    .sw_clk   (sw_clk),
    .clk_ext  (clk_ext),
    .gclk_tpg (gclk_tpg),
    .gclk_cut (gclk_cut),
    .gclk_sig (gclk_sig),
    .tpg_rise (tpg_rise),
    .cut_rise (cut_rise),
    .cut_fall (cut_fall),
    .sig_fall (sig_fall),
    .tick     (tick),
    .clk_syc  (clk_syc)
  );

  test_gate_ctrl u_gate (
    .clk       (clk),
    .rst       (rst),
    .enable    (enable),
    .mod_sel   (mod_sel),
    .gate_code (gate_code),
    .tpg_rise  (tpg_rise),
    .sig_fall  (sig_fall),
    .test_gate (test_gate),
    .clr       (gate_clr),
    .tpg_load  (tpg_load),
    .tpg_step  (tpg_step),
    .sa_shift  (sa_shift),
    .done      (gate_done),
    .st        (st)
  );

  // Single-shot clocks.
  logic [31:0] ss_cnt_q, ed_cnt_q;
  logic [31:0] ss_div, ed_div;

  assign ss_div = ms_range ? SS_MS_DIV : SS_US_DIV;
  assign ed_div = ms_range ? ED_MS_DIV : ED_US_DIV;

  always_ff @(posedge clk) begin
    if (rst || ss_tick) ss_cnt_q <= '0;
    else                ss_cnt_q <= ss_cnt_q + 32'd1;
  end

  always_ff @(posedge clk) begin
    if (rst || ed_tick) ed_cnt_q <= '0;
    else                ed_cnt_q <= ed_cnt_q + 32'd1;
  end

  assign ss_tick = (ss_cnt_q + 32'd1 >= ss_div);
  assign ed_tick = (ed_cnt_q + 32'd1 >= ed_div);

endmodule
