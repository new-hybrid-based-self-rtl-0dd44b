// three_phase_clk: the test-clock generator of CSIG_GEN.
//
// A delay tick is produced every N+1 system clocks (N = IC(3:0)); with the
// 20 ns system clock the tick spacing is 20*(N+1) ns, which is the phase
// delay of the clock table. A phase counter runs 0..5 on the ticks, so one
// test-clock period is six ticks, 120*(N+1) ns (240 ns / 4.17 MHz for N = 1
// up to 1920 ns / 520.8 kHz for N = 15). From it come three clocks with 50 %
// duty, each one delay later than the previous:
//   GCLK_TPG high in phases 0,1,2  - the pattern generator steps on its rise
//   GCLK_CUT high in phases 1,2,3  - clocks the circuit under test
//   GCLK_SIG high in phases 2,3,4  - the signature analyser samples on its fall
// so a new pattern has five delays to settle in the circuit before it is
// sampled.
//
// Clock source: with sw_clk = 0 the ticks come from the internal divider;
// with sw_clk = 1 every edge (rising or falling) of the external clock
// clk_ext, after a two-flop synchroniser, is one tick. clk_syc toggles on
// every tick, so a second tester whose clk_ext is fed from clk_syc runs
// with the same tick stream (exact when both share the system clock,
// reliable for N >= 1 otherwise).
//
// Interface: clk, rst (synchronous, active high), run (phases advance only
// while high, and restart from phase 0), n[3:0], sw_clk, clk_ext; out: the
// three levels, one-cycle strobes tpg_rise, cut_rise, cut_fall, sig_fall,
// tick, and clk_syc.
//
// The period and delay formulas, the three phases and the clock selection
// follow the tester's description; the phase positions inside the period
// and the way the external clock is used are this design's choice.
module three_phase_clk (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  input  logic [3:0] n,
  input  logic       sw_clk,
  input  logic       clk_ext,
  output logic       gclk_tpg,
  output logic       gclk_cut,
  output logic       gclk_sig,
  output logic       tpg_rise,
  output logic       cut_rise,
  output logic       cut_fall,
  output logic       sig_fall,
  output logic       tick,
  output logic       clk_syc
);

  logic [3:0] div_q;
  logic       int_tick;
  logic [2:0] ext_s;
  logic       ext_tick;
  logic [2:0] ph_q;
  logic [2:0] ph_next;
  logic       started_q;
  logic       syc_q;

  // Internal divider: one tick every n+1 clocks.
  always_ff @(posedge clk) begin
    if (rst || !run || int_tick) div_q <= '0;
    else                         div_q <= div_q + 4'd1;
  end
  assign int_tick = run && (div_q == n);

  // External clock: synchronise and take both edges.
  always_ff @(posedge clk) begin
    if (rst) ext_s <= '0;
    else     ext_s <= {ext_s[1:0], clk_ext};
  end
  assign ext_tick = run && (ext_s[2] != ext_s[1]);

  assign tick = sw_clk ? ext_tick : int_tick;

  // Phase counter. The first tick after run rises enters phase 0.
  assign ph_next = !started_q ? 3'd0 : (ph_q == 3'd5) ? 3'd0 : ph_q + 3'd1;

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      ph_q      <= 3'd5;
      started_q <= 1'b0;
    end else if (tick) begin
      ph_q      <= ph_next;
      started_q <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       syc_q <= 1'b0;
    else if (tick) syc_q <= !syc_q;
  end
  assign clk_syc = syc_q;

  assign gclk_tpg = started_q && (ph_q <= 3'd2);
  assign gclk_cut = started_q && (ph_q >= 3'd1) && (ph_q <= 3'd3);
  assign gclk_sig = started_q && (ph_q >= 3'd2) && (ph_q <= 3'd4);

  assign tpg_rise = tick && (ph_next == 3'd0);
  assign cut_rise = tick && started_q && (ph_next == 3'd1);
  assign cut_fall = tick && started_q && (ph_next == 3'd4);
  assign sig_fall = tick && started_q && (ph_next == 3'd5);

endmodule
