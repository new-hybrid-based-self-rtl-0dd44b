// test_gate_ctrl: the test-gate sequencer of CSIG_GEN.
//
// A test gate is a whole number G of three-phase clock periods, G = 10^k
// for the gate code k = IC(10:7) (k above 8 counts as 8). The gate opens at
// a rising edge of GCLK_TPG. Its first period is the clear period: the
// clear signals (CLR_TPG, CLR_SIG, CLR_CUT, one level here) are high, the
// pattern generator loads its seed and the signature analyser is cleared.
// In each of the remaining G-1 periods the seed pattern, then each next
// pattern, is applied and the analyser takes one response bit at the fall
// of GCLK_SIG; the generator steps at every later GCLK_TPG rise. At the
// rising edge that ends period G the gate closes, done pulses for one
// clock and ST goes high, telling that a new signature is ready.
//
// MOD_SEL = 0: one gate per rising edge of enable; enable must fall and
// rise again for the next signature. MOD_SEL = 1: while enable is high,
// gates repeat, separated by one closed period. Dropping enable ends an
// open gate without a signature.
//
// Interface: clk, rst (synchronous, active high), enable, mod_sel,
// gate_code[3:0], the strobes tpg_rise and sig_fall of three_phase_clk;
// out: test_gate, clr (level, the first period), tpg_load, tpg_step,
// sa_shift (one-cycle strobes), done (one clock at gate close) and st.
//
// The gate, the clears at its start, MOD_SEL and ST follow the tester's
// description. It gives IC(10:7) as the number of clock cycles in the gate
// but not the coding; the powers of ten are this design's choice, picked
// because a constant-HIGH node then gives the reported signature 299BD5
// for k = 5 (99,999 shifts).
module test_gate_ctrl
  import hbst_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       mod_sel,
  input  logic [3:0] gate_code,
  input  logic       tpg_rise,
  input  logic       sig_fall,
  output logic       test_gate,
  output logic       clr,
  output logic       tpg_load,
  output logic       tpg_step,
  output logic       sa_shift,
  output logic       done,
  output logic       st
);

  typedef enum logic [1:0] {S_IDLE, S_GATE, S_GAP} state_e;

  state_e      state_q;
  logic [31:0] per_q;     // index of the current period inside the gate
  logic [31:0] g_len;
  logic        en_q;
  logic        armed_q;   // a start request waits for the next GCLK_TPG rise
  logic        st_q;
  logic        last_per;
  logic        start;

  assign g_len    = gate_periods(gate_code);
  assign last_per = (per_q + 32'd1 >= g_len);
  assign start    = tpg_rise && enable &&
                    (((state_q == S_IDLE) && (armed_q || mod_sel)) ||
                     ((state_q == S_GAP) && mod_sel));

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      per_q   <= '0;
      en_q    <= 1'b0;
      armed_q <= 1'b0;
      st_q    <= 1'b0;
    end else begin
      en_q <= enable;
      if (enable && !en_q) armed_q <= 1'b1;
      if (!enable)         armed_q <= 1'b0;
      unique case (state_q)
        S_IDLE, S_GAP: begin
          if (start) begin
            state_q <= S_GATE;
            per_q   <= '0;
            armed_q <= 1'b0;
            st_q    <= 1'b0;
          end else if (state_q == S_GAP && (!enable || !mod_sel)) begin
            state_q <= S_IDLE;
          end
        end
        S_GATE: begin
          if (!enable) begin
            state_q <= S_IDLE;
          end else if (tpg_rise) begin
            if (last_per) begin
              state_q <= mod_sel ? S_GAP : S_IDLE;
              st_q    <= 1'b1;
            end else begin
              per_q <= per_q + 32'd1;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign test_gate = (state_q == S_GATE);
  assign clr       = test_gate && (per_q == '0);
  assign tpg_load  = start;
  assign tpg_step  = test_gate && tpg_rise && enable && !last_per && (per_q != '0);
  assign sa_shift  = test_gate && sig_fall && (per_q != '0);
  assign done      = test_gate && tpg_rise && enable && last_per;
  assign st        = st_q;

endmodule
