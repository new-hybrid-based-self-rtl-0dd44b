// trc: the test response compactor (TRC) of the tester.
//
// The probed node DATA feeds two compactors. The signature analyser (sa23)
// compacts the bit stream of the node into a 24-bit signature; the edge
// detection compactor (edc) measures the time between edges of the node.
// The signature bus SIG(23:0) shows:
//   modes 0 and 3 (internal test gate)  the SA signature held from the end
//                                       of the last gate
//   modes 1 and 2 (PC-driven clocks)    the SA register as it stands
//   modes 4 and 5 (single shot)         SS_SIG of the EDC
//   codes 6 and 7                       the SA register as it stands
// DATA is brought to the system clock through a two-flop synchroniser
// before the SA takes it.
//
// Interface: clk, rst (synchronous, active high), data, mode[2:0],
// sa_clr/sa_shift (already chosen between the test gate and the PC
// clocks), gate_done (gate closing, hold the signature), ed_tick, ss_tick;
// out: sig[23:0], sa_sig[23:0] (raw SA), ss_new (one clock per new SS
// measurement).
//
// The two compactors and the single output bus follow the tester's
// description; the holding register and the synchroniser are this
// design's choice.
module trc
  import hbst_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        data,
  input  logic [2:0]  mode,
  input  logic        sa_clr,
  input  logic        sa_shift,
  input  logic        gate_done,
  input  logic        ed_tick,
  input  logic        ss_tick,
  output logic [23:0] sig,
  output logic [23:0] sa_sig,
  output logic        ss_new
);

  logic [1:0]  sync_q;
  logic [23:0] ss_sig, hold_q;
  logic        edge1, edge2;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= '0;
    else     sync_q <= {sync_q[0], data};
  end

  sa23 u_sa (
    .clk   (clk),
    .rst   (rst),
    .clr   (sa_clr),
    .shift (sa_shift),
    .data  (sync_q[1]),
    .sig   (sa_sig)
  );

  edc u_edc (
    .clk     (clk),
    .rst     (rst),
    .data    (data),
    .ed_tick (ed_tick),
    .ss_tick (ss_tick),
    .ss_sig  (ss_sig),
    .edge1   (edge1),
    .edge2   (edge2),
    .latched (ss_new)
  );

  // The last shift of a gate happens in its last period, before the
  // GCLK_TPG rise that closes it, so sa_sig is final at gate_done.
  always_ff @(posedge clk) begin
    if (rst)            hold_q <= '0;
    else if (gate_done) hold_q <= sa_sig;
  end

  always_comb begin
    unique case (test_mode_e'(mode))
      MODE_PRT, MODE_HPDT:     sig = hold_q;
      MODE_SS_US, MODE_SS_MS:  sig = ss_sig;
      default:                 sig = sa_sig;
    endcase
  end

endmodule
