// tpg: the test pattern generator of the tester, driving GTPG(47:0).
//
// It holds the pseudorandom generator (prtpg), seeded from TPG_IS, and the
// deterministic generator (det_tpg), loaded byte by byte from the PC, and
// selects between them by test mode:
//   PRT (mode 0)                 GTPG = PRTPG
//   DET, DET programming (1, 2)  GTPG = DET_TPG
//   HPDT (mode 3)                GTPG(47:DET_LSB) = DET_TPG, the lower
//                                bits = PRTPG: inputs needing a fixed state
//                                get a single deterministic pattern, the
//                                rest get pseudorandom signals
//   SS (modes 4, 5)              GTPG = DET_TPG, the trigger patterns of
//                                the single-shot circuit
//   codes 6, 7                   unused, GTPG = DET_TPG
//
// Interface: clk, rst (synchronous, active high), mode[2:0] (IC(6:4)),
// data[7:0] and byte_ld[5:0] and det_xfer from CU_DET, seed[47:0]
// (TPG_IS), prt_load and prt_step from the test-gate sequencer;
// gtpg[47:0]. Outputs are registered inside the generators and change one
// clock after their strobe, or as soon as the mode changes.
//
// The generators and the mode-dependent concatenation follow the tester's
// description. Where the split between fixed and pseudorandom inputs lies
// in HPDT mode is not given as a register; DET_LSB = 42 follows the
// example board, whose module-select inputs take GTPG(47:42) as fixed
// patterns while GTPG(18:0) drive the random logic.
module tpg
  import hbst_pkg::*;
#(
  parameter int unsigned DET_LSB = 42
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       mode,
  input  logic [7:0]       data,
  input  logic [5:0]       byte_ld,
  input  logic             det_xfer,
  input  logic [TPG_W-1:0] seed,
  input  logic             prt_load,
  input  logic             prt_step,
  output logic [TPG_W-1:0] gtpg
);

  logic [TPG_W-1:0] prt_pat, det_pat, hpdt_mask;

  prtpg u_prt (
    .clk     (clk),
    .rst     (rst),
    .load    (prt_load),
    .step    (prt_step),
    .seed    (seed),
    .pattern (prt_pat)
  );

  det_tpg u_det (
    .clk     (clk),
    .rst     (rst),
    .data    (data),
    .byte_ld (byte_ld),
    .xfer    (det_xfer),
    .pattern (det_pat)
  );

  // Bits taken from DET_TPG in HPDT mode.
  assign hpdt_mask = {TPG_W{1'b1}} << DET_LSB;

  always_comb begin
    unique case (test_mode_e'(mode))
      MODE_PRT:  gtpg = prt_pat;
      MODE_HPDT: gtpg = (det_pat & hpdt_mask) | (prt_pat & ~hpdt_mask);
      default:   gtpg = det_pat;
    endcase
  end

endmodule
