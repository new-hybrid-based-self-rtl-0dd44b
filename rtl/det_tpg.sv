// det_tpg: the deterministic test pattern generator (DET_TPG).
//
// A 48-bit deterministic pattern arrives from the PC one byte at a time on
// DPort(7:0). Six staging byte latches take the byte while the matching
// BYTE(k) strobe is high (BYTE(0) for bits 7:0 up to BYTE(5) for bits
// 47:40). A rising edge of DCLK_TPG then transfers all six bytes at once to
// the output register, so all 48 pattern bits change together and the
// circuit under test never sees a half-written pattern. The sequence is
// repeated for every pattern, giving patterns of any test length.
//
// Interface: clk, synchronous active-high rst (all bits 0), data[7:0] the
// synchronised DPort, byte_ld[5:0] the BYTE(5:0) strobes, xfer the DCLK_TPG
// rising-edge strobe, pattern[47:0] the deterministic half of GTPG.
// Timing: pattern changes one clock after xfer.
//
// The six latches, their byte order and the simultaneous transfer follow
// the tester's description; the reset value is this design's choice.
module det_tpg
  import hbst_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       data,
  input  logic [5:0]       byte_ld,
  input  logic             xfer,
  output logic [TPG_W-1:0] pattern
);

  logic [TPG_W-1:0] stage_q;
  logic [TPG_W-1:0] out_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      stage_q <= '0;
      out_q   <= '0;
    end else begin
      for (int k = 0; k < 6; k++) begin
        if (byte_ld[k]) stage_q[8*k +: 8] <= data;
      end
      if (xfer) out_q <= stage_q;
    end
  end

  assign pattern = out_q;

endmodule
