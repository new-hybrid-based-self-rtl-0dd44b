// cu_det: the PC-side part of the tester's control unit (CU_DET).
//
// It holds three sub-blocks. The CPort decoder (cport_decoder) turns the
// PC's control-port commands into byte-load strobes and clock strobes. The
// initial-condition port (ICP) builds the 16-bit code IC(15:0): BYTE_L and
// BYTE_H load DPort into two staging bytes and a rising edge of DCLK_IC
// transfers both into IC at once. The initial-seed port (ISP) builds the
// 48-bit PRTPG seed TPG_IS(47:0): BYTE(0)..BYTE(5) load DPort into six
// staging bytes (the same strobes that load the DET_TPG bytes) and a rising
// edge of DCLK_IS transfers them into TPG_IS.
//
// Interface: clk, rst (synchronous, active high), the PC ports cport[3:0]
// and dport[7:0], and out: data (synchronised DPort, for DET_TPG), ctl (all
// decoded strobes and PC-driven clock levels), ic (IC(15:0) as ic_t) and
// tpg_is[47:0]. IC and TPG_IS change one clock after their transfer strobe.
//
// The sub-blocks, the byte map and the transfer clocks follow the tester's
// description. The command table names DCLK_IS as clocking TPG_IS(15:0)
// while the text says it transfers TPG_IS(47:0); the 48-bit transfer is
// built. Reset values are this design's choice: IC resets to 0 (PRT mode,
// N = 0, gate code 0) and the seed to 1.
module cu_det
  import hbst_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       cport,
  input  logic [7:0]       dport,
  output logic [7:0]       data,
  output det_ctl_t         ctl,
  output ic_t              ic,
  output logic [TPG_W-1:0] tpg_is
);

  cport_decoder u_dec (
    .clk   (clk),
    .rst   (rst),
    .cport (cport),
    .dport (dport),
    .data  (data),
    .ctl   (ctl)
  );

  logic [15:0]      ic_stage_q;
  ic_t              ic_q;
  logic [TPG_W-1:0] is_stage_q;
  logic [TPG_W-1:0] is_q;

  // Initial-condition port.
  always_ff @(posedge clk) begin
    if (rst) begin
      ic_stage_q <= '0;
      ic_q       <= '0;
    end else begin
      if (ctl.byte_l) ic_stage_q[7:0]  <= data;
      if (ctl.byte_h) ic_stage_q[15:8] <= data;
      if (ctl.ic_rise) ic_q <= ic_t'(ic_stage_q);
    end
  end

  // Initial-seed port.
  always_ff @(posedge clk) begin
    if (rst) begin
      is_stage_q <= '0;
      is_q       <= TPG_W'(1);
    end else begin
      for (int k = 0; k < 6; k++) begin
        if (ctl.byte_ld[k]) is_stage_q[8*k +: 8] <= data;
      end
      if (ctl.is_rise) is_q <= is_stage_q;
    end
  end

  assign ic     = ic_q;
  assign tpg_is = is_q;

endmodule
