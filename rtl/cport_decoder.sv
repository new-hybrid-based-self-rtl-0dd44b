// cport_decoder: decoder of the PC control port CPort(3:0) inside CU_DET.
//
// The PC drives an 8-bit data port DPort(7:0) and a 4-bit control port
// CPort(3:0). Both are asynchronous to the tester and are first brought in
// through two-flop synchronisers. A CPort value is accepted only after it
// has been seen on three consecutive clocks, so the skew between its four
// bits while the PC changes it cannot select a wrong command.
//
// Commands 0000..0111 load a byte: when BYTE(k), BYTE_L or BYTE_H becomes
// the accepted command, its strobe is high for one clock and the staging
// byte takes DPort as it is then. The PC therefore puts the byte on DPort
// first and then selects the command; changing DPort afterwards has no
// effect, and loading the same byte again needs another code (for example
// the reserved 1000) in between.
// Commands 1010..1110 are clocks: the clock level is DPort(7) while the
// command is selected, so the PC holds DPort(7) low while it changes CPort
// (this disables the decoder and stops glitches) and then toggles DPort(7)
// to give the clock pulse. Edges of the clock levels are sent out as
// one-cycle strobes (rising for DCLK_TPG/CUT/IC/IS, falling for DCLK_SIG).
// Codes 1000, 1001 and 1111 are reserved and do nothing.
//
// The command table and the use of DPort(7) as decoder disable follow the
// tester's description; the synchronisers, the three-sample acceptance and
// the one-shot loading of the byte commands are this design's choice.
// Latency: a strobe appears 4 clocks after the port change that causes it.
module cport_decoder
  import hbst_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] cport,
  input  logic [7:0] dport,
  output logic [7:0] data,    // synchronised DPort
  output det_ctl_t   ctl
);

  logic [3:0] cp_s1, cp_s2, cp_d1, cp_d2;
  logic [7:0] dp_s1, dp_s2;
  logic       cmd_ok;
  logic       cmd_new;
  logic [3:0] acc_q;      // last accepted command
  cport_cmd_e cmd;

  always_ff @(posedge clk) begin
    if (rst) begin
      cp_s1 <= CP_RSVD15;
      cp_s2 <= CP_RSVD15;
      cp_d1 <= CP_RSVD15;
      cp_d2 <= CP_RSVD15;
      dp_s1 <= '0;
      dp_s2 <= '0;
    end else begin
      cp_s1 <= cport;
      cp_s2 <= cp_s1;
      cp_d1 <= cp_s2;
      cp_d2 <= cp_d1;
      dp_s1 <= dport;
      dp_s2 <= dp_s1;
    end
  end

  assign cmd_ok  = (cp_s2 == cp_d1) && (cp_d1 == cp_d2);
  assign cmd_new = cmd_ok && (cp_s2 != acc_q);

  always_ff @(posedge clk) begin
    if (rst)         acc_q <= CP_RSVD15;
    else if (cmd_ok) acc_q <= cp_s2;
  end
  assign cmd    = cport_cmd_e'(cp_s2);
  assign data   = dp_s2;

  // Clock levels and their previous values.
  logic lvl_tpg, lvl_cut, lvl_sig, lvl_ic, lvl_is;
  logic prv_tpg, prv_cut, prv_sig, prv_ic, prv_is;

  always_comb begin
    lvl_tpg = cmd_ok && cmd == CP_DCLK_TPG && dp_s2[7];
    lvl_cut = cmd_ok && cmd == CP_DCLK_CUT && dp_s2[7];
    lvl_sig = cmd_ok && cmd == CP_DCLK_SIG && dp_s2[7];
    lvl_ic  = cmd_ok && cmd == CP_DCLK_IC  && dp_s2[7];
    lvl_is  = cmd_ok && cmd == CP_DCLK_IS  && dp_s2[7];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {prv_tpg, prv_cut, prv_sig, prv_ic, prv_is} <= '0;
    end else begin
      {prv_tpg, prv_cut, prv_sig, prv_ic, prv_is} <=
        {lvl_tpg, lvl_cut, lvl_sig, lvl_ic, lvl_is};
    end
  end

  always_comb begin
    ctl = '0;
    if (cmd_new) begin
      unique case (cmd)
        CP_BYTE0:  ctl.byte_ld[0] = 1'b1;
        CP_BYTE1:  ctl.byte_ld[1] = 1'b1;
        CP_BYTE2:  ctl.byte_ld[2] = 1'b1;
        CP_BYTE3:  ctl.byte_ld[3] = 1'b1;
        CP_BYTE4:  ctl.byte_ld[4] = 1'b1;
        CP_BYTE5:  ctl.byte_ld[5] = 1'b1;
        CP_BYTE_L: ctl.byte_l     = 1'b1;
        CP_BYTE_H: ctl.byte_h     = 1'b1;
        default:   ;
      endcase
    end
    ctl.dclk_tpg = prv_tpg;
    ctl.dclk_cut = prv_cut;
    ctl.dclk_sig = prv_sig;
    ctl.tpg_rise = lvl_tpg && !prv_tpg;
    ctl.cut_rise = lvl_cut && !prv_cut;
    ctl.sig_fall = !lvl_sig && prv_sig;
    ctl.ic_rise  = lvl_ic && !prv_ic;
    ctl.is_rise  = lvl_is && !prv_is;
  end

  // At most one data-latch strobe is active at a time.
  assert property (@(posedge clk) disable iff (rst)
                   $onehot0({ctl.byte_ld, ctl.byte_l, ctl.byte_h}));

endmodule
