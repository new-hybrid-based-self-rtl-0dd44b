// status_port: returns the signature to the PC through its 4-bit status
// port.
//
// The PC can only read four bits at a time, so IC(15:13) chooses what the
// port shows: codes 0..5 select nibble k of SIG(23:0) (code 0 = SIG(3:0),
// code 5 = SIG(23:20)); code 6 returns {ST, TEST_GATE, EDC latched since
// code 6 was last left, 0}; code 7 returns the fixed pattern 1010, which
// lets the PC check the cable. The output is registered.
//
// Interface: clk, rst (synchronous, active high), sel[2:0], sig[23:0], st,
// test_gate, ss_new (one-clock strobe); status[3:0].
//
// That IC(15:13) is used to pass the signature to the PC follows the
// tester's description; the nibble map and codes 6 and 7 are this design's
// choice.
module status_port (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  sel,
  input  logic [23:0] sig,
  input  logic        st,
  input  logic        test_gate,
  input  logic        ss_new,
  output logic [3:0]  status
);

  logic       ss_flag_q;
  logic [2:0] sel_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ss_flag_q <= 1'b0;
      sel_q     <= '0;
      status    <= '0;
    end else begin
      sel_q <= sel;
      // The flag stays visible while code 6 is selected and is cleared
      // when the PC moves the select away from it (the read is complete).
      if (ss_new)                                ss_flag_q <= 1'b1;
      else if (sel_q == 3'd6 && sel != 3'd6)     ss_flag_q <= 1'b0;
      unique case (sel)
        3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5: status <= sig[4*sel +: 4];
        3'd6:    status <= {st, test_gate, ss_flag_q, 1'b0};
        default: status <= 4'b1010;
      endcase
    end
  end

endmodule
