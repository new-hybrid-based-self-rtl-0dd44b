// tb_cport_decoder: self-checking testbench of the CPort decoder.
// Plays the PC protocol and counts the strobes: each byte command gives
// exactly one strobe of its own byte with the byte on data, and changing
// DPort while the command stays selected loads nothing more; each clock command
// gives exactly one strobe per DPort(7) pulse and none while DPort(7) is
// low; a CPort value that lasts only one or two clocks (bit skew while the
// PC changes the port) and the reserved codes give nothing.
module tb_cport_decoder;
  import hbst_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0] cport = 4'hF;
  logic [7:0] dport = 0;
  logic [7:0] data;
  det_ctl_t   ctl;
  int checks = 0, failures = 0;
  int n_tpg, n_cut, n_sig, n_ic, n_is, n_byte [8];
  logic [7:0] last_byte [8];

  cport_decoder dut (.clk, .rst, .cport, .dport, .data, .ctl);

  always #5 clk = !clk;

  always @(posedge clk) if (!rst) begin
    n_tpg += int'(ctl.tpg_rise);
    n_cut += int'(ctl.cut_rise);
    n_sig += int'(ctl.sig_fall);
    n_ic  += int'(ctl.ic_rise);
    n_is  += int'(ctl.is_rise);
    for (int k = 0; k < 6; k++) if (ctl.byte_ld[k]) begin
      n_byte[k]++; last_byte[k] = data;
    end
    if (ctl.byte_l) begin n_byte[6]++; last_byte[6] = data; end
    if (ctl.byte_h) begin n_byte[7]++; last_byte[7] = data; end
  end

  task automatic clear_counts();
    n_tpg = 0; n_cut = 0; n_sig = 0; n_ic = 0; n_is = 0;
    foreach (n_byte[k]) n_byte[k] = 0;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic pc_byte(input int k, input logic [7:0] v);
    dport = v;     idle(4);
    cport = 4'(k); idle(8);
    dport = ~v;    idle(8);
  endtask

  task automatic pc_clock(input logic [3:0] code);
    dport[7] = 1'b0; idle(2);
    cport = code;    idle(8);
    dport[7] = 1'b1; idle(8);
    dport[7] = 1'b0; idle(8);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(3); rst = 0; idle(8);
    // Byte commands.
    for (int k = 0; k < 8; k++) begin
      logic [7:0] v;
      v = 8'($urandom);
      clear_counts();
      pc_byte(k, v);
      cport = 4'hF; idle(8);
      checks++;
      if (n_byte[k] != 1 || last_byte[k] != v) begin
        failures++;
        $display("FAIL byte %0d: %0d strobes, last %02h exp %02h", k, n_byte[k], last_byte[k], v);
      end
      for (int j = 0; j < 8; j++) if (j != k) expect_eq(n_byte[j], 0, "other byte strobes");
    end
    // Clock commands, one pulse each, several times.
    clear_counts();
    for (int r = 0; r < 3; r++) begin
      pc_clock(CP_DCLK_TPG);
      pc_clock(CP_DCLK_CUT);
      pc_clock(CP_DCLK_SIG);
      pc_clock(CP_DCLK_IC);
      pc_clock(CP_DCLK_IS);
    end
    expect_eq(n_tpg, 3, "DCLK_TPG pulses");
    expect_eq(n_cut, 3, "DCLK_CUT pulses");
    expect_eq(n_sig, 3, "DCLK_SIG pulses");
    expect_eq(n_ic, 3, "DCLK_IC pulses");
    expect_eq(n_is, 3, "DCLK_IS pulses");
    // Level of DCLK_CUT follows DPort(7).
    dport[7] = 0; cport = CP_DCLK_CUT; idle(8);
    dport[7] = 1; idle(8);
    checks++; if (!ctl.dclk_cut) begin failures++; $display("FAIL dclk_cut level"); end
    dport[7] = 0; idle(8);
    checks++; if (ctl.dclk_cut) begin failures++; $display("FAIL dclk_cut low"); end
    // CPort changes while DPort(7) is low give no clocks.
    clear_counts();
    for (int c = 10; c <= 14; c++) begin cport = 4'(c); idle(8); end
    cport = 4'hF; idle(8);
    expect_eq(n_tpg + n_cut + n_sig + n_ic + n_is, 0, "no clocks with DPort(7) low");
    // Short CPort glitches with DPort(7) high select nothing.
    clear_counts();
    dport = 8'h80;
    for (int c = 0; c < 16; c++) begin
      cport = 4'(c); idle(1);
      cport = 4'hF;  idle(6);
      cport = 4'(c); idle(2);
      cport = 4'hF;  idle(6);
    end
    expect_eq(n_tpg + n_cut + n_sig + n_ic + n_is, 0, "no clocks from glitches");
    for (int k = 0; k < 8; k++) expect_eq(n_byte[k], 0, "no byte strobes from glitches");
    // Reserved codes.
    clear_counts();
    pc_clock(4'b1000); pc_clock(4'b1001); pc_clock(4'b1111);
    expect_eq(n_tpg + n_cut + n_sig + n_ic + n_is, 0, "reserved codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
