// tb_csig_gen: self-checking testbench of CSIG_GEN.
// Checks the single-shot clocks (CLK_SS 1 us / 1 ms, CLK_ED 200 ns / 1 us
// with the 20 ns system clock) by counting strobe spacing, and runs one
// test gate of code 1 with N = 2 through the whole generator: 10 periods
// of 18 clocks, 9 shifts, ST at the end.
module tb_csig_gen;
  logic clk = 0, rst = 1, enable = 0, mod_sel = 0, sw_clk = 0, clk_ext = 0, ms_range = 0;
  logic [3:0] ic_n = 2, gate_code = 1;
  logic gclk_tpg, gclk_cut, gclk_sig, cut_rise, clk_syc, test_gate, gate_clr;
  logic tpg_load, tpg_step, sa_shift, gate_done, st, ss_tick, ed_tick;
  int checks = 0, failures = 0;
  longint cyc = 0, last_ss = -1, last_ed = -1, ss_gap = 0, ed_gap = 0;
  int n_shift = 0, gate_len = 0;

  csig_gen dut (.*);

  always #10 clk = !clk;

  always @(posedge clk) begin
    cyc++;
    if (ss_tick) begin if (last_ss >= 0) ss_gap = cyc - last_ss; last_ss = cyc; end
    if (ed_tick) begin if (last_ed >= 0) ed_gap = cyc - last_ed; last_ed = cyc; end
    n_shift += int'(sa_shift);
    gate_len += int'(test_gate);
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (300) @(posedge clk);
    expect_eq(ss_gap, 50, "CLK_SS period, us range (1 us)");
    expect_eq(ed_gap, 10, "CLK_ED period, us range (200 ns)");
    ms_range = 1; last_ss = -1; last_ed = -1;
    repeat (150000) @(posedge clk);
    expect_eq(ss_gap, 50000, "CLK_SS period, ms range (1 ms)");
    expect_eq(ed_gap, 50, "CLK_ED period, ms range (1 us)");
    // One gate.
    #1 enable = 1;
    repeat (18 * 14) @(posedge clk);
    expect_eq(n_shift, 9, "shifts in a code-1 gate");
    expect_eq(gate_len, 180, "gate length in clocks (10 periods of 360 ns)");
    expect_eq(st, 1, "ST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
