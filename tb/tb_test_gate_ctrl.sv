// tb_test_gate_ctrl: self-checking testbench of the test-gate sequencer.
// The GCLK_TPG rise and GCLK_SIG fall strobes are driven by the testbench
// as a 6-step period. For gate codes 0..3 it checks, per gate, the number
// of periods the gate is open (10^k), the one clear period at its start,
// one seed load, 10^k - 1 analyser shifts, 10^k - 2 pattern steps, one done
// pulse and ST; that MOD_SEL low gives a single gate per ENABLE rise; that
// MOD_SEL high gives repeated gates with one closed period between them;
// and that dropping ENABLE aborts a gate without done.
module tb_test_gate_ctrl;
  logic clk = 0, rst = 1, enable = 0, mod_sel = 0, tpg_rise = 0, sig_fall = 0;
  logic [3:0] gate_code = 0;
  logic test_gate, clr, tpg_load, tpg_step, sa_shift, done, st;
  int checks = 0, failures = 0;
  int n_load, n_step, n_shift, n_done, n_gates, clr_periods, gate_periods_cnt, gap_periods;
  bit in_gate_p = 0;

  test_gate_ctrl dut (.clk, .rst, .enable, .mod_sel, .gate_code, .tpg_rise, .sig_fall,
                      .test_gate, .clr, .tpg_load, .tpg_step, .sa_shift, .done, .st);

  always #5 clk = !clk;

  // Strobe generator: period of 6 steps of 2 clocks.
  int step_cnt = 0;
  always @(posedge clk) begin
    step_cnt <= (step_cnt == 11) ? 0 : step_cnt + 1;
    tpg_rise <= (step_cnt == 11);
    sig_fall <= (step_cnt == 9);
  end

  always @(posedge clk) if (!rst) begin
    n_load  += int'(tpg_load);
    n_step  += int'(tpg_step);
    n_shift += int'(sa_shift);
    n_done  += int'(done);
    if (tpg_rise && test_gate) gate_periods_cnt++;
    if (tpg_rise && clr) clr_periods++;
    if (tpg_rise && !test_gate && n_gates > 0 && mod_sel && enable) gap_periods++;
    if (test_gate && !in_gate_p) n_gates++;
    in_gate_p = test_gate;
  end

  task automatic clear_counts();
    n_load = 0; n_step = 0; n_shift = 0; n_done = 0; n_gates = 0;
    clr_periods = 0; gate_periods_cnt = 0; gap_periods = 0;
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic periods(input int n);
    repeat (12 * n) @(posedge clk);
    #1;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Single opening.
    for (int k = 0; k < 4; k++) begin
      g = 1;
      repeat (k) g *= 10;
      gate_code = 4'(k); mod_sel = 0;
      clear_counts();
      enable = 1;
      periods(g + 5);
      expect_eq(n_gates, 1, "single mode: one gate");
      expect_eq(gate_periods_cnt, g, "gate length in periods");
      expect_eq(clr_periods, 1, "one clear period");
      expect_eq(n_load, 1, "one seed load");
      expect_eq(n_shift, g - 1, "analyser shifts");
      expect_eq(n_step, (g > 1) ? g - 2 : 0, "pattern steps");
      expect_eq(n_done, 1, "done pulses");
      expect_eq(st, 1, "ST after the gate");
      periods(3);
      expect_eq(n_gates, 1, "no second gate without a new ENABLE");
      enable = 0; periods(2);
    end
    // Multiple opening.
    gate_code = 1; mod_sel = 1; clear_counts();
    enable = 1;
    periods(4 * 11 + 1);
    enable = 0; periods(2);
    checks++;
    if (n_gates < 3 || n_done < 3) begin
      failures++; $display("FAIL multiple mode: %0d gates", n_gates);
    end
    expect_eq(n_shift, 9 * n_done, "shifts per completed gate");
    checks++;
    if (gap_periods != n_done && gap_periods != n_done - 1) begin
      failures++; $display("FAIL gap periods %0d for %0d gates", gap_periods, n_done);
    end
    // Abort.
    gate_code = 3; mod_sel = 0; clear_counts();
    enable = 1; periods(20);
    expect_eq(test_gate, 1, "gate open before abort");
    enable = 0; periods(2);
    expect_eq(test_gate, 0, "gate closed by abort");
    expect_eq(n_done, 0, "no done on abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
