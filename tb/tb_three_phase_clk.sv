// tb_three_phase_clk: self-checking testbench of the three-phase clock
// generator. For every N = 0..15 it measures, in system clocks of 20 ns,
// the period of each clock (6(N+1), i.e. 120(N+1) ns: 240 ns for N = 1,
// 1920 ns for N = 15), the high time (3(N+1)), the delay from GCLK_TPG to
// GCLK_CUT and from GCLK_CUT to GCLK_SIG (N+1, i.e. 20(N+1) ns) and that
// the strobes sit on the matching edges. It then drives the external
// clock and checks one tick per external edge and CLK_SYC toggling.
module tb_three_phase_clk;
  logic clk = 0, rst = 1, run = 0, sw_clk = 0, clk_ext = 0;
  logic [3:0] n = 0;
  logic gclk_tpg, gclk_cut, gclk_sig, tpg_rise, cut_rise, cut_fall, sig_fall, tick, clk_syc;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_tpg [$], t_cut [$], t_sig [$], t_sigf [$], t_tpgf [$];
  logic p_tpg = 0, p_cut = 0, p_sig = 0;

  three_phase_clk dut (.clk, .rst, .run, .n, .sw_clk, .clk_ext, .gclk_tpg, .gclk_cut,
                       .gclk_sig, .tpg_rise, .cut_rise, .cut_fall, .sig_fall, .tick, .clk_syc);

  always #10 clk = !clk;

  // Record edge times of the levels (sampled at the clock edge), and check
  // that each strobe is seen exactly one clock before its level moves.
  always @(posedge clk) begin
    cyc++;
    if (gclk_tpg && !p_tpg) t_tpg.push_back(cyc);
    if (!gclk_tpg && p_tpg) t_tpgf.push_back(cyc);
    if (gclk_cut && !p_cut) t_cut.push_back(cyc);
    if (gclk_sig && !p_sig) t_sig.push_back(cyc);
    if (!gclk_sig && p_sig) t_sigf.push_back(cyc);
    p_tpg <= gclk_tpg; p_cut <= gclk_cut; p_sig <= gclk_sig;
  end

  logic s_tpg = 0, s_sig = 0;
  int strobe_bad = 0;
  always @(posedge clk) begin
    s_tpg <= tpg_rise; s_sig <= sig_fall;
    if (s_tpg && !(gclk_tpg && !p_tpg)) strobe_bad++;
    if (s_sig && !(!gclk_sig && p_sig)) strobe_bad++;
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int nn = 0; nn < 16; nn++) begin
      n = 4'(nn); d = nn + 1;
      t_tpg.delete(); t_cut.delete(); t_sig.delete(); t_sigf.delete(); t_tpgf.delete();
      #1 run = 1;
      repeat (6 * d * 6) @(posedge clk);
      #1 run = 0;
      repeat (4) @(posedge clk);
      checks++;
      if (t_tpg.size() < 4 || t_cut.size() < 4 || t_sig.size() < 4) begin
        failures++; $display("FAIL N=%0d too few edges", nn);
        continue;
      end
      expect_eq(t_tpg[2] - t_tpg[1], 6 * d, "GCLK_TPG period");
      expect_eq(t_cut[2] - t_cut[1], 6 * d, "GCLK_CUT period");
      expect_eq(t_sig[2] - t_sig[1], 6 * d, "GCLK_SIG period");
      expect_eq(t_cut[1] - t_tpg[1], d, "TPG to CUT delay");
      expect_eq(t_sig[1] - t_cut[1], d, "CUT to SIG delay");
      expect_eq(t_tpgf[1] - t_tpg[1], 3 * d, "GCLK_TPG high time");
      expect_eq(t_sigf[1] - t_sig[1], 3 * d, "GCLK_SIG high time");
    end
    expect_eq(strobe_bad, 0, "strobes on their edges");
    // External clock: each edge is one tick.
    begin
      int ticks = 0, syc_edges = 0;
      logic syc_p;
      sw_clk = 1; run = 1; syc_p = clk_syc;
      for (int e = 0; e < 48; e++) begin
        repeat (7) begin
          @(posedge clk);
          ticks += int'(tick);
          if (clk_syc != syc_p) syc_edges++;
          syc_p = clk_syc;
        end
        #1 clk_ext = !clk_ext;
      end
      repeat (6) begin
        @(posedge clk);
        ticks += int'(tick);
        if (clk_syc != syc_p) syc_edges++;
        syc_p = clk_syc;
      end
      expect_eq(ticks, 48, "ticks from external edges");
      expect_eq(syc_edges, 48, "CLK_SYC toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
