// tb_two_unit_chain: two testers working as one 96-output tester.
//
// A board with more than 48 inputs is tested by two tester units. The
// first (master) runs from its internal clock; the second (slave) has
// SW_CLK high and takes the master's CLK_SYC as its external clock, so its
// phase ticks follow the master's. Both get the same IC code from the PC
// (pseudorandom mode, N = 2, gates of 10^3 periods) but different seeds,
// and share the operator switches, so their gates open together.
//
// Each unit probes a node of a board that mixes both pattern buses:
// the master probes GTPG_m(3) xor GTPG_s(7), the slave probes GTPG_s(0) and
// GTPG_m(47). The signatures must equal references computed from the two
// seeds with the patterns of both units advancing in step, which holds
// only if the two units apply pattern k in the same period. The gate
// lengths of the two units must also agree to within a few system clocks.
// Mechanisms counted: slave ticks seen, joint gates completed.
//
// Chaining two units through CLK_SYC and CLK_EXT follows the original
// description; the board, the seeds and the gate length are this
// testbench's own.
module tb_two_unit_chain;
  import hbst_pkg::*;
  import hbst_tb_pkg::*;

  localparam int DEB = 1000000;   // debounce time of the top, in clocks
  localparam longint G = 1000;
  localparam logic [47:0] SEED_M = 48'h1234_5678_9ABC;
  localparam logic [47:0] SEED_S = 48'hC0FF_EE00_4242;

  logic clk = 0, mclr_n = 0, enable_sw = 0, mod_sel_sw = 0;
  logic [7:0] dport = 0;
  logic [3:0] cport_m = 4'b1000, cport_s = 4'b1000;
  logic [3:0] status_m, status_s;
  logic data_m, data_s;
  logic [47:0] gtpg_m, gtpg_s;
  logic gclk_tpg_m, gclk_cut_m, gclk_sig_m, clr_cut_m, clk_syc_m, test_gate_m, st_m;
  logic gclk_tpg_s, gclk_cut_s, gclk_sig_s, clr_cut_s, clk_syc_s, test_gate_s, st_s;
  logic [23:0] sig_m, sig_s;
  logic [6:0] seg_n_m, seg_n_s;
  logic [5:0] an_n_m, an_n_s;

  sm_hbst_top master (
    .clk_int(clk), .clk_ext(1'b0), .mclr_n, .enable_sw, .mod_sel_sw, .sw_clk_sw(1'b0),
    .dport, .cport(cport_m), .status(status_m), .data(data_m), .gtpg(gtpg_m),
    .gclk_tpg(gclk_tpg_m), .gclk_cut(gclk_cut_m), .gclk_sig(gclk_sig_m),
    .clr_cut(clr_cut_m), .clk_syc(clk_syc_m), .test_gate(test_gate_m), .st(st_m),
    .sig(sig_m), .seg_n(seg_n_m), .an_n(an_n_m));

  sm_hbst_top slave (
    .clk_int(clk), .clk_ext(clk_syc_m), .mclr_n, .enable_sw, .mod_sel_sw, .sw_clk_sw(1'b1),
    .dport, .cport(cport_s), .status(status_s), .data(data_s), .gtpg(gtpg_s),
    .gclk_tpg(gclk_tpg_s), .gclk_cut(gclk_cut_s), .gclk_sig(gclk_sig_s),
    .clr_cut(clr_cut_s), .clk_syc(clk_syc_s), .test_gate(test_gate_s), .st(st_s),
    .sig(sig_s), .seg_n(seg_n_s), .an_n(an_n_s));

  always #10 clk = !clk;   // 50 MHz

  // The 96-input board.
  assign data_m = gtpg_m[3] ^ gtpg_s[7];
  assign data_s = gtpg_s[0] & gtpg_m[47];

  int checks = 0, failures = 0;

  // Gate lengths and slave activity.
  longint len_m = 0, len_s = 0, last_m = 0, last_s = 0;
  int gates_m = 0, gates_s = 0, slave_ticks = 0;
  logic tpg_s_p = 0;
  always @(posedge clk) begin
    if (test_gate_m) len_m++; else if (len_m != 0) begin last_m = len_m; len_m = 0; gates_m++; end
    if (test_gate_s) len_s++; else if (len_s != 0) begin last_s = len_s; len_s = 0; gates_s++; end
    tpg_s_p <= gclk_tpg_s;
    if (gclk_tpg_s && !tpg_s_p) slave_ticks++;
  end

  // ---------------- helpers ----------------
  task automatic idle(input longint n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Byte and clock commands to one unit (0 master, 1 slave) or both (2).
  task automatic set_cport(input int unit, input logic [3:0] v);
    if (unit != 1) cport_m = v;
    if (unit != 0) cport_s = v;
  endtask

  task automatic pc_byte(input int unit, input logic [3:0] code, input logic [7:0] v);
    dport = v;               idle(4);
    set_cport(unit, code);   idle(8);
    set_cport(unit, 4'b1000); idle(6);
  endtask

  task automatic pc_clock(input int unit, input logic [3:0] code);
    dport[7] = 1'b0;         idle(2);
    set_cport(unit, code);   idle(8);
    dport[7] = 1'b1;         idle(8);
    dport[7] = 1'b0;         idle(8);
    set_cport(unit, 4'b1000); idle(6);
  endtask

  function automatic logic [23:0] ref_sig(input bit is_master);
    logic [23:0] s;
    logic [47:0] pm, ps;
    logic d;
    s = '0; pm = SEED_M; ps = SEED_S;
    for (longint i = 1; i < G; i++) begin
      d = is_master ? (pm[3] ^ ps[7]) : (ps[0] & pm[47]);
      s = sa_ref_step(s, d);
      pm = prt_ref_step(pm);
      ps = prt_ref_step(ps);
    end
    return s;
  endfunction

  task automatic expect_sig(input logic [23:0] got, input logic [23:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    idle(6_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    ic_t icv;
    idle(10);
    mclr_n = 1;
    idle(DEB + 100);

    icv = '0; icv.mode = MODE_PRT; icv.clk_div = 2; icv.gate_code = 3;
    pc_byte(2, CP_BYTE_L, icv[7:0]);
    pc_byte(2, CP_BYTE_H, icv[15:8]);
    pc_clock(2, CP_DCLK_IC);
    for (int k = 0; k < 6; k++) pc_byte(0, 4'(k), SEED_M[8*k +: 8]);
    pc_clock(0, CP_DCLK_IS);
    for (int k = 0; k < 6; k++) pc_byte(1, 4'(k), SEED_S[8*k +: 8]);
    pc_clock(1, CP_DCLK_IS);

    // Two single gates, each opened by a rising edge of the shared ENABLE.
    for (int run = 0; run < 2; run++) begin
      int gm, gs;
      gm = gates_m; gs = gates_s;
      enable_sw = 1;
      idle(DEB + 10);
      while (!(gates_m > gm && gates_s > gs)) idle(1);
      idle(20);
      checks++;
      if (!st_m || !st_s || gates_m != gm + 1 || gates_s != gs + 1) begin
        failures++;
        $display("FAIL expected one gate per unit: %0d %0d, ST %b %b",
                 gates_m - gm, gates_s - gs, st_m, st_s);
      end
      checks++;
      if (last_m != G * 6 * 3 || last_s < last_m - 8 || last_s > last_m + 8) begin
        failures++;
        $display("FAIL gate lengths: master %0d slave %0d clocks, expected %0d",
                 last_m, last_s, G * 6 * 3);
      end
      expect_sig(sig_m, ref_sig(1), $sformatf("run %0d master signature", run));
      expect_sig(sig_s, ref_sig(0), $sformatf("run %0d slave signature", run));
      enable_sw = 0;
      idle(DEB + 10);
    end

    checks++;
    if (slave_ticks == 0 || gates_s == 0) begin
      failures++;
      $display("FAIL the slave never ran");
    end
    $display("slave GCLK_TPG periods %0d, joint gates %0d", slave_ticks, gates_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
