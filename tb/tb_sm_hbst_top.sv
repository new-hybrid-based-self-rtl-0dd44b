// tb_sm_hbst_top: end-to-end testbench of the SM-HBST tester, with every
// parameter of the top at its default (50 MHz clock, 20 ms debounce).
//
// The testbench plays the PC on DPort/CPort/status and the operator on the
// switches, and connects GTPG, GCLK_CUT and CLR_CUT to a small stand-in
// board: a magnitude comparator, a 3-to-8 decoder, a 4-bit counter clocked
// by GCLK_CUT and cleared by CLR_CUT, and a single-shot whose pulse is
// triggered by GTPG(0). The probed node is chosen by the testbench.
// Every signature is compared with a reference computed by the models in
// hbst_tb_pkg from the seed, the pattern sequence and the board.
//
// Sequence: power-up clear; pseudorandom mode with single opening (gate
// length and cycle count checked); a constant-HIGH node over a 10^5-period
// gate, which must give 299BD5, and a constant-LOW node giving 000000;
// the counter node (CUT clock and clear); multiple opening with repeated
// equal signatures; HPDT mode; PC-clocked deterministic mode (modes 1 and
// 2) with SA and CUT clears from IC(11)/IC(12); single-shot timing in the
// microsecond and millisecond ranges; reading the signature back through
// the status port; running from an external clock; and the display.
// Each mechanism is counted and one that never happened is a failure.
module tb_sm_hbst_top;
  import hbst_pkg::*;
  import hbst_tb_pkg::*;

  localparam int DEB = 1000000;   // debounce time of the top, in clocks

  logic clk = 0, clk_ext = 0, mclr_n = 0, enable_sw = 0, mod_sel_sw = 0, sw_clk_sw = 0;
  logic [7:0] dport = 0;
  logic [3:0] cport = 4'b1000;
  logic [3:0] status;
  logic data;
  logic [47:0] gtpg;
  logic gclk_tpg, gclk_cut, gclk_sig, clr_cut, clk_syc, test_gate, st;
  logic [23:0] sig;
  logic [6:0] seg_n;
  logic [5:0] an_n;

  sm_hbst_top dut (
    .clk_int(clk), .clk_ext, .mclr_n, .enable_sw, .mod_sel_sw, .sw_clk_sw,
    .dport, .cport, .status, .data, .gtpg, .gclk_tpg, .gclk_cut, .gclk_sig,
    .clr_cut, .clk_syc, .test_gate, .st, .sig, .seg_n, .an_n);

  always #10 clk = !clk;   // 50 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- stand-in board ----------------
  int probe = 11;
  logic [3:0] cnt_q = 0;
  logic       cut_p = 0;
  logic       ss_out = 0;
  longint     ss_end = 0;
  int         ss_width_clk = 0;
  logic       trig_p = 0;

  always @(posedge clk) begin
    cut_p <= gclk_cut;
    if (clr_cut) cnt_q <= 0;
    else if (gclk_cut && !cut_p) cnt_q <= cnt_q + 1;
    trig_p <= gtpg[0];
    if (gtpg[0] && !trig_p && ss_width_clk > 0) begin
      ss_out <= 1;
      ss_end = cyc + ss_width_clk;
    end else if (ss_out && cyc >= ss_end) begin
      ss_out <= 0;
    end
  end

  always_comb begin
    if (probe == 13)      data = cnt_q[1];
    else if (probe == 15) data = ss_out;
    else                  data = cut_ref(gtpg, probe);
  end

  // ---------------- mechanism counters ----------------
  int m_single = 0, m_multi = 0, m_hpdt = 0, m_det = 0, m_detprog = 0, m_ss_us = 0,
      m_ss_ms = 0, m_ext = 0, m_status = 0, m_clr_cut = 0, m_const = 0, m_display = 0,
      m_sa_clr_ic = 0;
  logic clr_p = 0;
  always @(posedge clk) begin
    clr_p <= clr_cut;
    if (clr_cut && !clr_p) m_clr_cut++;
  end

  // Length of each test gate in system clocks, and the number of gates.
  longint gate_run = 0, last_gate_len = 0;
  int     n_gates = 0;
  always @(posedge clk) begin
    if (test_gate) gate_run++;
    else if (gate_run != 0) begin
      last_gate_len = gate_run;
      gate_run = 0;
      n_gates++;
    end
  end

  // ---------------- helpers ----------------
  task automatic idle(input longint n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic pc_byte(input logic [3:0] code, input logic [7:0] v);
    dport = v;    idle(4);
    cport = code; idle(8);
    cport = 4'b1000; idle(6);
  endtask

  task automatic pc_clock(input logic [3:0] code);
    dport[7] = 1'b0; idle(2);
    cport = code;    idle(8);
    dport[7] = 1'b1; idle(8);
    dport[7] = 1'b0; idle(8);
    cport = 4'b1000; idle(6);
  endtask

  task automatic write_ic(input ic_t v);
    pc_byte(CP_BYTE_L, v[7:0]);
    pc_byte(CP_BYTE_H, v[15:8]);
    pc_clock(CP_DCLK_IC);
  endtask

  task automatic write_bytes(input logic [47:0] v);
    for (int k = 0; k < 6; k++) pc_byte(4'(k), v[8*k +: 8]);
  endtask

  task automatic set_switch(ref logic sw, input logic v);
    sw = v;
    idle(DEB + 10);
  endtask

  // Wait until one more gate than gates_before has ended with ST high;
  // return its length in clocks.
  task automatic wait_gate(input int gates_before, input longint limit,
                           output longint gate_clocks);
    longint t0;
    t0 = cyc;
    while (!(n_gates > gates_before && st) && cyc - t0 < limit) @(posedge clk);
    idle(2);
    gate_clocks = last_gate_len;
    checks++;
    if (!(n_gates == gates_before + 1 && st)) begin
      failures++;
      $display("FAIL expected one finished gate, saw %0d", n_gates - gates_before);
    end
  endtask

  function automatic logic [23:0] ref_sig(input logic [47:0] seed, input logic [47:0] det,
                                          input bit hpdt, input int prb, input longint g);
    logic [23:0] s;
    logic [47:0] p, app;
    logic d;
    s = '0;
    p = (seed == '0) ? 48'h1 : seed;
    for (longint i = 1; i < g; i++) begin
      app = hpdt ? {det[47:42], p[41:0]} : p;
      if (prb == 13) d = 1'(((i % 16) >> 1) & 1);
      else           d = cut_ref(app, prb);
      s = sa_ref_step(s, d);
      p = prt_ref_step(p);
    end
    return s;
  endfunction

  task automatic run_single(input logic [47:0] seed, input logic [47:0] det, input int mode,
                            input int n, input int code, input int prb, input string what);
    ic_t icv;
    longint g, gc;
    int gb;
    icv = '0;
    icv.mode = 3'(mode); icv.clk_div = 4'(n); icv.gate_code = 4'(code);
    probe = prb;
    write_ic(icv);
    g = 1;
    repeat (code) g *= 10;
    gb = n_gates;
    set_switch(enable_sw, 1);
    wait_gate(gb, g * 6 * (n + 1) * 2 + 1000, gc);
    expect_eq(gc, g * 6 * (n + 1), {what, ": gate length in clocks"});
    expect_eq(sig, ref_sig(seed, det, mode == 3, prb, g), {what, ": signature"});
    set_switch(enable_sw, 0);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    logic [47:0] seed, det;
    ic_t icv;
    longint gc;
    seed = 48'h5A17_C3E9_0B64;
    det  = 48'hB400_0000_0001;

    // Power-up: the master clear is held by its debouncer.
    idle(100);
    mclr_n = 1;
    idle(DEB + 10);
    expect_eq(sig, 0, "signature after clear");

    // Seed and a deterministic pattern.
    write_bytes(seed);
    pc_clock(CP_DCLK_IS);
    write_bytes(det);
    pc_clock(CP_DCLK_TPG);

    // Mode 0, single opening, N = 1, 100 periods, comparator output.
    run_single(seed, det, 0, 1, 2, 0, "PRT comparator");
    m_single++;
    // Constant nodes: the reference values 299BD5 and 000000.
    run_single(seed, det, 0, 0, 5, 11, "PRT constant HIGH");
    expect_eq(sig, 24'h299BD5, "constant HIGH gives 299BD5");
    run_single(seed, det, 0, 0, 2, 12, "PRT constant LOW");
    expect_eq(sig, 24'h000000, "constant LOW gives 000000");
    m_const++;
    // Decoder output and the counter clocked by GCLK_CUT, N = 3.
    run_single(seed, det, 0, 3, 2, 6, "PRT decoder Y3");
    run_single(seed, det, 0, 2, 3, 13, "PRT counter node");

    // Multiple opening: repeated gates give the same signature.
    begin
      int gates;
      icv = '0; icv.mode = MODE_PRT; icv.clk_div = 1; icv.gate_code = 2;
      probe = 2;
      write_ic(icv);
      set_switch(mod_sel_sw, 1);
      enable_sw = 1;
      gates = 0;
      while (gates < 4) begin
        @(posedge st);
        idle(2);
        gates++;
        expect_eq(sig, ref_sig(seed, det, 0, 2, 100), "multiple opening signature");
        m_multi++;
      end
      set_switch(enable_sw, 0);
      set_switch(mod_sel_sw, 0);
    end

    // HPDT: GTPG(47:42) fixed, the rest pseudorandom.
    run_single(seed, det, 3, 1, 2, 14, "HPDT");
    m_hpdt++;

    // PC-clocked deterministic modes 1 and 2.
    for (int md = 1; md <= 2; md++) begin
      logic [23:0] s;
      logic [47:0] p;
      icv = '0; icv.mode = 3'(md); icv.clr_sa = 1; icv.clr_cut = 1;
      write_ic(icv);
      m_sa_clr_ic++;
      expect_eq(sig, 0, "SA cleared by IC(11)");
      icv.clr_sa = 0; icv.clr_cut = 0;
      write_ic(icv);
      s = '0;
      for (int t = 0; t < 12; t++) begin
        p = {$urandom, $urandom};
        probe = (t % 2 == 0) ? 1 : 13;
        write_bytes(p);
        pc_clock(CP_DCLK_TPG);
        expect_eq(gtpg, p, "DET pattern on GTPG");
        pc_clock(CP_DCLK_CUT);
        pc_clock(CP_DCLK_SIG);
        s = sa_ref_step(s, (probe == 13) ? 1'(((t + 1) >> 1) & 1) : cut_ref(p, 1));
      end
      expect_eq(sig, s, "DET signature");
      if (md == 1) m_det++; else m_detprog++;
    end

    // Single-shot timing: microsecond range, then millisecond range.
    begin
      int w_us, w_ms;
      w_us = 123; w_ms = 3;
      probe = 15;
      icv = '0; icv.mode = MODE_SS_US;
      write_ic(icv);
      write_bytes(48'h0); pc_clock(CP_DCLK_TPG);
      ss_width_clk = w_us * 50;
      write_bytes(48'h1); pc_clock(CP_DCLK_TPG);
      idle(w_us * 50 + 500);
      checks++;
      if (sig < w_us - 1 || sig > w_us + 1) begin
        failures++; $display("FAIL SS us: %0d for %0d us", sig, w_us);
      end else m_ss_us++;
      icv.mode = MODE_SS_MS;
      write_ic(icv);
      write_bytes(48'h0); pc_clock(CP_DCLK_TPG);
      ss_width_clk = w_ms * 50000;
      write_bytes(48'h1); pc_clock(CP_DCLK_TPG);
      idle(w_ms * 50000 + 2000);
      checks++;
      if (sig < w_ms - 1 || sig > w_ms + 1) begin
        failures++; $display("FAIL SS ms: %0d for %0d ms", sig, w_ms);
      end else m_ss_ms++;
      ss_width_clk = 0;
    end

    // Status port: read the held signature back nibble by nibble.
    begin
      logic [23:0] got;
      run_single(seed, det, 0, 1, 2, 0, "PRT before read-back");
      for (int k = 0; k < 6; k++) begin
        icv = '0; icv.mode = MODE_PRT; icv.clk_div = 1; icv.gate_code = 2;
        icv.stat_sel = 3'(k);
        write_ic(icv);
        idle(4);
        got[4*k +: 4] = status;
      end
      expect_eq(got, sig, "signature read through the status port");
      m_status++;
    end

    // External clock: the same signature from CLK_EXT edges.
    begin
      logic [23:0] sig_int;
      int gb;
      sig_int = sig;
      set_switch(sw_clk_sw, 1);
      fork
        begin : ext_gen
          forever begin
            idle(3);
            clk_ext = !clk_ext;
          end
        end
        begin
          icv = '0; icv.mode = MODE_PRT; icv.gate_code = 2;
          write_ic(icv);
          probe = 0;
          gb = n_gates;
          set_switch(enable_sw, 1);
          wait_gate(gb, 100000, gc);
          expect_eq(gc, 100 * 6 * 3, "gate length with external clock (one tick per edge, edges 3 clocks apart)");
          expect_eq(sig, sig_int, "external clock gives the same signature");
          m_ext++;
        end
      join_any
      disable ext_gen;
      set_switch(enable_sw, 0);
      set_switch(sw_clk_sw, 0);
    end

    // Display: the lit digit shows its nibble of SIG.
    begin
      logic [6:0] shape [16];
      logic [5:0] en;
      int d;
      shape = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
      for (int i = 0; i < 6; i++) begin
        idle(50000);
        en = ~an_n;
        d = 0;
        for (int j = 0; j < 6; j++) if (en[j]) d = j;
        expect_eq(seg_n, 7'(~shape[sig[4*d +: 4]]), "display digit");
        m_display++;
      end
    end

    // Every mechanism must have happened.
    begin
      int m [string];
      m["single opening"] = m_single;   m["multiple opening"] = m_multi;
      m["constant nodes"] = m_const;    m["HPDT mode"] = m_hpdt;
      m["DET mode"] = m_det;            m["DET programming mode"] = m_detprog;
      m["SS us range"] = m_ss_us;       m["SS ms range"] = m_ss_ms;
      m["external clock"] = m_ext;      m["status read-back"] = m_status;
      m["CUT clear"] = m_clr_cut;       m["display"] = m_display;
      m["SA clear by IC(11)"] = m_sa_clr_ic;
      foreach (m[k]) begin
        $display("mechanism %-22s %0d", k, m[k]);
        checks++;
        if (m[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
