// tb_board_diagnosis: fault diagnosis of the random-logic part of a board,
// run on the tester at its default parameters.
//
// The board stand-in is the random logic of the example board: an 8-bit
// magnitude comparator built from two cascaded 4-bit comparators (U3 low
// nibble, U5 high nibble, 74LS85 behaviour including the cascade inputs)
// and a 3-to-8 decoder U7 (74LS138) enabled by U5's A=B output. GTPG(18:0)
// drive its 19 inputs: U3 A/B = GTPG(3:0)/GTPG(7:4), U5 A/B = GTPG(11:8)/
// GTPG(15:12), U7 select = GTPG(18:16). Two further nodes sit at constant
// HIGH and LOW, as the test-mode outputs of the board's multiplexers do.
//
// The tester runs pseudorandom mode with gates of 10^5 periods (N = 1) and
// multiple opening; between gates the testbench moves the probe to the next
// node (the gate's first period is its clear period, so no response bit of
// the new node is lost). Each node is measured on a good board and on a
// board whose U3 A=B output (pin 6) is stuck HIGH. Checks:
//  - every measured signature equals the one computed from the seed, the
//    pattern sequence and the board model (hbst_tb_pkg);
//  - the stuck pin itself gives 299BD5, the stuck-HIGH signature, and the
//    constant nodes 299BD5 and 000000 on both boards;
//  - U3's other outputs match the good board, and every U5 and U7 output
//    differs from it, since the fault reaches all of them;
//  - tracing back from the bad nodes, a bad node whose own inputs are all
//    good is the source of the fault, and the only such node is U3 pin 6.
//
// The parts, the node names, the stuck pin, its 299BD5 reading and which
// nodes it disturbs follow the example board of the original description;
// its schematic is not reproduced there, so the exact wiring above (which
// pattern bits feed which pins, the decoder's enable) is this testbench's
// reading of the text, and the seed is arbitrary.
module tb_board_diagnosis;
  import hbst_pkg::*;
  import hbst_tb_pkg::*;

  localparam int DEB = 1000000;   // debounce time of the top, in clocks
  localparam int N_NODES = 16;
  localparam int GATE_CODE = 5;
  localparam longint G = 100000;
  localparam logic [47:0] SEED = 48'h5A3C_96E1_0F27;

  // Node numbering. 0..2 U3 A>B, A=B, A<B (pins 5, 6, 7); 3..5 the same
  // for U5; 6..13 U7 Y0..Y7 (pins 15..9, 7); 14 constant HIGH; 15 LOW.
  localparam string NAMES [N_NODES] = '{
    "U03P05", "U03P06", "U03P07", "U05P05", "U05P06", "U05P07",
    "U07P15", "U07P14", "U07P13", "U07P12", "U07P11", "U07P10", "U07P09", "U07P07",
    "U09P04", "U09P07"};

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

  // ---------------- board model ----------------
  // 4-bit comparator with cascade inputs (gt_i, eq_i, lt_i); returns
  // {gt, eq, lt}.
  function automatic logic [2:0] cmp85(input logic [3:0] a, input logic [3:0] b,
                                       input logic gt_i, input logic eq_i, input logic lt_i);
    if (a > b) return 3'b100;
    if (a < b) return 3'b001;
    if (eq_i)  return 3'b010;
    return {!lt_i, 1'b0, !gt_i};
  endfunction

  function automatic logic board_node(input logic [47:0] p, input int node, input bit faulty);
    logic [2:0] u3, u5;
    logic [7:0] y;
    u3 = cmp85(p[3:0], p[7:4], 1'b0, 1'b1, 1'b0);
    if (faulty) u3[1] = 1'b1;                       // U3 pin 6 stuck HIGH
    u5 = cmp85(p[11:8], p[15:12], u3[2], u3[1], u3[0]);
    y = 8'hFF;                                      // outputs active low
    if (u5[1]) y[p[18:16]] = 1'b0;                  // enabled by U5 A=B
    case (node)
      0, 1, 2:     return u3[2 - node];
      3, 4, 5:     return u5[5 - node];
      14:          return 1'b1;
      15:          return 1'b0;
      default:     return y[node - 6];
    endcase
  endfunction

  function automatic logic [23:0] ref_sig(input int node, input bit faulty);
    logic [23:0] s;
    logic [47:0] p;
    s = '0;
    p = SEED;
    for (longint i = 1; i < G; i++) begin
      s = sa_ref_step(s, board_node(p, node, faulty));
      p = prt_ref_step(p);
    end
    return s;
  endfunction

  int probe = 0;
  bit faulty_board = 0;
  assign data = board_node(gtpg, probe, faulty_board);

  // ---------------- helpers ----------------
  task automatic idle(input longint n);
    repeat (n) @(posedge clk);
    #1;
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

  task automatic expect_sig(input logic [23:0] got, input logic [23:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    idle(80_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  logic [23:0] good [N_NODES];
  logic [23:0] bad  [N_NODES];

  initial begin
    ic_t icv;
    idle(10);
    mclr_n = 1;
    idle(DEB + 100);

    icv = '0; icv.mode = MODE_PRT; icv.clk_div = 1; icv.gate_code = GATE_CODE;
    pc_byte(CP_BYTE_L, icv[7:0]);
    pc_byte(CP_BYTE_H, icv[15:8]);
    pc_clock(CP_DCLK_IC);
    for (int k = 0; k < 6; k++) pc_byte(4'(k), SEED[8*k +: 8]);
    pc_clock(CP_DCLK_IS);

    // Multiple opening: gates follow one another while ENABLE is high.
    mod_sel_sw = 1;
    enable_sw = 1;
    idle(DEB + 10);

    // Skip the gate that is running now, then measure node by node: good
    // board first, then the faulty one. The probe moves as a gate closes.
    probe = 0;
    @(negedge test_gate);
    for (int b = 0; b < 2; b++) begin
      for (int n = 0; n < N_NODES; n++) begin
        faulty_board = (b == 1);
        probe = n;
        @(negedge test_gate);
        idle(4);
        if (b == 0) good[n] = sig; else bad[n] = sig;
      end
    end
    enable_sw = 0;

    // Signatures against the model.
    for (int n = 0; n < N_NODES; n++) begin
      expect_sig(good[n], ref_sig(n, 0), {NAMES[n], " good board"});
      expect_sig(bad[n],  ref_sig(n, 1), {NAMES[n], " faulty board"});
    end

    // The signatures the original example reports for stuck and constant nodes.
    expect_sig(bad[1],   24'h299BD5, "stuck pin U03P06");
    expect_sig(good[14], 24'h299BD5, "constant HIGH node");
    expect_sig(good[15], 24'h000000, "constant LOW node");

    // Which nodes the fault reaches.
    for (int n = 0; n < N_NODES; n++) begin
      bit should_differ;
      should_differ = (n >= 1 && n <= 13 && n != 2);
      checks++;
      if ((good[n] != bad[n]) != should_differ) begin
        failures++;
        $display("FAIL %s: good %h faulty %h, expected to %s", NAMES[n], good[n], bad[n],
                 should_differ ? "differ" : "match");
      end
    end

    // Trace back: a bad node whose inputs are all good is a source.
    begin
      int sources = 0, src = -1;
      for (int n = 0; n < N_NODES; n++) begin
        bit in_bad;
        if (good[n] == bad[n]) continue;
        in_bad = 0;
        if (n >= 3 && n <= 5)  for (int i = 0; i < 3; i++) in_bad |= (good[i] != bad[i]);
        if (n >= 6 && n <= 13) in_bad = (good[4] != bad[4]);
        if (!in_bad) begin sources++; src = n; end
      end
      checks++;
      if (sources != 1 || src != 1) begin
        failures++;
        $display("FAIL trace-back found %0d sources, last %0d", sources, src);
      end else $display("fault traced to %s", NAMES[src]);
    end

    for (int n = 0; n < N_NODES; n++)
      $display("%-7s good %h  faulty %h  %s", NAMES[n], good[n], bad[n],
               (good[n] == bad[n]) ? "True" : "False");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
