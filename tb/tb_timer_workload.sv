// tb_timer_workload: the timer test of the hybrid self-test, run on the
// tester at its default parameters (50 MHz clock, 20 ms debounce).
//
// In this test the microcontroller on the board starts one of its timers
// with a chosen prescaler, raises a port pin, and drops the pin when the
// timer overflows. The tester measures how long the pin was high in
// single-shot mode, and that time is the timer's signature. Here a small
// behavioural stand-in plays the microcontroller: the PC selects the timer
// run through GTPG(3:0) and starts it with a rising GTPG(5); 10 us later the
// stand-in raises the probed pin for the expected on-time of that run and
// then drops it. The on-times are the expected values of the eight
// timer/prescaler runs of a PIC18F452 (the PIC16F877 runs are the first six
// of them): 6,895, 13,791, 3,447, 6,895, 3,447, 13,791, 3,447, 6,895 us.
//
// Every run is timed in the microsecond range (mode 4) and must read back
// within one count of its on-time. The longest run is also timed in the
// millisecond range (mode 5). One result is read back through the status
// port, together with the new-result flag of status code 6. Mechanisms
// counted: us measurements, ms measurement, status read-back.
//
// The on-times are the expected values of the timer test in the original
// description; the stand-in, its start protocol over GTPG and the 10 us
// start delay are this testbench's own.
module tb_timer_workload;
  import hbst_pkg::*;

  localparam int DEB = 1000000;   // debounce time of the top, in clocks
  localparam int N_RUNS = 8;
  localparam int ON_US [N_RUNS] = '{6895, 13791, 3447, 6895, 3447, 13791, 3447, 6895};

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

  // ---------------- microcontroller stand-in ----------------
  // Start strobe GTPG(5), run select GTPG(3:0); pin high for ON_US of the
  // selected run, 10 us after the start.
  logic   start_p = 0, pin = 0;
  longint rise_at = -1, fall_at = -1;
  always @(posedge clk) begin
    start_p <= gtpg[5];
    if (gtpg[5] && !start_p) begin
      rise_at = cyc + 500;
      fall_at = cyc + 500 + longint'(ON_US[int'(gtpg[3:0]) % N_RUNS]) * 50;
    end
    if (cyc == rise_at) pin <= 1'b1;
    if (cyc == fall_at) pin <= 1'b0;
  end
  assign data = pin;

  int m_us = 0, m_ms = 0, m_status = 0;

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

  task automatic write_ic(input ic_t v);
    pc_byte(CP_BYTE_L, v[7:0]);
    pc_byte(CP_BYTE_H, v[15:8]);
    pc_clock(CP_DCLK_IC);
  endtask

  // Put a 48-bit pattern on GTPG through DET_TPG.
  task automatic put_pattern(input logic [47:0] v);
    for (int k = 0; k < 6; k++) pc_byte(4'(k), v[8*k +: 8]);
    pc_clock(CP_DCLK_TPG);
  endtask

  // Run timer test r and wait for the pin to fall and the result to settle.
  task automatic run_timer(input int r);
    put_pattern(48'(r));
    put_pattern(48'(r) | 48'h20);
    idle(500 + longint'(ON_US[r]) * 50 + 2000);
    put_pattern(48'h0);
  endtask

  task automatic expect_near(input longint got, input longint exp, input string what);
    checks++;
    if (got < exp - 1 || got > exp + 1) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d +- 1", what, got, exp);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    idle(12_000_000);
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

    // Microsecond range: every run of the timer table.
    icv = '0; icv.mode = MODE_SS_US;
    write_ic(icv);
    for (int r = 0; r < N_RUNS; r++) begin
      run_timer(r);
      expect_near(sig, ON_US[r], $sformatf("run %0d on-time in us", r));
      m_us++;
    end

    // Read the last result back through the status port: flag, then nibbles.
    begin
      logic [23:0] got;
      logic [23:0] shown;
      shown = sig;
      icv.stat_sel = 3'd6;
      write_ic(icv);
      idle(4);
      checks++;
      if (status[1] !== 1'b1) begin
        failures++; $display("FAIL new-result flag not set: %b", status);
      end
      for (int k = 0; k < 6; k++) begin
        icv.stat_sel = 3'(k);
        write_ic(icv);
        idle(4);
        got[4*k +: 4] = status;
      end
      checks++;
      if (got != shown) begin
        failures++; $display("FAIL status read-back %h, SIG %h", got, shown);
      end
      icv.stat_sel = 3'd6;
      write_ic(icv);
      idle(4);
      checks++;
      if (status[1] !== 1'b0) begin
        failures++; $display("FAIL new-result flag not cleared: %b", status);
      end
      m_status++;
    end

    // Millisecond range: the longest run.
    icv = '0; icv.mode = MODE_SS_MS;
    write_ic(icv);
    run_timer(1);
    expect_near(sig, ON_US[1] / 1000, "run 1 on-time in ms");
    m_ms++;

    checks++;
    if (m_us == 0 || m_ms == 0 || m_status == 0) begin
      failures++;
      $display("FAIL mechanism never seen: us %0d ms %0d status %0d", m_us, m_ms, m_status);
    end
    $display("mechanisms: us %0d ms %0d status %0d", m_us, m_ms, m_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
