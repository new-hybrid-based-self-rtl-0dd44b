// tb_trc: self-checking testbench of the test response compactor.
// Shifts a random stream into the analyser and checks the raw signature
// against the reference (accounting for the two-clock input
// synchroniser), that modes 0 and 3 show the signature held at gate close
// while the register moves on, that modes 1 and 2 show the live register,
// and that modes 4 and 5 show the EDC measurement of a pulse.
module tb_trc;
  import hbst_tb_pkg::*;

  logic clk = 0, rst = 1, data = 0, sa_clr = 0, sa_shift = 0, gate_done = 0;
  logic ed_tick, ss_tick;
  logic [2:0] mode = 0;
  logic [23:0] sig, sa_sig;
  logic ss_new;
  logic [23:0] ref_s;
  int checks = 0, failures = 0, ed_c = 0, ss_c = 0;

  trc dut (.clk, .rst, .data, .mode, .sa_clr, .sa_shift, .gate_done, .ed_tick, .ss_tick,
           .sig, .sa_sig, .ss_new);

  always #10 clk = !clk;
  assign ed_tick = (ed_c == 9);
  assign ss_tick = (ss_c == 49);
  always @(posedge clk) begin
    ed_c <= (ed_c == 9) ? 0 : ed_c + 1;
    ss_c <= (ss_c == 49) ? 0 : ss_c + 1;
  end

  task automatic expect24(input logic [23:0] got, input logic [23:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %06h exp %06h", what, got, exp);
    end
  endtask

  // Present a bit, let it through the synchroniser, then shift it in.
  task automatic shift_bit(input logic d);
    data = d;
    repeat (2) @(posedge clk);
    #1 sa_shift = 1;
    @(posedge clk);
    #1 sa_shift = 0;
    ref_s = sa_ref_step(ref_s, d);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] held;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    sa_clr = 1; @(posedge clk); #1 sa_clr = 0;
    ref_s = '0;
    for (int i = 0; i < 200; i++) shift_bit(1'($urandom));
    expect24(sa_sig, ref_s, "raw signature");
    gate_done = 1; @(posedge clk); #1 gate_done = 0;
    held = ref_s;
    for (int i = 0; i < 20; i++) shift_bit(1'($urandom));
    mode = 0; #1 expect24(sig, held, "mode 0 holds the gate signature");
    mode = 3; #1 expect24(sig, held, "mode 3 holds the gate signature");
    mode = 1; #1 expect24(sig, ref_s, "mode 1 live signature");
    mode = 2; #1 expect24(sig, ref_s, "mode 2 live signature");
    mode = 4;
    data = 0; repeat (500) @(posedge clk);
    #1 data = 1; repeat (50 * 37) @(posedge clk);
    #1 data = 0; repeat (200) @(posedge clk);
    #1;
    checks++;
    if (sig < 24'd36 || sig > 24'd38) begin
      failures++; $display("FAIL mode 4 pulse of 37 us measured %0d", sig);
    end
    mode = 5; #1 checks++;
    if (sig < 24'd36 || sig > 24'd38) begin
      failures++; $display("FAIL mode 5 shows EDC: %0d", sig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
