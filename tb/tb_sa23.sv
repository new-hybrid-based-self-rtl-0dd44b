// tb_sa23: self-checking testbench of the signature analyser.
// Checks random streams against the reference division, clear priority,
// the hold when no shift strobe comes, and the two signatures the tester
// reports for constant nodes: 299BD5 for HIGH and 000000 for LOW after
// 99,999 shifts from a cleared register.
module tb_sa23;
  import hbst_tb_pkg::*;

  logic clk = 0, rst = 1, clr = 0, shift = 0, data = 0;
  logic [23:0] sig;
  int checks = 0, failures = 0;
  logic [23:0] ref_s;

  sa23 dut (.clk, .rst, .clr, .shift, .data, .sig);

  always #5 clk = !clk;

  task automatic check(input logic [23:0] exp, input string what);
    checks++;
    if (sig !== exp) begin
      failures++;
      $display("FAIL %s: sig=%06h exp=%06h", what, sig, exp);
    end
  endtask

  task automatic run_const(input logic d, input int n);
    clr = 1; @(posedge clk); #1 clr = 0;
    data = d; shift = 1;
    repeat (n) @(posedge clk);
    #1 shift = 0;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(24'h0, "after reset");
    // Random streams with random shift enables.
    ref_s = '0;
    for (int i = 0; i < 3000; i++) begin
      shift = 1'($urandom);
      data  = 1'($urandom);
      @(posedge clk);
      if (shift) ref_s = sa_ref_step(ref_s, data);
      #1;
      check(ref_s, "random stream");
    end
    // Clear wins over shift.
    clr = 1; shift = 1; data = 1;
    @(posedge clk); #1;
    check(24'h0, "clear priority");
    clr = 0; shift = 0;
    // Constant nodes over a 99,999-shift gate.
    run_const(1'b1, 99999);
    check(24'h299BD5, "constant HIGH node");
    run_const(1'b0, 99999);
    check(24'h000000, "constant LOW node");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
