// tb_status_port: self-checking testbench of the PC status port.
// Reads a random signature nibble by nibble (codes 0..5), the flag word
// (code 6, including the EDC flag, which stays set while code 6 is
// selected and clears when the select leaves code 6) and the fixed code-7
// pattern, one clock after each select.
module tb_status_port;
  logic clk = 0, rst = 1, st = 0, test_gate = 0, ss_new = 0;
  logic [2:0] sel = 0;
  logic [23:0] sig = 0;
  logic [3:0] status;
  int checks = 0, failures = 0;

  status_port dut (.clk, .rst, .sel, .sig, .st, .test_gate, .ss_new, .status);

  always #5 clk = !clk;

  task automatic expect4(input logic [3:0] exp, input string what);
    checks++;
    if (status !== exp) begin
      failures++;
      $display("FAIL %s: %h exp %h", what, status, exp);
    end
  endtask

  task automatic sel_read(input int s);
    sel = 3'(s);
    @(posedge clk); #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 20; t++) begin
      sig = 24'($urandom);
      for (int k = 0; k < 6; k++) begin
        sel_read(k);
        expect4(sig[4*k +: 4], "signature nibble");
      end
      st = 1'($urandom); test_gate = 1'($urandom);
      ss_new = 1; @(posedge clk); #1 ss_new = 0;
      sel_read(6);
      expect4({st, test_gate, 1'b1, 1'b0}, "flags with EDC flag set");
      sel_read(6);
      expect4({st, test_gate, 1'b1, 1'b0}, "EDC flag held while code 6 is selected");
      sel_read(7);
      expect4(4'b1010, "link pattern");
      sel_read(6);
      expect4({st, test_gate, 1'b0, 1'b0}, "EDC flag cleared after leaving code 6");
      ss_new = 1; @(posedge clk); #1 ss_new = 0;
      sel_read(6);
      expect4({st, test_gate, 1'b1, 1'b0}, "EDC flag set while code 6 is selected");
      sel_read(5);
      expect4(sig[23:20], "signature nibble after flag read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
