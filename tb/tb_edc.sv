// tb_edc: self-checking testbench of the edge detection compactor.
// With CLK_SS = 1 us and CLK_ED = 200 ns strobes (20 ns system clock) it
// applies single pulses of random width, both polarities, and checks that
// SS_SIG holds the width in microseconds to within one count after the
// closing edge, and that Edge 1 and Edge 2 each come once per edge and in
// that order.
module tb_edc;
  logic clk = 0, rst = 1, data = 0, ed_tick, ss_tick;
  logic [23:0] ss_sig;
  logic edge1, edge2, latched;
  int checks = 0, failures = 0;
  int ed_c = 0, ss_c = 0, n_e1 = 0, n_e2 = 0, order_bad = 0;
  logic e1_p = 0, e2_p = 0;

  edc dut (.clk, .rst, .data, .ed_tick, .ss_tick, .ss_sig, .edge1, .edge2, .latched);

  always #10 clk = !clk;

  assign ed_tick = (ed_c == 9);
  assign ss_tick = (ss_c == 49);
  always @(posedge clk) begin
    ed_c <= (ed_c == 9) ? 0 : ed_c + 1;
    ss_c <= (ss_c == 49) ? 0 : ss_c + 1;
    if (!rst && edge1 && !e1_p) n_e1++;
    if (!rst && edge2 && !e2_p) begin
      n_e2++;
      if (!e1_p) order_bad++;
    end
    e1_p <= edge1; e2_p <= edge2;
  end

  task automatic wait_us(input int us);
    repeat (50 * us) @(posedge clk);
    #1;
  endtask

  task automatic check_width(input int w);
    int got;
    got = int'(ss_sig);
    checks++;
    if (got < w - 1 || got > w + 1) begin
      failures++;
      $display("FAIL width %0d us measured %0d", w, got);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait_us(5);
    for (int t = 0; t < 20; t++) begin
      w = $urandom_range(3, 400);
      n_e1 = 0; n_e2 = 0;
      data = !data; wait_us(w);
      data = !data; wait_us(3);
      check_width(w);
      checks++;
      if (n_e1 != 2 || n_e2 != 2) begin
        failures++;
        $display("FAIL edge pulses: %0d Edge 1, %0d Edge 2", n_e1, n_e2);
      end
      wait_us($urandom_range(3, 20));
    end
    checks++;
    if (order_bad != 0) begin failures++; $display("FAIL Edge 2 without Edge 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
