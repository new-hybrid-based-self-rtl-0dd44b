// tb_det_tpg: self-checking testbench of the deterministic pattern
// generator. Loads random 48-bit patterns byte by byte, checks that the
// output keeps the previous pattern until the transfer strobe and then
// shows all six bytes at once, and that a partial reload changes only the
// reloaded bytes.
module tb_det_tpg;
  logic clk = 0, rst = 1, xfer = 0;
  logic [7:0] data = 0;
  logic [5:0] byte_ld = 0;
  logic [47:0] pattern, want, shown;
  int checks = 0, failures = 0;

  det_tpg dut (.clk, .rst, .data, .byte_ld, .xfer, .pattern);

  always #5 clk = !clk;

  task automatic check(input logic [47:0] exp, input string what);
    checks++;
    if (pattern !== exp) begin
      failures++;
      $display("FAIL %s: %012h exp %012h", what, pattern, exp);
    end
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
    check('0, "reset");
    shown = '0;
    for (int t = 0; t < 50; t++) begin
      want = {$urandom, $urandom};
      for (int k = 0; k < 6; k++) begin
        if (t == 0 || $urandom_range(0, 3) != 0 || t < 5) begin
          data = want[8*k +: 8];
          byte_ld = 6'(1) << k;
          @(posedge clk); #1;
          byte_ld = 0;
          check(shown, "held during loading");
        end else begin
          want[8*k +: 8] = (t == 0) ? 8'h0 : want_prev(k);
        end
      end
      xfer = 1; @(posedge clk); #1 xfer = 0;
      shown = want;
      check(shown, "after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Byte k of the staging register when it was not reloaded: the byte of
  // the pattern last transferred (every byte is reloaded before the first
  // skip, so the staging byte equals the shown byte).
  function automatic logic [7:0] want_prev(input int k);
    return shown[8*k +: 8];
  endfunction
endmodule
