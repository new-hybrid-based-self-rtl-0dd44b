// tb_debouncer: self-checking testbench of the debouncer.
// With CYCLES = 50 it checks the power-up level, that bursts of bounce
// shorter than 50 clocks never reach the output, and that a level held
// steady appears 52 clocks later (two synchroniser clocks plus 50).
module tb_debouncer;
  logic clk = 0, din = 0, dout;
  int checks = 0, failures = 0;

  debouncer #(.CYCLES(50), .INIT(1'b0)) dut (.clk, .din, .dout);

  always #5 clk = !clk;

  task automatic expect1(input logic exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: %b exp %b", what, dout, exp);
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
    logic lvl;
    int lat;
    #1 expect1(1'b0, "power-up level");
    lvl = 0;
    for (int t = 0; t < 10; t++) begin
      // Bounce: toggles every 1..40 clocks, never 50 in a row.
      repeat (20) begin
        din = !din;
        repeat ($urandom_range(1, 40)) begin
          @(posedge clk); #1;
          if (dout !== lvl) begin checks++; failures++; $display("FAIL bounce passed"); end
        end
      end
      // Settle on the opposite of the current output.
      din = !lvl;
      lat = 0;
      while (dout === lvl && lat < 200) begin
        @(posedge clk); #1;
        lat++;
      end
      checks++;
      if (lat != 52) begin
        failures++; $display("FAIL settle latency %0d exp 52", lat);
      end
      lvl = !lvl;
      expect1(lvl, "settled level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
