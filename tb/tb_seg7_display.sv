// tb_seg7_display: self-checking testbench of the seven-segment display.
// With REFRESH_CYCLES = 4 it follows the scan over all six digits for
// several random values and checks that exactly one digit is enabled,
// digits come in order 0..5 with 4 clocks each, and each shows the segment
// pattern of its nibble (from a table written from the digit shapes).
module tb_seg7_display;
  logic clk = 0, rst = 1;
  logic [23:0] value = 0;
  logic [6:0] seg_n;
  logic [5:0] an_n;
  int checks = 0, failures = 0;
  // Lit segments gfedcba for 0..F.
  logic [6:0] shape [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                             7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  seg7_display #(.REFRESH_CYCLES(4)) dut (.clk, .rst, .value, .seg_n, .an_n);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, prev_d, run, seen;
    logic [5:0] en;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 10; t++) begin
      value = 24'($urandom);
      repeat (30) @(posedge clk);
      prev_d = -1; run = 0; seen = 0;
      for (int c = 0; c < 72; c++) begin
        @(posedge clk); #1;
        checks++;
        if (!$onehot(~an_n)) begin
          failures++; $display("FAIL digit enables %b", an_n);
          continue;
        end
        en = ~an_n;
        d = 0;
        for (int i = 0; i < 6; i++) if (en[i]) d = i;
        if (seg_n !== ~shape[value[4*d +: 4]]) begin
          failures++;
          $display("FAIL digit %0d shows %b for %h", d, seg_n, value[4*d +: 4]);
        end
        if (d != prev_d) begin
          if (prev_d >= 0) begin
            checks++;
            if (d != (prev_d + 1) % 6 || (seen > 0 && run != 4)) begin
              failures++; $display("FAIL scan order %0d -> %0d after %0d clocks", prev_d, d, run);
            end
          end
          if (prev_d >= 0) seen++;
          prev_d = d; run = 1;
        end else begin
          run++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
