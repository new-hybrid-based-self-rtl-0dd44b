// tb_prtpg: self-checking testbench of the pseudorandom pattern generator.
// Checks seed loading, load priority, the zero-seed rule, a long run of
// steps against the reference LFSR, and that the sequence does not return
// to its seed within 20,000 steps.
module tb_prtpg;
  import hbst_tb_pkg::*;

  logic clk = 0, rst = 1, load = 0, step = 0;
  logic [47:0] seed = '0, pattern, ref_p, first;
  int checks = 0, failures = 0;

  prtpg dut (.clk, .rst, .load, .step, .seed, .pattern);

  always #5 clk = !clk;

  task automatic check(input logic [47:0] exp, input string what);
    checks++;
    if (pattern !== exp) begin
      failures++;
      $display("FAIL %s: %012h exp %012h", what, pattern, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(48'h1, "reset state");
    seed = 48'hA5C3_0F1E_7B29;
    load = 1; step = 1;
    @(posedge clk); #1 load = 0; step = 0;
    check(seed, "seed load has priority");
    ref_p = seed;
    first = seed;
    for (int i = 0; i < 20000; i++) begin
      step = 1'($urandom);
      @(posedge clk);
      if (step) ref_p = prt_ref_step(ref_p);
      #1;
      if (i % 16 == 0 || i > 19990) check(ref_p, "sequence");
      if (step && pattern == first) begin
        checks++; failures++;
        $display("FAIL short cycle at step %0d", i);
      end
    end
    seed = '0;
    load = 1; @(posedge clk); #1 load = 0;
    check(48'h1, "zero seed replaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
