// tb_tpg: self-checking testbench of the test pattern generator.
// Loads a deterministic pattern and a seed, steps the pseudorandom
// generator, and checks GTPG in every mode: PRTPG alone in mode 0, DET_TPG
// alone in modes 1, 2, 4, 5, and in HPDT mode bits 47:42 from DET_TPG and
// bits 41:0 from PRTPG.
module tb_tpg;
  import hbst_tb_pkg::*;

  logic clk = 0, rst = 1, det_xfer = 0, prt_load = 0, prt_step = 0;
  logic [2:0] mode = 0;
  logic [7:0] data = 0;
  logic [5:0] byte_ld = 0;
  logic [47:0] seed = 0, gtpg, det, prt;
  int checks = 0, failures = 0;

  tpg dut (.clk, .rst, .mode, .data, .byte_ld, .det_xfer, .seed, .prt_load, .prt_step, .gtpg);

  always #5 clk = !clk;

  task automatic expect48(input logic [47:0] exp, input string what);
    checks++;
    if (gtpg !== exp) begin
      failures++;
      $display("FAIL %s: %012h exp %012h", what, gtpg, exp);
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
    for (int t = 0; t < 20; t++) begin
      det = {$urandom, $urandom};
      for (int k = 0; k < 6; k++) begin
        data = det[8*k +: 8]; byte_ld = 6'(1) << k;
        @(posedge clk); #1;
      end
      byte_ld = 0;
      det_xfer = 1; @(posedge clk); #1 det_xfer = 0;
      seed = {$urandom, $urandom} | 48'h1;
      prt_load = 1; @(posedge clk); #1 prt_load = 0;
      prt = seed;
      for (int s = 0; s < t; s++) begin
        prt_step = 1; @(posedge clk); #1 prt_step = 0;
        prt = prt_ref_step(prt);
      end
      mode = 3'd0; #1 expect48(prt, "mode 0");
      mode = 3'd1; #1 expect48(det, "mode 1");
      mode = 3'd2; #1 expect48(det, "mode 2");
      mode = 3'd3; #1 expect48({det[47:42], prt[41:0]}, "mode 3 HPDT");
      mode = 3'd4; #1 expect48(det, "mode 4");
      mode = 3'd5; #1 expect48(det, "mode 5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
