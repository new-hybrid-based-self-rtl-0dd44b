// tb_cu_det: self-checking testbench of the PC control unit CU_DET.
// Writes random IC codes and 48-bit seeds through the PC protocol and
// checks that IC and TPG_IS change only on DCLK_IC / DCLK_IS and then take
// exactly the bytes written, including the field split of IC.
module tb_cu_det;
  import hbst_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0] cport = 4'hF;
  logic [7:0] dport = 0;
  logic [7:0] data;
  det_ctl_t ctl;
  ic_t ic;
  logic [47:0] tpg_is;
  int checks = 0, failures = 0;

  cu_det dut (.clk, .rst, .cport, .dport, .data, .ctl, .ic, .tpg_is);

  always #5 clk = !clk;

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic pc_byte(input int k, input logic [7:0] v);
    dport = v;     idle(4);
    cport = 4'(k); idle(6);
  endtask

  task automatic pc_clock(input logic [3:0] code);
    dport[7] = 1'b0; idle(2);
    cport = code;    idle(6);
    dport[7] = 1'b1; idle(6);
    dport[7] = 1'b0; idle(6);
  endtask

  task automatic expect48(input logic [47:0] got, input logic [47:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %012h exp %012h", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] icv, ic_old;
    logic [47:0] sv, is_old;
    idle(3); rst = 0; idle(4);
    expect48(48'(ic), 0, "IC after reset");
    expect48(tpg_is, 1, "seed after reset");
    for (int t = 0; t < 10; t++) begin
      icv = 16'($urandom);
      sv  = {$urandom, $urandom};
      ic_old = ic; is_old = tpg_is;
      pc_byte(CP_BYTE_L, icv[7:0]);
      pc_byte(CP_BYTE_H, icv[15:8]);
      for (int k = 0; k < 6; k++) pc_byte(k, sv[8*k +: 8]);
      expect48(48'(ic), 48'(ic_old), "IC held before DCLK_IC");
      expect48(tpg_is, is_old, "seed held before DCLK_IS");
      pc_clock(CP_DCLK_IC);
      expect48(48'(ic), 48'(icv), "IC after DCLK_IC");
      expect48(tpg_is, is_old, "seed held after DCLK_IC");
      pc_clock(CP_DCLK_IS);
      expect48(tpg_is, sv, "seed after DCLK_IS");
      checks++;
      if (ic.mode != icv[6:4] || ic.gate_code != icv[10:7] || ic.clk_div != icv[3:0] ||
          ic.stat_sel != icv[15:13] || ic.clr_sa != icv[11] || ic.clr_cut != icv[12]) begin
        failures++;
        $display("FAIL IC fields");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
