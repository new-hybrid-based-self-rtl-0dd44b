// hbst_pkg: types and constants shared by the signature multi-mode
// hardware-based self-test (SM-HBST) tester.
//
// The tester runs from one system clock (CLK_INT, 50 MHz, one period = 20 ns,
// which is the step of the delay column of the clock table). Every "clock"
// named by the tester (GCLK_TPG, GCLK_CUT, GCLK_SIG, DCLK_*, CLK_SS, CLK_ED)
// is produced as a level for the pins and as one-cycle enable strobes for the
// internal registers, so the whole design is a single clock domain.
//
// The 16-bit initial-condition code IC(15:0) written by the PC is held as the
// packed struct ic_t; its field layout follows the bit ranges the tester
// defines: IC(3:0) clock divider N, IC(6:4) test mode, IC(10:7) test-gate
// length code, IC(11) clear the signature analyser, IC(12) clear the circuit
// under test, IC(15:13) status-port select.
package hbst_pkg;

  // Width of the test pattern bus GTPG and of the seed TPG_IS.
  localparam int unsigned TPG_W = 48;

  // Test modes selected by IC(6:4).
  typedef enum logic [2:0] {
    MODE_PRT     = 3'd0,  // pseudorandom testing only
    MODE_DET     = 3'd1,  // deterministic testing only
    MODE_DETPROG = 3'd2,  // programming deterministic testing for the TPG
    MODE_HPDT    = 3'd3,  // deterministic bits mixed with pseudorandom bits
    MODE_SS_US   = 3'd4,  // single-shot timing, microsecond range
    MODE_SS_MS   = 3'd5   // single-shot timing, millisecond range
  } test_mode_e;

  // Initial-condition code IC(15:0).
  typedef struct packed {
    logic [2:0] stat_sel;   // IC(15:13) what the status port returns
    logic       clr_cut;    // IC(12)    clear the CUT (PC-driven modes)
    logic       clr_sa;     // IC(11)    clear the SA (PC-driven modes)
    logic [3:0] gate_code;  // IC(10:7)  test-gate length code
    logic [2:0] mode;       // IC(6:4)   test mode (test_mode_e)
    logic [3:0] clk_div;    // IC(3:0)   N of the three-phase clock table
  } ic_t;

  // Commands of the control port CPort(3:0).
  typedef enum logic [3:0] {
    CP_BYTE0    = 4'b0000,
    CP_BYTE1    = 4'b0001,
    CP_BYTE2    = 4'b0010,
    CP_BYTE3    = 4'b0011,
    CP_BYTE4    = 4'b0100,
    CP_BYTE5    = 4'b0101,
    CP_BYTE_L   = 4'b0110,
    CP_BYTE_H   = 4'b0111,
    CP_RSVD8    = 4'b1000,
    CP_RSVD9    = 4'b1001,
    CP_DCLK_TPG = 4'b1010,
    CP_DCLK_CUT = 4'b1011,
    CP_DCLK_SIG = 4'b1100,
    CP_DCLK_IC  = 4'b1101,
    CP_DCLK_IS  = 4'b1110,
    CP_RSVD15   = 4'b1111
  } cport_cmd_e;

  // Decoded control-port strobes (one system-clock cycle each) and the
  // PC-driven clock levels.
  typedef struct packed {
    logic [5:0] byte_ld;   // BYTE(5:0): load DPort into pattern/seed byte k
    logic       byte_l;    // BYTE_L: load DPort into IC(7:0) staging
    logic       byte_h;    // BYTE_H: load DPort into IC(15:8) staging
    logic       tpg_rise;  // rising edge of DCLK_TPG
    logic       cut_rise;  // rising edge of DCLK_CUT
    logic       sig_fall;  // falling edge of DCLK_SIG
    logic       ic_rise;   // rising edge of DCLK_IC
    logic       is_rise;   // rising edge of DCLK_IS
    logic       dclk_tpg;  // level of DCLK_TPG
    logic       dclk_cut;  // level of DCLK_CUT
    logic       dclk_sig;  // level of DCLK_SIG
  } det_ctl_t;

  // Number of three-phase clock periods inside one test gate for gate code
  // IC(10:7): 10^code, codes above 8 saturating at 10^8. The first period
  // of a gate clears the TPG, SA and CUT, the remaining ones are compacted.
  function automatic logic [31:0] gate_periods(input logic [3:0] code);
    logic [31:0] g;
    g = 32'd1;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(code)) g = g * 32'd10;
    end
    return g;
  endfunction

endpackage
