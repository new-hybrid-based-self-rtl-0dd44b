// prtpg: the 48-bit pseudorandom test pattern generator (PRTPG).
//
// A maximal-length Fibonacci LFSR, x^48 + x^47 + x^21 + x^20 + 1, whose 48
// stages drive the pattern bus directly. load copies the initial seed
// TPG_IS into the register (CLR_TPG at the start of a test gate); step
// advances it by one state (rising edge of GCLK_TPG). An all-zero seed
// would lock an LFSR, so a zero seed is replaced by 1.
//
// Interface: clk, synchronous active-high rst (register := 1), load/step
// one-cycle strobes, load having priority, seed[47:0], pattern[47:0].
// Timing: pattern changes one clock after the strobe.
//
// The 48-bit width, the seed port and the pattern rate follow the tester's
// description; the feedback polynomial and the zero-seed rule are this
// design's choice, since no polynomial is given for the generator.
module prtpg (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             step,
  input  logic [hbst_pkg::TPG_W-1:0] seed,
  output logic [hbst_pkg::TPG_W-1:0] pattern
);

  logic [hbst_pkg::TPG_W-1:0] lfsr_q;
  logic             fb;

  // Taps 48, 47, 21, 20 (stage numbers counted from 1 at the LSB).
  assign fb = lfsr_q[47] ^ lfsr_q[46] ^ lfsr_q[20] ^ lfsr_q[19];

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr_q <= hbst_pkg::TPG_W'(1);
    end else if (load) begin
      lfsr_q <= (seed == '0) ? hbst_pkg::TPG_W'(1) : seed;
    end else if (step) begin
      lfsr_q <= {lfsr_q[46:0], fb};
    end
  end

  assign pattern = lfsr_q;

endmodule
