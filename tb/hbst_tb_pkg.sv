// hbst_tb_pkg: reference models used by the tester's testbenches.
//
// They are written from the definitions, not from the RTL: the signature
// analyser as polynomial division of the bit stream by 1 + x^5 + x^23 kept
// as an array of bits, the pattern generator as a bit-list LFSR with taps
// 48, 47, 21, 20, and a small combinational board that stands in for the
// circuit under test (a 4-bit magnitude comparator and a 3-to-8 decoder,
// as on the example board).
package hbst_tb_pkg;

  // One signature-analyser shift on the 24 displayed stages held as a bit
  // array: the feedback uses stages 22 and 4 only (degree 23); stage 23 is
  // the bit last shifted out of stage 22.
  function automatic logic [23:0] sa_ref_step(input logic [23:0] s, input logic d);
    bit b [24];
    logic [23:0] r;
    bit nb;
    for (int i = 0; i < 24; i++) b[i] = s[i];
    nb = b[22] ^ b[4] ^ d;
    for (int i = 23; i > 0; i--) b[i] = b[i-1];
    b[0] = nb;
    for (int i = 0; i < 24; i++) r[i] = b[i];
    return r;
  endfunction

  // One pattern-generator step.
  function automatic logic [47:0] prt_ref_step(input logic [47:0] s);
    int taps [4] = '{48, 47, 21, 20};
    bit fb;
    fb = 0;
    foreach (taps[i]) fb ^= s[taps[i]-1];
    return {s[46:0], fb};
  endfunction

  // Nodes of the stand-in board, selected by probe:
  //   0..2  A>B, A=B, A<B of a comparator with A = p[3:0], B = p[7:4]
  //   3..10 active-low outputs Y0..Y7 of a decoder with select p[10:8] and
  //         enables G1 = p[11], G2A_n = p[12], G2B_n = 0
  //   11    constant HIGH, 12 constant LOW
  //   14    p[42] xor p[1], a node fed by a module-select input and a
  //         pseudorandom input (used in the HPDT mode)
  // Nodes 13 (a counter clocked by GCLK_CUT) and 15 (a single-shot output)
  // are sequential and modelled in the end-to-end testbench.
  function automatic logic cut_ref(input logic [47:0] p, input int probe);
    logic [3:0] a, b;
    logic [7:0] y_n;
    a = p[3:0];
    b = p[7:4];
    y_n = 8'hFF;
    if (p[11] && !p[12]) y_n[p[10:8]] = 1'b0;
    case (probe)
      0: return a > b;
      1: return a == b;
      2: return a < b;
      11: return 1'b1;
      12: return 1'b0;
      14: return p[42] ^ p[1];
      default: return y_n[probe-3];
    endcase
  endfunction

endpackage
