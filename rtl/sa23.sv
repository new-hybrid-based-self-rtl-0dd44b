// sa23: the 23-stage signature analyser (SA) of the test response compactor.
//
// A serial-input linear feedback shift register with the primitive
// polynomial 1 + x^5 + x^23. On every shift strobe the register moves one
// place towards the most significant stage and the new stage 0 takes
// DATA xor stage 22 xor stage 4. After a test gate the register holds the
// signature of the bit stream seen on the probed node; the aliasing
// probability is 2^-23. The division uses 23 stages; a 24th stage keeps the
// bit last shifted out of stage 22, so the six hex digits of the signature
// are all live. This is why the signatures of a node and of the same stream
// one pattern later differ by a one-place shift in all 24 bits.
//
// Interface: clk, synchronous active-high rst; clr clears the register (the
// CLR_SIG of a test gate), shift clocks one response bit data into it (the
// falling edge of GCLK_SIG or DCLK_SIG, delivered as a one-cycle strobe).
// clr has priority over shift. sig is the 24-bit SIG bus.
//
// The polynomial, the stage count and the 24-bit signature bus follow the
// tester's description; the tester's own reference signatures use all six
// hex digits (values such as E70FD2), and the extra history stage is this
// design's way of filling the top bit. The shift direction and the position of the
// feedback taps are chosen so that a node held HIGH for 99,999 shifts from
// a cleared register gives the signature 299BD5, the value the tester
// reports for a constant-HIGH node; a node held LOW gives 000000.
module sa23 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        shift,
  input  logic        data,
  output logic [23:0] sig
);

  logic [23:0] lfsr_q;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      lfsr_q <= '0;
    end else if (shift) begin
      lfsr_q <= {lfsr_q[22:0], lfsr_q[22] ^ lfsr_q[4] ^ data};
    end
  end

  assign sig = lfsr_q;

endmodule
