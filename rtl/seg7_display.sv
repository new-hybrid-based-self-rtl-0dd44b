// seg7_display: shows the 24-bit signature as six hexadecimal digits on a
// multiplexed seven-segment display.
//
// One digit is lit at a time; a refresh counter moves to the next digit
// every REFRESH_CYCLES clocks (1 ms at 50 MHz by default, so the whole
// display is refreshed at about 167 Hz). Digit 0 shows SIG(3:0), digit 5
// shows SIG(23:20). Segments and digit enables are active low, as on common
// anode displays; seg_n bit 0 is segment a and bit 6 segment g.
//
// Interface: clk, rst (synchronous, active high), value[23:0]; seg_n[6:0],
// an_n[5:0]. Outputs are registered.
//
// The tester is described as showing its signature on seven-segment
// displays; the digit order, the refresh rate and the polarities are this
// design's choice.
module seg7_display #(
  parameter int unsigned REFRESH_CYCLES = 50000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] value,
  output logic [6:0]  seg_n,
  output logic [5:0]  an_n
);

  logic [31:0] cnt_q;
  logic [2:0]  dig_q;
  logic [3:0]  nib;
  logic [6:0]  seg;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q <= '0;
      dig_q <= '0;
    end else if (cnt_q + 32'd1 >= REFRESH_CYCLES) begin
      cnt_q <= '0;
      dig_q <= (dig_q == 3'd5) ? 3'd0 : dig_q + 3'd1;
    end else begin
      cnt_q <= cnt_q + 32'd1;
    end
  end

  assign nib = value[4*dig_q +: 4];

  // Segment pattern, bit 0 = a ... bit 6 = g, active high.
  always_comb begin
    unique case (nib)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;  // F
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      seg_n <= ~seg;
      an_n  <= ~(6'b000001 << dig_q);
    end
  end

endmodule
