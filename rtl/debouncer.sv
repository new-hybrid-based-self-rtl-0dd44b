// debouncer: cleans a push-button or switch input.
//
// The input is brought in through a two-flop synchroniser; the output takes
// the new level only after the synchronised input has kept it for CYCLES
// consecutive clocks (20 ms at 50 MHz by default). It is used on the master
// clear and on the switches that choose the gate mode, the clock source and
// the enable.
//
// Interface: clk, din (asynchronous), dout. There is no reset input, since
// the master clear itself passes through a debouncer; the output powers up
// at INIT.
//
// That the tester debounces MCLR and its switches follows its description;
// the method and the 20 ms interval are this design's choice.
module debouncer #(
  parameter int unsigned CYCLES = 1000000,
  parameter bit          INIT   = 1'b0
) (
  input  logic clk,
  input  logic din,
  output logic dout
);

  // Power-up values (FPGA configuration state).
  logic [1:0]  sync_q = {2{INIT}};
  logic        out_q  = INIT;
  logic [31:0] cnt_q  = '0;

  always_ff @(posedge clk) begin
    sync_q <= {sync_q[0], din};
    if (sync_q[1] == out_q) begin
      cnt_q <= '0;
    end else if (cnt_q + 32'd1 >= CYCLES) begin
      cnt_q <= '0;
      out_q <= sync_q[1];
    end else begin
      cnt_q <= cnt_q + 32'd1;
    end
  end

  assign dout = out_q;

endmodule
