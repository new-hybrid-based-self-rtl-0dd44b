// edc: the edge detection compactor (EDC) used in the single-shot modes.
//
// It measures the time between successive edges of the probed signal DATA,
// which is how the pulse width of a single-shot circuit or of a timer
// output is turned into a signature. DATA is synchronised to the system
// clock and sampled on the CLK_ED ticks. When two samples differ (a rising
// or a falling edge) the pulse Edge 1 is raised for one CLK_ED period; its
// fall raises Edge 2 for the next CLK_ED period. The 23-bit SS counter
// counts CLK_SS ticks; it stops while Edge 1 is high, and Edge 1 copies its
// value SSCO into the SS latch (SS_SIG). Edge 2 clears the counter, which
// then restarts. After a single pulse, SS_SIG therefore holds its width in
// CLK_SS periods (microseconds or milliseconds), to within one period. The
// counter stops at its maximum rather than wrapping.
//
// Interface: clk, rst (synchronous, active high), data (asynchronous),
// ed_tick and ss_tick (one-cycle strobes at the CLK_ED and CLK_SS rates);
// out: ss_sig[23:0] (bit 23 always 0), edge1, edge2 (levels) and
// latched (one clock when SS_SIG takes a new value).
//
// The two edge pulses, the counter size, the latch and the roles of CLK_SS
// and CLK_ED follow the tester's description; the synchroniser and the
// saturation are this design's choice.
module edc (
  input  logic        clk,
  input  logic        rst,
  input  logic        data,
  input  logic        ed_tick,
  input  logic        ss_tick,
  output logic [23:0] ss_sig,
  output logic        edge1,
  output logic        edge2,
  output logic        latched
);

  logic [1:0]  sync_q;
  logic        smp_q;     // last CLK_ED sample of DATA
  logic        e1_q, e2_q;
  logic [22:0] cnt_q;
  logic [23:0] sig_q;
  logic        edge_seen;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= '0;
    else     sync_q <= {sync_q[0], data};
  end

  assign edge_seen = ed_tick && (smp_q != sync_q[1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      smp_q <= '0;
      e1_q  <= 1'b0;
      e2_q  <= 1'b0;
    end else if (ed_tick) begin
      smp_q <= sync_q[1];
      e1_q  <= edge_seen;
      e2_q  <= e1_q;
    end
  end

  // SS counter and latch.
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q <= '0;
      sig_q <= '0;
    end else begin
      if (e2_q) begin
        cnt_q <= '0;
      end else if (ss_tick && !e1_q && (cnt_q != '1)) begin
        cnt_q <= cnt_q + 23'd1;
      end
      if (edge_seen) sig_q <= {1'b0, cnt_q};
    end
  end

  assign ss_sig  = sig_q;
  assign edge1   = e1_q;
  assign edge2   = e2_q;
  assign latched = edge_seen;

endmodule
