// tick_div: clock divider that produces the count enable of the per-bank idle
// counters.
//
// Counting every controller clock would need wide counters, since rows stay
// idle for up to millions of cycles. The counters are therefore advanced by a
// tick derived by dividing the clock: tick is high for one clock in every DIV
// clocks. The divide ratio is this design's choice (DIV = 16 by default); the
// document proposes dividing the clock but gives no ratio.
//
// Interface: clk, rst_n (active-low synchronous reset), tick (output).
// Timing: after reset, tick is first high in the DIV-th clock, then every DIV
// clocks.
module tick_div #(
  parameter int unsigned DIV = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign tick = (cnt == W'(DIV - 1));

  initial assert (DIV >= 1) else $error("tick_div: DIV must be at least 1");

endmodule
