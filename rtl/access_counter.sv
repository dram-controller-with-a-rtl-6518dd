// access_counter: per-bank counter of the time elapsed since the last access
// to the bank.
//
// The counter is cleared by every access to its bank (clear) and otherwise
// advances by one on each tick from the clock divider, so it holds the idle
// time of the open row in ticks. It saturates at its maximum value instead of
// wrapping, so a very long idle time never looks like a short one; the
// saturation and the width (CNT_W = 18, about 4.2 million clocks at a divide
// ratio of 16) are this design's choices.
//
// Interface: clk, rst_n (active-low synchronous reset), tick (count enable),
// clear (access to this bank; wins over tick), count (output).
// Timing: count changes one clock after clear or tick.
module access_counter #(
  parameter int unsigned CNT_W = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             clear,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      count <= '0;
    end else if (tick && (count != '1)) begin
      count <= count + 1'b1;
    end
  end

endmodule
