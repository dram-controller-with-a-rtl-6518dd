// boundary_cmp: decides for one bank whether its open row has entered its
// dead time.
//
// The boundary is the last access interval shifted left by SHIFT positions,
// i.e. multiplied by 2 (SHIFT = 1) or 4 (SHIFT = 2). When the time elapsed
// since the last access to the bank has reached the boundary the row is
// predicted dead and close is raised. The shift and the comparison follow the
// document; the document shows its results for a factor of 2, which is the
// default. Reaching the boundary (>=) rather than passing it is this design's
// reading of "a certain amount of time ... has elapsed". No prediction is made
// while the interval is not yet valid.
//
// Interface: count (idle time, ticks), interval (last access interval,
// ticks), interval_valid; close (output). Purely combinational.
module boundary_cmp #(
  parameter int unsigned CNT_W = 18,
  parameter int unsigned SHIFT = 1
) (
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] interval,
  input  logic             interval_valid,
  output logic             close
);

  logic [CNT_W+SHIFT-1:0] boundary;

  assign boundary = (CNT_W + SHIFT)'(interval) << SHIFT;
  assign close    = interval_valid && ((CNT_W + SHIFT)'(count) >= boundary);

  initial assert (SHIFT == 1 || SHIFT == 2)
    else $error("boundary_cmp: SHIFT must be 1 or 2");

endmodule
