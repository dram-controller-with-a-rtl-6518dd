// close_predictor: the simple row-close predictor.
//
// The predictor closes a bank's open row once the row has probably entered
// its dead time, so that the precharge of that row is hidden from the next
// access to a different row of the same bank. It consists of:
//   - a clock divider (tick_div) that advances the counters,
//   - one idle counter per bank (access_counter), cleared by every access to
//     the bank,
//   - the access interval register(s) (interval_regs), common or per bank,
//   - one shift-and-compare unit per bank (boundary_cmp).
// On an access that hits the bank's open row (acc_valid & acc_hit) the bank's
// idle counter holds the access interval just ended; it is written into the
// interval register(s) and the counter restarts from zero. An access that
// opens a new row only restarts the counter. close_req[b] asks the command
// sequencer to precharge bank b: the row is open, predictions are enabled and
// the idle time has reached twice (SHIFT = 1) or four times (SHIFT = 2) the
// last interval. This structure is the document's; the widths, the divide
// ratio and the pred_en switch (which turns the controller into a plain open
// row controller) are this design's choices.
//
// Interface: acc_valid/acc_bank/acc_hit report each column access as the
// sequencer issues it; bank_open comes from the open row table; pred_en
// enables precharge requests; close_req and interval_valid are outputs.
// Timing: close_req is a registered-input combinational function; it rises
// in the clock in which the counter reaches the boundary.
module close_predictor #(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned CNT_W     = 18,
  parameter int unsigned DIV       = 16,
  parameter int unsigned SHIFT     = 1,
  parameter bit          SEPARATE  = 1'b0,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pred_en,
  input  logic                 acc_valid,
  input  logic [BANK_W-1:0]    acc_bank,
  input  logic                 acc_hit,
  input  logic [NUM_BANKS-1:0] bank_open,
  output logic [NUM_BANKS-1:0] close_req,
  output logic [NUM_BANKS-1:0] interval_valid
);

  logic                               tick;
  logic [NUM_BANKS-1:0][CNT_W-1:0]    count;
  logic [NUM_BANKS-1:0][CNT_W-1:0]    interval;
  logic [NUM_BANKS-1:0]               cmp_close;

  tick_div #(.DIV(DIV)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    access_counter #(.CNT_W(CNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .tick  (tick),
      .clear (acc_valid && (acc_bank == BANK_W'(b))),
      .count (count[b])
    );

    boundary_cmp #(.CNT_W(CNT_W), .SHIFT(SHIFT)) u_cmp (
      .count          (count[b]),
      .interval       (interval[b]),
      .interval_valid (interval_valid[b]),
      .close          (cmp_close[b])
    );
  end

  interval_regs #(
    .NUM_BANKS (NUM_BANKS),
    .CNT_W     (CNT_W),
    .SEPARATE  (SEPARATE)
  ) u_iv (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (acc_valid && acc_hit),
    .wr_bank  (acc_bank),
    .wr_value (count[acc_bank]),
    .interval (interval),
    .valid    (interval_valid)
  );

  assign close_req = cmp_close & bank_open & {NUM_BANKS{pred_en}};

endmodule
