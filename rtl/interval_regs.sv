// interval_regs: the access interval register(s) of the row-close predictor.
//
// An access interval is the time between two consecutive accesses to the
// open row of a bank. Whenever the controller sees such an access (a row hit)
// it writes the measured interval here. Two organisations are supported, as
// the document evaluates both:
//   SEPARATE = 0  one register common to all banks, rewritten by a new
//                 interval from any bank ("Common");
//   SEPARATE = 1  one register per bank, rewritten only by its own bank
//                 ("Separate").
// Each register has a valid flag, clear after reset: until the first interval
// has been measured the predictor makes no prediction. The flag is this
// design's way of expressing that prediction starts with the first measured
// interval. Common is the default because it is the organisation whose
// prediction accuracy the document tabulates.
//
// Interface: wr_en/wr_bank/wr_value write an interval; interval[b] and
// valid[b] give the value bank b compares against (the same register for all
// banks when SEPARATE = 0).
// Timing: a write is visible on the outputs in the next clock.
module interval_regs #(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned CNT_W     = 18,
  parameter bit          SEPARATE  = 1'b0,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [BANK_W-1:0]           wr_bank,
  input  logic [CNT_W-1:0]            wr_value,
  output logic [NUM_BANKS-1:0][CNT_W-1:0] interval,
  output logic [NUM_BANKS-1:0]        valid
);

  if (SEPARATE) begin : g_separate
    logic [NUM_BANKS-1:0][CNT_W-1:0] regs;
    logic [NUM_BANKS-1:0]            regs_v;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        regs   <= '0;
        regs_v <= '0;
      end else if (wr_en) begin
        regs[wr_bank]   <= wr_value;
        regs_v[wr_bank] <= 1'b1;
      end
    end

    assign interval = regs;
    assign valid    = regs_v;
  end else begin : g_common
    logic [CNT_W-1:0] reg_q;
    logic             reg_v;
    logic             unused_bank;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        reg_q <= '0;
        reg_v <= 1'b0;
      end else if (wr_en) begin
        reg_q <= wr_value;
        reg_v <= 1'b1;
      end
    end

    assign interval    = {NUM_BANKS{reg_q}};
    assign valid       = {NUM_BANKS{reg_v}};
    assign unused_bank = ^wr_bank;  // every bank writes the one register
  end

endmodule
