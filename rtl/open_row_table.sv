// open_row_table: which row is open in each bank.
//
// This is the bookkeeping every open row controller has: one register per
// bank holding the index of the row last opened in it, with a flag saying the
// row is still open, and one comparator per bank that compares the row of the
// current access with that register. An ACT command loads the register and
// sets the flag; a PRE command clears the flag. The structure is the one the
// document describes for the open row controller; the open flag is this
// design's addition so that a closed bank is never mistaken for a hit.
//
// Interface: act_en/act_bank/act_row, pre_en/pre_bank (commands as issued);
// lk_bank/lk_row (the access to classify); lk_open (that bank has an open
// row), lk_hit (and it is the addressed row), open_mask (open flag per bank).
// Timing: updates take effect in the next clock; lookups are combinational.
module open_row_table #(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned ROW_W     = 12,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 act_en,
  input  logic [BANK_W-1:0]    act_bank,
  input  logic [ROW_W-1:0]     act_row,
  input  logic                 pre_en,
  input  logic [BANK_W-1:0]    pre_bank,
  input  logic [BANK_W-1:0]    lk_bank,
  input  logic [ROW_W-1:0]     lk_row,
  output logic                 lk_open,
  output logic                 lk_hit,
  output logic [NUM_BANKS-1:0] open_mask
);

  logic [NUM_BANKS-1:0][ROW_W-1:0] row_q;
  logic [NUM_BANKS-1:0]            open_q;
  logic [NUM_BANKS-1:0]            row_eq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_q  <= '0;
      open_q <= '0;
    end else begin
      if (pre_en) open_q[pre_bank] <= 1'b0;
      if (act_en) begin
        row_q[act_bank]  <= act_row;
        open_q[act_bank] <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) row_eq[b] = (row_q[b] == lk_row);
  end

  assign open_mask = open_q;
  assign lk_open   = open_q[lk_bank];
  assign lk_hit    = open_q[lk_bank] && row_eq[lk_bank];

endmodule
