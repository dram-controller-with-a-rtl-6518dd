// dram_ctrl_top: DRAM controller with a simple row-close predictor.
//
// An open row controller keeps each bank's row open after an access. That is
// fast when the next access to the bank hits the same row (T_CA) and slow
// when it goes to another row (T_PR + T_RA + T_CA). This controller adds a
// predictor that closes a row once it has probably entered its dead time: it
// measures the interval between consecutive accesses to open rows and
// precharges a bank whose row has been idle for twice (or four times) the
// last interval. A later access to a different row then finds the bank
// already precharged and pays only T_RA + T_CA.
//
// Blocks: address decode (here), dram_sequencer (commands and timing),
// open_row_table (open row per bank, row hit comparators), close_predictor
// (clock divider, idle counters, access interval register(s), boundary
// comparators).
//
// Address decode: the byte address is split, from the most significant bit
// down, into row, bank, column and byte-in-word fields. This is the classic
// page interleaving order (row-group-bank-column); with a single DRAM chip
// the group field is empty. Defaults follow the evaluated DRAM: 4 banks,
// 4096 rows of 1 KB, a 128-bit data bus (64 column words per row, 24-bit
// byte address), T_PR = T_RA = T_CA = 20 clocks, boundary = 2 x interval,
// one interval register common to all banks. Counter width and divide ratio
// are this design's choices.
//
// Interface: request (req_valid/req_ready handshake, req_we, byte address,
// write data), response (resp_valid pulse with read data, the kind of access
// and its latency in clocks), pred_en (0: plain open row policy, 1: with the
// predictor), pred_pre (a predictor precharge was issued), interval_valid,
// and the DRAM command bus with its read data input.
module dram_ctrl_top
  import dram_pkg::*;
#(
  parameter int unsigned NUM_BANKS = dram_pkg::NUM_BANKS_DEF,
  parameter int unsigned NUM_ROWS  = dram_pkg::NUM_ROWS_DEF,
  parameter int unsigned ROW_BYTES = dram_pkg::ROW_BYTES_DEF,
  parameter int unsigned DATA_W    = dram_pkg::DATA_W_DEF,
  parameter int unsigned T_PR      = dram_pkg::T_PR_DEF,
  parameter int unsigned T_RA      = dram_pkg::T_RA_DEF,
  parameter int unsigned T_CA      = dram_pkg::T_CA_DEF,
  parameter int unsigned CNT_W     = 18,
  parameter int unsigned DIV       = 16,
  parameter int unsigned SHIFT     = 1,
  parameter bit          SEPARATE  = 1'b0,
  parameter int unsigned LAT_W     = 16,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W    = $clog2(NUM_ROWS),
  localparam int unsigned OFF_W    = $clog2(DATA_W / 8),
  localparam int unsigned COL_W    = $clog2(ROW_BYTES / (DATA_W / 8)),
  localparam int unsigned ADDR_W   = ROW_W + BANK_W + COL_W + OFF_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pred_en,
  // request
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [DATA_W-1:0]    req_wdata,
  // response
  output logic                 resp_valid,
  output logic [DATA_W-1:0]    resp_rdata,
  output acc_kind_e            resp_kind,
  output logic [LAT_W-1:0]     resp_latency,
  // predictor status
  output logic                 pred_pre,
  output logic [NUM_BANKS-1:0] interval_valid,
  // DRAM command bus
  output dram_cmd_e            dram_cmd,
  output logic [BANK_W-1:0]    dram_bank,
  output logic [ROW_W-1:0]     dram_row,
  output logic [COL_W-1:0]     dram_col,
  output logic [DATA_W-1:0]    dram_wdata,
  input  logic [DATA_W-1:0]    dram_rdata
);

  // row | bank | column | byte in word
  logic [ROW_W-1:0]  a_row;
  logic [BANK_W-1:0] a_bank;
  logic [COL_W-1:0]  a_col;

  assign a_col  = req_addr[OFF_W +: COL_W];
  assign a_bank = req_addr[OFF_W + COL_W +: BANK_W];
  assign a_row  = req_addr[OFF_W + COL_W + BANK_W +: ROW_W];

  // the byte-in-word bits select nothing: every access moves a whole word
  logic unused_off;
  assign unused_off = ^req_addr[OFF_W-1:0];

  logic                 ort_act_en, ort_pre_en, ort_lk_open, ort_lk_hit;
  logic [BANK_W-1:0]    ort_pre_bank, ort_lk_bank;
  logic [ROW_W-1:0]     ort_lk_row;
  logic [NUM_BANKS-1:0] open_mask, close_req;
  logic                 acc_valid, acc_hit;
  logic [BANK_W-1:0]    acc_bank;

  dram_sequencer #(
    .NUM_BANKS (NUM_BANKS), .ROW_W (ROW_W), .COL_W (COL_W), .DATA_W (DATA_W),
    .T_PR (T_PR), .T_RA (T_RA), .T_CA (T_CA), .LAT_W (LAT_W)
  ) u_seq (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we,
    .req_bank (a_bank), .req_row (a_row), .req_col (a_col), .req_wdata,
    .resp_valid, .resp_rdata, .resp_kind, .resp_latency,
    .ort_act_en, .ort_pre_en, .ort_pre_bank, .ort_lk_bank, .ort_lk_row,
    .ort_lk_open, .ort_lk_hit, .ort_open_mask (open_mask),
    .acc_valid, .acc_bank, .acc_hit, .close_req, .pred_pre,
    .dram_cmd, .dram_bank, .dram_row, .dram_col, .dram_wdata, .dram_rdata
  );

  open_row_table #(.NUM_BANKS (NUM_BANKS), .ROW_W (ROW_W)) u_ort (
    .clk, .rst_n,
    .act_en   (ort_act_en),
    .act_bank (dram_bank),
    .act_row  (dram_row),
    .pre_en   (ort_pre_en),
    .pre_bank (ort_pre_bank),
    .lk_bank  (ort_lk_bank),
    .lk_row   (ort_lk_row),
    .lk_open  (ort_lk_open),
    .lk_hit   (ort_lk_hit),
    .open_mask(open_mask)
  );

  close_predictor #(
    .NUM_BANKS (NUM_BANKS), .CNT_W (CNT_W), .DIV (DIV), .SHIFT (SHIFT),
    .SEPARATE (SEPARATE)
  ) u_pred (
    .clk, .rst_n, .pred_en,
    .acc_valid, .acc_bank, .acc_hit,
    .bank_open      (open_mask),
    .close_req      (close_req),
    .interval_valid (interval_valid)
  );

endmodule
