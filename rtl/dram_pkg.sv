// dram_pkg: types and constants shared by the row-close-predictor DRAM
// controller.
//
// The default geometry and timing are those of the evaluated DRAM: 4 banks
// per chip, 4096 rows per bank, 1 KB per row, a 128-bit data bus, and
// precharge, row access and column access times of 20 cycles each (cycles of
// the clock the controller runs on). With 16 bytes per bus word a row holds
// 64 column words. The DRAM command encoding below is this design's own.
package dram_pkg;

  localparam int unsigned NUM_BANKS_DEF = 4;
  localparam int unsigned NUM_ROWS_DEF  = 4096;
  localparam int unsigned ROW_BYTES_DEF = 1024;
  localparam int unsigned DATA_W_DEF    = 128;
  localparam int unsigned T_PR_DEF      = 20;
  localparam int unsigned T_RA_DEF      = 20;
  localparam int unsigned T_CA_DEF      = 20;

  // Command on the DRAM command bus, one per clock at most.
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,  // open (activate) a row
    CMD_PRE = 3'd2,  // close (precharge) the open row of a bank
    CMD_RD  = 3'd3,  // read one column word from the open row
    CMD_WR  = 3'd4   // write one column word into the open row
  } dram_cmd_e;

  // How the controller found the bank when it served a request.
  typedef enum logic [1:0] {
    ACC_HIT      = 2'd0,  // the addressed row was open: T_CA
    ACC_CLOSED   = 2'd1,  // the bank was closed (and precharged): T_RA + T_CA
    ACC_CONFLICT = 2'd2,  // another row was open: T_PR + T_RA + T_CA
    ACC_PRE_WAIT = 2'd3   // the bank was still precharging: part of T_PR + T_RA + T_CA
  } acc_kind_e;

endpackage
