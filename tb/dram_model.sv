// dram_model: behavioural model of a multi-bank DRAM chip for simulation.
//
// Not synthesizable. It holds data sparsely (an associative array keyed by
// bank, row and column; unwritten words read as a pattern derived from the
// address), keeps the open row of each bank, and checks every command against
// the timing the controller must honour: ACT only to a closed bank at least
// T_PR after its PRE, RD/WR only to an open bank at least T_RA after its ACT,
// PRE only to an open bank. Each violation increments `violations`. Read
// data appears on rdata T_CA clocks after the RD command and holds until the
// next read returns. While rst_n is low commands are ignored and all banks are
// closed, as after the power-up precharge of a real device; the data is kept.
module dram_model
  import dram_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned ROW_W     = 12,
  parameter int unsigned COL_W     = 6,
  parameter int unsigned DATA_W    = 128,
  parameter int unsigned T_PR      = 20,
  parameter int unsigned T_RA      = 20,
  parameter int unsigned T_CA      = 20,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dram_cmd_e         cmd,
  input  logic [BANK_W-1:0] bank,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output int                violations,
  output int                n_pre,
  output int                n_act
);

  localparam int unsigned KEY_W = BANK_W + ROW_W + COL_W;

  logic [DATA_W-1:0] mem [logic [KEY_W-1:0]];
  bit                open_q   [NUM_BANKS];
  logic [ROW_W-1:0]  row_q    [NUM_BANKS];
  longint            t_pre    [NUM_BANKS];
  longint            t_act    [NUM_BANKS];
  longint            now;
  longint            rd_due   [$];
  logic [DATA_W-1:0] rd_data  [$];

  // value of a word nobody has written
  function automatic logic [DATA_W-1:0] init_word(logic [KEY_W-1:0] k);
    return {(DATA_W / 32){32'hA5000000 ^ 32'(k)}};
  endfunction

  initial begin
    now = 0; violations = 0; n_pre = 0; n_act = 0; rdata = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      open_q[b] = 1'b0; row_q[b] = '0; t_pre[b] = -1000; t_act[b] = -1000;
    end
  end

  always @(posedge clk) begin
    logic [KEY_W-1:0] k;
    k = {bank, row_q[bank], col};
    now = now + 1;
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) open_q[b] = 1'b0;
    end else case (cmd)
      CMD_ACT: begin
        n_act++;
        if (open_q[bank] || (now - t_pre[bank] < longint'(T_PR))) begin
          violations++;
          $display("dram_model: bad ACT bank %0d at %0d", bank, now);
        end
        open_q[bank] = 1'b1; row_q[bank] = row; t_act[bank] = now;
      end
      CMD_PRE: begin
        n_pre++;
        if (!open_q[bank]) begin
          violations++;
          $display("dram_model: PRE to closed bank %0d at %0d", bank, now);
        end
        open_q[bank] = 1'b0; t_pre[bank] = now;
      end
      CMD_RD, CMD_WR: begin
        if (!open_q[bank] || (now - t_act[bank] < longint'(T_RA))) begin
          violations++;
          $display("dram_model: bad column command bank %0d at %0d", bank, now);
        end
        if (cmd == CMD_WR) begin
          mem[k] = wdata;
        end else begin
          rd_due.push_back(now + longint'(T_CA) - 1);
          rd_data.push_back(mem.exists(k) ? mem[k] : init_word(k));
        end
      end
      default: ;
    endcase
    if (rd_due.size() > 0 && rd_due[0] == now) begin
      rdata <= rd_data[0];
      void'(rd_due.pop_front());
      void'(rd_data.pop_front());
    end
  end

endmodule
