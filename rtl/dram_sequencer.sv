// dram_sequencer: command sequencer of the DRAM controller.
//
// Requests are served one at a time, in order. For each accepted request the
// sequencer looks the bank up in the open row table and issues:
//   row hit       RD/WR at once                       latency T_CA
//   bank closed   ACT, then RD/WR after T_RA          latency T_RA + T_CA
//   row conflict  PRE, ACT after T_PR, RD/WR after T_RA
//                                                     latency T_PR + T_RA + T_CA
//   bank still precharging (closed early by the predictor): wait for the rest
//                 of T_PR, then as for a closed bank.
// The request completes (resp_valid) T_CA clocks after the column command,
// when the DRAM delivers read data. These three latencies are the ones the
// document builds its argument on; serving one request at a time and having
// writes take T_CA like reads are this design's simplifications.
//
// Rows are kept open after an access (open row policy) unless the predictor
// asks for a precharge (close_req). Such a precharge is issued in a clock in
// which the request path issues no command, to the lowest-numbered bank that
// is asked to close, is open, and is not the bank the current request is
// using. Each bank has its own precharge timer, so a predictor precharge runs
// in the background while other banks are served.
//
// Interface: req_* (valid/ready handshake: a request is taken in a clock
// with req_valid && req_ready), resp_* (one-clock pulse with read data, kind
// of access and latency in clocks from acceptance), the open row table's
// update and lookup ports, the predictor's access report (acc_*) and close
// requests, and the DRAM command bus (one command per clock; read data
// expected on dram_rdata T_CA clocks after RD). pred_pre pulses when a
// predictor precharge is issued.
module dram_sequencer
  import dram_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned ROW_W     = 12,
  parameter int unsigned COL_W     = 6,
  parameter int unsigned DATA_W    = 128,
  parameter int unsigned T_PR      = 20,
  parameter int unsigned T_RA      = 20,
  parameter int unsigned T_CA      = 20,
  parameter int unsigned LAT_W     = 16,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [BANK_W-1:0]    req_bank,
  input  logic [ROW_W-1:0]     req_row,
  input  logic [COL_W-1:0]     req_col,
  input  logic [DATA_W-1:0]    req_wdata,
  // response
  output logic                 resp_valid,
  output logic [DATA_W-1:0]    resp_rdata,
  output acc_kind_e            resp_kind,
  output logic [LAT_W-1:0]     resp_latency,
  // open row table
  output logic                 ort_act_en,
  output logic                 ort_pre_en,
  output logic [BANK_W-1:0]    ort_pre_bank,
  output logic [BANK_W-1:0]    ort_lk_bank,
  output logic [ROW_W-1:0]     ort_lk_row,
  input  logic                 ort_lk_open,
  input  logic                 ort_lk_hit,
  input  logic [NUM_BANKS-1:0] ort_open_mask,
  // predictor
  output logic                 acc_valid,
  output logic [BANK_W-1:0]    acc_bank,
  output logic                 acc_hit,
  input  logic [NUM_BANKS-1:0] close_req,
  output logic                 pred_pre,
  // DRAM command bus
  output dram_cmd_e            dram_cmd,
  output logic [BANK_W-1:0]    dram_bank,
  output logic [ROW_W-1:0]     dram_row,
  output logic [COL_W-1:0]     dram_col,
  output logic [DATA_W-1:0]    dram_wdata,
  input  logic [DATA_W-1:0]    dram_rdata
);

  localparam int unsigned TW = $clog2(((T_PR > T_RA) ? ((T_PR > T_CA) ? T_PR : T_CA)
                                                      : ((T_RA > T_CA) ? T_RA : T_CA)) + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_PRE, S_ACT, S_CAS} state_e;

  state_e                       state_q, state_d;
  logic [TW-1:0]                tmr_q, tmr_d;
  logic [NUM_BANKS-1:0][TW-1:0] pre_tmr_q;
  logic [NUM_BANKS-1:0]         precharging;
  logic [LAT_W-1:0]             lat_q;
  acc_kind_e                    kind_q, kind_d;

  logic                         cur_we;
  logic [BANK_W-1:0]            cur_bank;
  logic [ROW_W-1:0]             cur_row;
  logic [COL_W-1:0]             cur_col;
  logic [DATA_W-1:0]            cur_wdata;

  // bank/row/col of the request being served: the incoming one while idle
  logic                         s_we;
  logic [BANK_W-1:0]            s_bank;
  logic [ROW_W-1:0]             s_row;
  logic [COL_W-1:0]             s_col;
  logic [DATA_W-1:0]            s_wdata;
  logic                         take;

  // command chosen by the request path, before the predictor fills idle slots
  dram_cmd_e                    rq_cmd;
  logic                         pre_sel_v;
  logic [BANK_W-1:0]            pre_sel;

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) precharging[b] = (pre_tmr_q[b] != '0);
  end

  assign req_ready = (state_q == S_IDLE);
  assign take      = req_valid && req_ready;

  assign s_we    = (state_q == S_IDLE) ? req_we    : cur_we;
  assign s_bank  = (state_q == S_IDLE) ? req_bank  : cur_bank;
  assign s_row   = (state_q == S_IDLE) ? req_row   : cur_row;
  assign s_col   = (state_q == S_IDLE) ? req_col   : cur_col;
  assign s_wdata = (state_q == S_IDLE) ? req_wdata : cur_wdata;

  assign ort_lk_bank = s_bank;
  assign ort_lk_row  = s_row;

  // request path
  always_comb begin
    state_d = state_q;
    tmr_d   = (tmr_q != '0) ? tmr_q - 1'b1 : tmr_q;
    kind_d  = kind_q;
    rq_cmd  = CMD_NOP;
    unique case (state_q)
      S_IDLE: if (req_valid) begin
        if (precharging[req_bank]) begin
          kind_d  = ACC_PRE_WAIT;
          state_d = S_WAIT_PRE;
        end else if (ort_lk_hit) begin
          kind_d  = ACC_HIT;
          rq_cmd  = s_we ? CMD_WR : CMD_RD;
          tmr_d   = TW'(T_CA - 1);
          state_d = S_CAS;
        end else if (ort_lk_open) begin
          kind_d  = ACC_CONFLICT;
          rq_cmd  = CMD_PRE;
          state_d = S_WAIT_PRE;
        end else begin
          kind_d  = ACC_CLOSED;
          rq_cmd  = CMD_ACT;
          tmr_d   = TW'(T_RA - 1);
          state_d = S_ACT;
        end
      end
      S_WAIT_PRE: if (!precharging[cur_bank]) begin
        rq_cmd  = CMD_ACT;
        tmr_d   = TW'(T_RA - 1);
        state_d = S_ACT;
      end
      S_ACT: if (tmr_q == '0) begin
        rq_cmd  = s_we ? CMD_WR : CMD_RD;
        tmr_d   = TW'(T_CA - 1);
        state_d = S_CAS;
      end
      S_CAS: if (tmr_q == '0) begin
        state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  // predictor precharge: lowest-numbered eligible bank, only on a free slot
  always_comb begin
    pre_sel_v = 1'b0;
    pre_sel   = '0;
    for (int b = NUM_BANKS - 1; b >= 0; b--) begin
      if (close_req[b] && ort_open_mask[b] && !precharging[b] &&
          !((state_q != S_IDLE) && (cur_bank == BANK_W'(b))) &&
          !((state_q == S_IDLE) && req_valid && (req_bank == BANK_W'(b)))) begin
        pre_sel_v = 1'b1;
        pre_sel   = BANK_W'(b);
      end
    end
  end

  assign pred_pre = (rq_cmd == CMD_NOP) && pre_sel_v;

  always_comb begin
    dram_cmd   = rq_cmd;
    dram_bank  = s_bank;
    dram_row   = s_row;
    dram_col   = s_col;
    dram_wdata = s_wdata;
    if (pred_pre) begin
      dram_cmd  = CMD_PRE;
      dram_bank = pre_sel;
    end
  end

  assign ort_act_en   = (dram_cmd == CMD_ACT);
  assign ort_pre_en   = (dram_cmd == CMD_PRE);
  assign ort_pre_bank = dram_bank;

  assign acc_valid = (rq_cmd == CMD_RD) || (rq_cmd == CMD_WR);
  assign acc_bank  = s_bank;
  assign acc_hit   = (state_q == S_IDLE);  // a column command straight from idle is a row hit

  assign resp_valid   = (state_q == S_CAS) && (tmr_q == '0);
  assign resp_rdata   = dram_rdata;
  assign resp_kind    = kind_q;
  assign resp_latency = lat_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      tmr_q      <= '0;
      kind_q     <= ACC_HIT;
      lat_q      <= '0;
      pre_tmr_q  <= '0;
      cur_we     <= 1'b0;
      cur_bank   <= '0;
      cur_row    <= '0;
      cur_col    <= '0;
      cur_wdata  <= '0;
    end else begin
      state_q <= state_d;
      tmr_q   <= tmr_d;
      kind_q  <= kind_d;
      if (take) begin
        lat_q     <= LAT_W'(1);
        cur_we    <= req_we;
        cur_bank  <= req_bank;
        cur_row   <= req_row;
        cur_col   <= req_col;
        cur_wdata <= req_wdata;
      end else if (lat_q != '1) begin
        lat_q <= lat_q + 1'b1;
      end
      for (int b = 0; b < NUM_BANKS; b++) begin
        if ((dram_cmd == CMD_PRE) && (dram_bank == BANK_W'(b))) begin
          pre_tmr_q[b] <= TW'(T_PR - 1);
        end else if (pre_tmr_q[b] != '0) begin
          pre_tmr_q[b] <= pre_tmr_q[b] - 1'b1;
        end
      end
    end
  end

  // DRAM protocol rules the sequencer relies on
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(dram_cmd == CMD_ACT && ort_open_mask[dram_bank]))
        else $error("dram_sequencer: ACT to a bank with an open row");
      assert (!(dram_cmd == CMD_ACT && precharging[dram_bank]))
        else $error("dram_sequencer: ACT before T_PR has elapsed");
      assert (!(dram_cmd == CMD_PRE && !ort_open_mask[dram_bank]))
        else $error("dram_sequencer: PRE to a closed bank");
      assert (!((dram_cmd == CMD_RD || dram_cmd == CMD_WR) && !ort_open_mask[dram_bank]))
        else $error("dram_sequencer: column command to a closed bank");
    end
  end

  initial assert (T_PR >= 1 && T_RA >= 1 && T_CA >= 1)
    else $error("dram_sequencer: timing parameters must be at least 1");

endmodule
