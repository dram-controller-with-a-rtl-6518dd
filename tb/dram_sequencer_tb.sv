// dram_sequencer_tb: the command sequencer with an open row table and the
// behavioural DRAM model, under random reads and writes over few rows and
// random close requests standing in for the predictor. Distinct timings
// (T_PR = 5, T_RA = 7, T_CA = 3) make a swapped timer visible. For every
// request the testbench works out from the command bus what the bank state
// was when the request was taken, and checks the reported kind of access,
// the latency of that kind, the read data against a reference memory, and
// the access report to the predictor. The DRAM model checks the command
// timing. Every kind of access and predictor precharges must occur.
module dram_sequencer_tb;
  import dram_pkg::*;
  localparam int NB = 4, RW = 12, CW = 6, DW = 128;
  localparam int TPR = 5, TRA = 7, TCA = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, req_we;
  logic [1:0] req_bank;
  logic [RW-1:0] req_row;
  logic [CW-1:0] req_col;
  logic [DW-1:0] req_wdata;
  logic resp_valid;
  logic [DW-1:0] resp_rdata;
  acc_kind_e resp_kind;
  logic [15:0] resp_latency;
  logic ort_act_en, ort_pre_en, ort_lk_open, ort_lk_hit;
  logic [1:0] ort_pre_bank, ort_lk_bank;
  logic [RW-1:0] ort_lk_row;
  logic [NB-1:0] open_mask, close_req;
  logic acc_valid, acc_hit, pred_pre;
  logic [1:0] acc_bank;
  dram_cmd_e dram_cmd;
  logic [1:0] dram_bank;
  logic [RW-1:0] dram_row;
  logic [CW-1:0] dram_col;
  logic [DW-1:0] dram_wdata, dram_rdata;
  int violations, n_pre, n_act;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dram_sequencer #(.NUM_BANKS(NB), .ROW_W(RW), .COL_W(CW), .DATA_W(DW),
                   .T_PR(TPR), .T_RA(TRA), .T_CA(TCA)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_bank, .req_row, .req_col,
    .req_wdata, .resp_valid, .resp_rdata, .resp_kind, .resp_latency,
    .ort_act_en, .ort_pre_en, .ort_pre_bank, .ort_lk_bank, .ort_lk_row,
    .ort_lk_open, .ort_lk_hit, .ort_open_mask(open_mask),
    .acc_valid, .acc_bank, .acc_hit, .close_req, .pred_pre,
    .dram_cmd, .dram_bank, .dram_row, .dram_col, .dram_wdata, .dram_rdata);

  open_row_table #(.NUM_BANKS(NB), .ROW_W(RW)) ort (
    .clk, .rst_n, .act_en(ort_act_en), .act_bank(dram_bank), .act_row(dram_row),
    .pre_en(ort_pre_en), .pre_bank(ort_pre_bank), .lk_bank(ort_lk_bank), .lk_row(ort_lk_row),
    .lk_open(ort_lk_open), .lk_hit(ort_lk_hit), .open_mask(open_mask));

  dram_model #(.NUM_BANKS(NB), .ROW_W(RW), .COL_W(CW), .DATA_W(DW),
               .T_PR(TPR), .T_RA(TRA), .T_CA(TCA)) mem (
    .clk, .rst_n, .cmd(dram_cmd), .bank(dram_bank), .row(dram_row), .col(dram_col),
    .wdata(dram_wdata), .rdata(dram_rdata), .violations, .n_pre, .n_act);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state, updated from the command bus
  bit          t_open[NB];
  int          t_row[NB];
  longint      t_pre[NB];
  longint      cyc = 0;
  logic [DW-1:0] ref_mem [int];
  acc_kind_e   exp_kind;
  int          exp_bank, exp_key;
  bit          exp_we;
  logic [DW-1:0] exp_data;
  bit          busy = 0;
  int          n_kind[4];
  int          n_pred = 0, n_resp = 0;

  function automatic int key(int b, int r, int c);
    return (b << 20) | (r << 8) | c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // request taken in this cycle: classify from the state before this cycle's command
    if (req_valid && req_ready) begin
      check(!busy, "request taken while one is outstanding");
      busy = 1;
      exp_bank = int'(req_bank);
      exp_we   = req_we;
      exp_key  = key(int'(req_bank), int'(req_row), int'(req_col));
      if (cyc - t_pre[req_bank] < longint'(TPR))            exp_kind = ACC_PRE_WAIT;
      else if (t_open[req_bank] && t_row[req_bank] == int'(req_row)) exp_kind = ACC_HIT;
      else if (t_open[req_bank])                      exp_kind = ACC_CONFLICT;
      else                                            exp_kind = ACC_CLOSED;
      if (req_we) ref_mem[exp_key] = req_wdata;
      exp_data = ref_mem.exists(exp_key) ? ref_mem[exp_key]
               : {(DW / 32){32'hA5000000 ^ 32'({req_bank, req_row, req_col})}};
    end
    if (pred_pre) begin
      n_pred++;
      check(dram_cmd == CMD_PRE && close_req[dram_bank], "predictor precharge only on request");
      check(!(busy && int'(dram_bank) == exp_bank), "predictor never closes the bank in use");
    end
    if (acc_valid) begin
      check(dram_cmd == CMD_RD || dram_cmd == CMD_WR, "access report with a column command");
      check(acc_hit == (exp_kind == ACC_HIT), "access report: hit flag");
      check(int'(acc_bank) == exp_bank, "access report: bank");
    end
    case (dram_cmd)
      CMD_ACT: begin t_open[dram_bank] = 1; t_row[dram_bank] = int'(dram_row); end
      CMD_PRE: begin t_open[dram_bank] = 0; t_pre[dram_bank] = cyc; end
      default: ;
    endcase
    if (resp_valid) begin
      int lat;
      n_resp++;
      check(busy, "response with a request outstanding");
      busy = 0;
      check(resp_kind == exp_kind, $sformatf("kind %s expected %s", resp_kind.name(), exp_kind.name()));
      n_kind[exp_kind]++;
      lat = int'(resp_latency);
      case (exp_kind)
        ACC_HIT:      check(lat == TCA, $sformatf("hit latency %0d", lat));
        ACC_CLOSED:   check(lat == TRA + TCA, $sformatf("closed latency %0d", lat));
        ACC_CONFLICT: check(lat == TPR + TRA + TCA, $sformatf("conflict latency %0d", lat));
        default:      check(lat > TRA + TCA && lat < TPR + TRA + TCA, $sformatf("precharge-wait latency %0d", lat));
      endcase
      if (!exp_we) check(resp_rdata == exp_data, "read data");
    end
  end

  initial begin
    req_valid = 0; req_we = 0; req_bank = 0; req_row = 0; req_col = 0; req_wdata = 0;
    close_req = '0;
    for (int b = 0; b < NB; b++) begin t_open[b] = 0; t_row[b] = 0; t_pre[b] = -100; end
    for (int k = 0; k < 4; k++) n_kind[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      if (!(req_valid && !req_ready)) begin
        req_valid = ($urandom_range(0, 2) == 0);
        req_we    = ($urandom_range(0, 1) == 0);
        req_bank  = 2'($urandom);
        req_row   = RW'($urandom_range(0, 2));
        req_col   = CW'($urandom_range(0, 7));
        req_wdata = {$urandom, $urandom, $urandom, $urandom};
      end
      if ($urandom_range(0, 15) == 0) close_req = NB'($urandom);
    end
    req_valid = 0;
    repeat (60) @(posedge clk);
    check(violations == 0, $sformatf("DRAM timing violations: %0d", violations));
    check(n_resp > 1000, "requests were served");
    check(n_kind[ACC_HIT] > 0, "row hits seen");
    check(n_kind[ACC_CLOSED] > 0, "accesses to closed banks seen");
    check(n_kind[ACC_CONFLICT] > 0, "row conflicts seen");
    check(n_kind[ACC_PRE_WAIT] > 0, "accesses waiting on a precharge seen");
    check(n_pred > 0, "predictor precharges issued");
    $display("hits %0d closed %0d conflicts %0d pre-wait %0d predictor PRE %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_pred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
