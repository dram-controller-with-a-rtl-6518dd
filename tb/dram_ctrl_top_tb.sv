// dram_ctrl_top_tb: end-to-end test of the controller at its default
// parameters (4 banks, 4096 rows of 1 KB, 128-bit bus, 20-clock timings,
// boundary 2 x interval, common interval register) against the behavioural
// DRAM model.
//
// The workload is a sequence of row "episodes": a burst of 1 to 8 accesses
// to one row of a random bank, with short gaps between them (the access
// interval), followed by an idle stretch (the dead time) before the next
// episode, which goes to another row. The same sequence is run twice from
// reset: first with the predictor disabled (plain open row policy), then
// enabled. For every request the testbench classifies the access from the
// command bus (hit, closed bank, row conflict, bank still precharging) and
// checks the reported kind, the latency of that kind (20, 40 or 60 clocks,
// or in between for a bank caught precharging), the read data against a
// reference memory, that no predictor precharge occurs while the predictor
// is disabled, and that a predictor precharge of a bank comes only after the
// bank has been idle for about twice the last measured interval. Each of
// these mechanisms must occur: row hits, accesses to closed banks, row
// conflicts, waits on a precharge, predictor precharges, precharges hidden
// by the predictor (a closed-bank access to a bank the predictor closed), and
// the switch between the two policies. Finally the average latency with the
// predictor must be below that of the open row policy.
module dram_ctrl_top_tb;
  import dram_pkg::*;
  localparam int NB = 4, RW = 12, CW = 6, DW = 128, AW = 24;
  localparam int TPR = 20, TRA = 20, TCA = 20, DIVT = 16;
  localparam int N_EPI = 1200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pred_en;
  logic req_valid, req_ready, req_we;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_wdata;
  logic resp_valid;
  logic [DW-1:0] resp_rdata;
  acc_kind_e resp_kind;
  logic [15:0] resp_latency;
  logic pred_pre;
  logic [NB-1:0] interval_valid;
  dram_cmd_e dram_cmd;
  logic [1:0] dram_bank;
  logic [RW-1:0] dram_row;
  logic [CW-1:0] dram_col;
  logic [DW-1:0] dram_wdata, dram_rdata;
  int violations, n_pre, n_act;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dram_ctrl_top dut (.*);

  dram_model mem (
    .clk, .rst_n, .cmd(dram_cmd), .bank(dram_bank), .row(dram_row), .col(dram_col),
    .wdata(dram_wdata), .rdata(dram_rdata), .violations, .n_pre, .n_act);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- workload ----------------
  typedef struct {
    int bank, row, col, gap;  // gap: idle clocks before the request
    bit we;
  } req_t;
  req_t wl[$];

  // ---------------- reference state from the command bus ----------------
  bit          t_open[NB];
  int          t_row[NB];
  longint      t_pre[NB];
  longint      t_acc[NB];     // clock of the last column command per bank
  bit          t_pclose[NB];  // bank last closed by the predictor
  longint      iv_cyc;        // last measured access interval, clocks
  bit          iv_ok;
  longint      cyc;
  logic [DW-1:0] ref_mem [int];
  acc_kind_e   exp_kind;
  int          exp_key;
  bit          exp_we, exp_hidden;
  logic [DW-1:0] exp_data;
  bit          busy;
  int          n_kind[4];
  int          n_pred, n_hidden, n_resp, n_modes;
  longint      lat_sum;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (req_valid && req_ready) begin
      int b, r, c;
      b = int'(req_addr[11:10]); r = int'(req_addr[23:12]); c = int'(req_addr[9:4]);
      busy = 1;
      exp_we  = req_we;
      exp_key = (b << 20) | (r << 8) | c;
      exp_hidden = 0;
      if (cyc - t_pre[b] < longint'(TPR))      exp_kind = ACC_PRE_WAIT;
      else if (t_open[b] && t_row[b] == r)     exp_kind = ACC_HIT;
      else if (t_open[b])                      exp_kind = ACC_CONFLICT;
      else begin
        exp_kind = ACC_CLOSED;
        exp_hidden = t_pclose[b];
      end
      if (req_we) ref_mem[exp_key] = req_wdata;
      exp_data = ref_mem.exists(exp_key) ? ref_mem[exp_key]
               : {(DW / 32){32'hA5000000 ^ 32'({req_addr[11:10], req_addr[23:12], req_addr[9:4]})}};
    end
    if (pred_pre) begin
      n_pred++;
      check(pred_en, "no predictor precharge under the open row policy");
      check(iv_ok && (cyc - t_acc[dram_bank] >= 2 * iv_cyc - 3 * DIVT),
            $sformatf("predictor precharge after %0d idle clocks, interval %0d",
                      cyc - t_acc[dram_bank], iv_cyc));
    end
    case (dram_cmd)
      CMD_ACT: begin t_open[dram_bank] = 1; t_row[dram_bank] = int'(dram_row); end
      CMD_PRE: begin t_open[dram_bank] = 0; t_pre[dram_bank] = cyc; t_pclose[dram_bank] = pred_pre; end
      CMD_RD, CMD_WR: begin
        if (exp_kind == ACC_HIT) begin iv_cyc = cyc - t_acc[dram_bank]; iv_ok = 1; end
        t_acc[dram_bank] = cyc;
      end
      default: ;
    endcase
    if (resp_valid) begin
      int lat;
      n_resp++;
      check(busy, "response with a request outstanding");
      busy = 0;
      check(resp_kind == exp_kind, $sformatf("kind %s expected %s", resp_kind.name(), exp_kind.name()));
      n_kind[exp_kind]++;
      n_hidden += int'(exp_hidden);
      lat = int'(resp_latency);
      lat_sum += longint'(lat);
      case (exp_kind)
        ACC_HIT:      check(lat == TCA, $sformatf("hit latency %0d", lat));
        ACC_CLOSED:   check(lat == TRA + TCA, $sformatf("closed latency %0d", lat));
        ACC_CONFLICT: check(lat == TPR + TRA + TCA, $sformatf("conflict latency %0d", lat));
        default:      check(lat > TRA + TCA && lat < TPR + TRA + TCA, $sformatf("precharge-wait latency %0d", lat));
      endcase
      if (!exp_we) check(resp_rdata == exp_data, "read data");
    end
  end

  task automatic reset_ref();
    for (int b = 0; b < NB; b++) begin
      t_open[b] = 0; t_row[b] = 0; t_pre[b] = -100; t_acc[b] = 0; t_pclose[b] = 0;
    end
    for (int k = 0; k < 4; k++) n_kind[k] = 0;
    iv_cyc = 0; iv_ok = 0; cyc = 0; busy = 0;
    n_pred = 0; n_hidden = 0; n_resp = 0; lat_sum = 0;
  endtask

  task automatic run_phase(input bit en, output real avg);
    rst_n <= 1'b0;
    pred_en <= en;
    repeat (4) @(posedge clk);
    reset_ref();
    @(negedge clk);
    rst_n = 1'b1;
    foreach (wl[i]) begin
      repeat (wl[i].gap) @(negedge clk);
      req_valid = 1'b1;
      req_we    = wl[i].we;
      req_addr  = {RW'(wl[i].row), 2'(wl[i].bank), CW'(wl[i].col), 4'(i)};
      req_wdata = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 1'b0;
      while (busy) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    avg = real'(lat_sum) / real'(n_resp);
    check(n_resp == wl.size(), "every request answered");
    check(violations == 0, $sformatf("DRAM timing violations: %0d", violations));
    $display("%s: %0d requests, hits %0d closed %0d conflicts %0d pre-wait %0d, predictor PRE %0d (hidden %0d), avg latency %0.2f",
             en ? "predictor" : "open row ", n_resp, n_kind[0], n_kind[1], n_kind[2], n_kind[3],
             n_pred, n_hidden, avg);
  endtask

  initial begin
    real avg_open, avg_pred;
    int  nh_open, nc_open;
    pred_en = 1'b0; req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0;
    n_modes = 0;
    reset_ref();
    // build the workload
    for (int e = 0; e < N_EPI; e++) begin
      int b, r, n, base;
      b = $urandom_range(0, NB - 1);
      r = $urandom_range(0, 4095);
      n = $urandom_range(1, 8);
      base = $urandom_range(150, 200);
      for (int k = 0; k < n; k++) begin
        req_t q;
        q.bank = b; q.row = r; q.col = $urandom_range(0, 63);
        q.we = ($urandom_range(0, 2) == 0);
        q.gap = (k == 0) ? $urandom_range(0, 3000) : base + $urandom_range(0, 20);
        wl.push_back(q);
      end
    end
    run_phase(1'b0, avg_open);
    n_modes++;
    nh_open = n_kind[ACC_HIT]; nc_open = n_kind[ACC_CONFLICT];
    check(nh_open > 0, "row hits seen");
    check(nc_open > 0, "row conflicts seen");
    check(n_pred == 0, "open row policy issues no predictor precharge");
    run_phase(1'b1, avg_pred);
    n_modes++;
    check(n_kind[ACC_CLOSED] > 0, "accesses to closed banks seen");
    check(n_kind[ACC_PRE_WAIT] > 0, "accesses waiting on a precharge seen");
    check(n_pred > 0, "predictor precharges issued");
    check(n_hidden > 0, "precharges hidden by the predictor");
    check(interval_valid == '1, "interval register valid");
    check(n_modes == 2, "both policies run");
    check(n_kind[ACC_CONFLICT] < nc_open, "fewer row conflicts with the predictor");
    check(avg_pred < avg_open, $sformatf("average latency %0.2f with predictor, %0.2f without", avg_pred, avg_open));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
