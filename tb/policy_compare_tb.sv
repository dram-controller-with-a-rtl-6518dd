// policy_compare_tb: the controller policies side by side on one request
// stream: open row (predictor off), predictor with one common interval
// register, predictor with one interval register per bank (both with
// boundary = 2 x interval), and the common register with boundary =
// 4 x interval. Each runs in its own controller with its own DRAM model.
//
// The stream imitates two programs sharing the memory: program A uses banks
// 0 and 1 with short gaps between accesses to a row, program B uses banks 2
// and 3 with gaps ten times longer; rows are left idle for long stretches
// between bursts. Requests carry absolute issue times and wait while the
// controller is busy. Every response is checked for data and for the latency
// of its kind. A monitor on each command bus scores the predictions: a
// predictor precharge is a correct "close" if the next access to that bank
// goes to another row; a row kept open (interval known) is a correct
// "keep open" if the next access hits it. The checks at the end: every
// predictor variant beats the open row policy on average latency, the
// per-bank registers beat the common register, because with a common
// register the intervals of one program set the boundary for the other, and
// both kinds of prediction are right more often than not.
module policy_compare_tb;
  import dram_pkg::*;
  localparam int NB = 4, RW = 12, CW = 6, DW = 128, AW = 24, NP = 4;
  localparam int TPR = 20, TRA = 20, TCA = 20;

  typedef struct {
    longint t;
    int bank, row, col;
    bit we;
  } req_t;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  req_t wl[$];
  bit   done[NP];
  real  avg[NP];
  int   nconf[NP];
  real  cr_acc[NP], ncr_acc[NP];

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar p = 0; p < NP; p++) begin : g_pol
    logic req_valid, req_ready, req_we, resp_valid, pred_pre, pred_en;
    logic [AW-1:0] req_addr;
    logic [DW-1:0] req_wdata, resp_rdata, dram_wdata, dram_rdata;
    acc_kind_e resp_kind;
    logic [15:0] resp_latency;
    logic [NB-1:0] interval_valid;
    dram_cmd_e dram_cmd;
    logic [1:0] dram_bank;
    logic [RW-1:0] dram_row;
    logic [CW-1:0] dram_col;
    int violations, n_pre, n_act;
    logic [DW-1:0] ref_mem [int];

    assign pred_en = (p != 0);

    // prediction outcome, from the command bus: a predictor precharge is a
    // correct "close" if the next access to the bank goes to another row;
    // keeping a row open is correct if the next access hits it
    int  m_row[NB];
    bit  m_open[NB], m_pclosed[NB];
    int  n_cr, n_cr_ok, n_ncr, n_ncr_ok;
    initial begin
      n_cr = 0; n_cr_ok = 0; n_ncr = 0; n_ncr_ok = 0;
      for (int b = 0; b < NB; b++) begin m_row[b] = 0; m_open[b] = 0; m_pclosed[b] = 0; end
    end
    always @(posedge clk) if (rst_n) begin
      if (req_valid && req_ready) begin
        int b, r;
        b = int'(req_addr[11:10]); r = int'(req_addr[23:12]);
        if (m_pclosed[b]) begin
          n_cr++; n_cr_ok += int'(r != m_row[b]); m_pclosed[b] = 0;
        end else if (m_open[b] && interval_valid[b]) begin
          n_ncr++; n_ncr_ok += int'(r == m_row[b]);
        end
      end
      case (dram_cmd)
        CMD_ACT: begin m_open[dram_bank] = 1; m_row[dram_bank] = int'(dram_row); m_pclosed[dram_bank] = 0; end
        CMD_PRE: begin m_open[dram_bank] = 0; m_pclosed[dram_bank] = pred_pre; end
        default: ;
      endcase
    end

    dram_ctrl_top #(.SEPARATE(p == 2), .SHIFT((p == 3) ? 2 : 1)) dut (.*);

    dram_model mem (
      .clk, .rst_n, .cmd(dram_cmd), .bank(dram_bank), .row(dram_row), .col(dram_col),
      .wdata(dram_wdata), .rdata(dram_rdata), .violations, .n_pre, .n_act);

    initial begin
      longint cyc, lat_sum;
      int n, lat;
      logic [DW-1:0] exp_data;
      int k;
      req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
      cyc = 0; lat_sum = 0; n = 0; nconf[p] = 0; done[p] = 0;
      wait (rst_n);
      wait (wl.size() > 0);
      foreach (wl[i]) begin
        while (cyc < wl[i].t) begin @(negedge clk); cyc++; end
        k = (wl[i].bank << 20) | (wl[i].row << 8) | wl[i].col;
        req_valid = 1'b1;
        req_we    = wl[i].we;
        req_addr  = {RW'(wl[i].row), 2'(wl[i].bank), CW'(wl[i].col), 4'h0};
        req_wdata = {4{32'(i)}};
        if (wl[i].we) ref_mem[k] = req_wdata;
        exp_data  = ref_mem.exists(k) ? ref_mem[k]
                  : {(DW / 32){32'hA5000000 ^ 32'({2'(wl[i].bank), RW'(wl[i].row), CW'(wl[i].col)})}};
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        @(negedge clk); cyc++;
        req_valid = 1'b0;
        while (!resp_valid) begin @(negedge clk); cyc++; end
        lat = int'(resp_latency);
        if (!wl[i].we) check(resp_rdata == exp_data, $sformatf("policy %0d read data", p));
        case (resp_kind)
          ACC_HIT:      check(lat == TCA, "hit latency");
          ACC_CLOSED:   check(lat == TRA + TCA, "closed latency");
          ACC_CONFLICT: begin check(lat == TPR + TRA + TCA, "conflict latency"); nconf[p]++; end
          default:      check(lat > TRA + TCA && lat < TPR + TRA + TCA, "precharge-wait latency");
        endcase
        lat_sum += longint'(lat);
        n++;
        @(negedge clk); cyc++;
      end
      check(violations == 0, $sformatf("policy %0d DRAM timing violations %0d", p, violations));
      check(p != 0 || n_pre == nconf[p], "open row policy precharges only on conflicts");
      avg[p] = real'(lat_sum) / real'(n);
      cr_acc[p]  = (n_cr > 0) ? real'(n_cr_ok) / real'(n_cr) : 0.0;
      ncr_acc[p] = (n_ncr > 0) ? real'(n_ncr_ok) / real'(n_ncr) : 0.0;
      if (p != 0)
        $display("policy %0d: close predictions %0d, accuracy %0.2f; keep-open decisions %0d, accuracy %0.2f",
                 p, n_cr, cr_acc[p], n_ncr, ncr_acc[p]);
      done[p] = 1;
    end
  end

  // one program: bursts to rows of its two banks, then idle
  task automatic gen_program(input int b0, input int gap_lo, input int gap_hi,
                             input int n_bursts, input int dead_hi);
    longint t = 0;
    for (int e = 0; e < n_bursts; e++) begin
      int b, r, nacc;
      req_t q;
      b = b0 + $urandom_range(0, 1);
      r = $urandom_range(0, 4095);
      nacc = $urandom_range(1, 8);
      t += longint'($urandom_range(0, dead_hi));
      for (int k = 0; k < nacc; k++) begin
        if (k > 0) t += longint'($urandom_range(gap_lo, gap_hi));
        q.t = t; q.bank = b; q.row = r; q.col = $urandom_range(0, 63);
        q.we = ($urandom_range(0, 2) == 0);
        wl.push_back(q);
      end
    end
  endtask

  initial begin
    gen_program(0, 150, 170, 1500, 2000);
    gen_program(2, 1500, 1700, 300, 20000);
    wl.sort(x) with (x.t);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("average latency: open row %0.2f, common x2 %0.2f, separate x2 %0.2f, common x4 %0.2f (%0d requests)",
             avg[0], avg[1], avg[2], avg[3], wl.size());
    check(avg[1] < avg[0], "common-register predictor beats open row");
    check(avg[2] < avg[0], "per-bank-register predictor beats open row");
    check(avg[2] < avg[1], "per-bank registers beat the common register on two programs");
    check(avg[3] < avg[0], "boundary x4 predictor beats open row");
    for (int p = 1; p < NP; p++)
      check(cr_acc[p] > 0.5 && ncr_acc[p] > 0.5, $sformatf("policy %0d prediction accuracies above one half", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
