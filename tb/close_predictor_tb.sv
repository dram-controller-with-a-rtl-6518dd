// close_predictor_tb: drives random per-bank access reports (row hits and
// row openings), open flags and the enable into two predictors, one with a
// common interval register and boundary 2 x interval, one with per-bank
// registers and boundary 4 x interval, and compares close_req every clock
// with a reference model of the divider, idle counters, interval registers
// and comparison. Small widths (8-bit counters, divide by 3) make the
// counters saturate within the run.
module close_predictor_tb;
  localparam int NB = 4, CW = 8, DV = 3;
  localparam int MAXC = (1 << CW) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pred_en, acc_valid, acc_hit;
  logic [1:0] acc_bank;
  logic [NB-1:0] bank_open, close_c, close_s, ivv_c, ivv_s;
  int checks = 0, failures = 0;

  int tdiv;
  int cnt[NB];
  int iv_c, iv_s[NB];
  bit v_c, v_s[NB];
  int n_close_c = 0, n_close_s = 0, n_sat = 0;

  always #5 clk = ~clk;

  close_predictor #(.CNT_W(CW), .DIV(DV), .SHIFT(1), .SEPARATE(1'b0)) uc (
    .clk, .rst_n, .pred_en, .acc_valid, .acc_bank, .acc_hit, .bank_open,
    .close_req(close_c), .interval_valid(ivv_c));
  close_predictor #(.CNT_W(CW), .DIV(DV), .SHIFT(2), .SEPARATE(1'b1)) us (
    .clk, .rst_n, .pred_en, .acc_valid, .acc_bank, .acc_hit, .bank_open,
    .close_req(close_s), .interval_valid(ivv_s));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pred_en = 1'b0; acc_valid = 1'b0; acc_hit = 1'b0; acc_bank = '0; bank_open = '0;
    tdiv = 0; v_c = 0; iv_c = 0;
    for (int b = 0; b < NB; b++) begin cnt[b] = 0; iv_s[b] = 0; v_s[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 5000 == 0) pred_en = (i != 5000);  // disabled for one stretch
      if ($urandom_range(0, 40) == 0) bank_open[$urandom_range(0, NB - 1)] ^= 1'b1;
      acc_valid = ($urandom_range(0, (i < 10000) ? 30 : 300) == 0);
      acc_bank  = 2'($urandom);
      acc_hit   = ($urandom_range(0, 3) != 0);
      #1;
      for (int b = 0; b < NB; b++) begin
        bit exp_c, exp_s;
        exp_c = pred_en && bank_open[b] && v_c && (cnt[b] >= 2 * iv_c);
        exp_s = pred_en && bank_open[b] && v_s[b] && (cnt[b] >= 4 * iv_s[b]);
        check(close_c[b] == exp_c, $sformatf("common close bank %0d cycle %0d", b, i));
        check(close_s[b] == exp_s, $sformatf("separate close bank %0d cycle %0d", b, i));
        check(ivv_c[b] == v_c && ivv_s[b] == v_s[b], "interval_valid");
        n_close_c += int'(exp_c);
        n_close_s += int'(exp_s);
        if (cnt[b] == MAXC) n_sat++;
      end
      @(posedge clk);
      if (acc_valid && acc_hit) begin
        iv_c = cnt[acc_bank]; v_c = 1;
        iv_s[acc_bank] = cnt[acc_bank]; v_s[acc_bank] = 1;
      end
      for (int b = 0; b < NB; b++) begin
        if (acc_valid && acc_bank == 2'(b)) cnt[b] = 0;
        else if (tdiv == DV - 1 && cnt[b] < MAXC) cnt[b]++;
      end
      tdiv = (tdiv == DV - 1) ? 0 : tdiv + 1;
    end
    check(n_close_c > 100 && n_close_s > 100, "close requests were raised");
    check(n_sat > 0, "counter saturation was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
