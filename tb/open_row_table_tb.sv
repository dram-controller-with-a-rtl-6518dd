// open_row_table_tb: random ACT and PRE updates and random lookups, compared
// with a reference table of open rows.
module open_row_table_tb;
  localparam int NB = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic act_en, pre_en;
  logic [1:0] act_bank, pre_bank, lk_bank;
  logic [11:0] act_row, lk_row;
  logic lk_open, lk_hit;
  logic [NB-1:0] open_mask;
  int checks = 0, failures = 0;
  bit ref_open[NB];
  int ref_row[NB];
  int n_hit = 0, n_miss = 0;

  always #5 clk = ~clk;

  open_row_table dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act_en = 0; pre_en = 0; act_bank = 0; pre_bank = 0; act_row = 0; lk_bank = 0; lk_row = 0;
    for (int b = 0; b < NB; b++) begin ref_open[b] = 0; ref_row[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      act_en   = ($urandom_range(0, 3) == 0);
      act_bank = 2'($urandom);
      act_row  = 12'($urandom_range(0, 3));
      pre_en   = ($urandom_range(0, 4) == 0);
      pre_bank = 2'($urandom);
      if (pre_en && act_en && pre_bank == act_bank) pre_en = 0;
      lk_bank  = 2'($urandom);
      lk_row   = 12'($urandom_range(0, 3));
      #1;
      check(lk_open == ref_open[lk_bank], "lk_open");
      check(lk_hit == (ref_open[lk_bank] && ref_row[lk_bank] == int'(lk_row)), "lk_hit");
      for (int b = 0; b < NB; b++) check(open_mask[b] == ref_open[b], "open_mask");
      if (lk_hit) n_hit++; else n_miss++;
      @(posedge clk);
      if (pre_en) ref_open[pre_bank] = 0;
      if (act_en) begin ref_open[act_bank] = 1; ref_row[act_bank] = int'(act_row); end
    end
    check(n_hit > 100 && n_miss > 100, "both hits and misses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
