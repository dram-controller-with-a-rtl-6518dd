// interval_regs_tb: random interval writes into a common and a per-bank
// instance, compared every clock with reference registers and valid flags.
module interval_regs_tb;
  localparam int NB = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [1:0] wr_bank;
  logic [17:0] wr_value;
  logic [NB-1:0][17:0] iv_c, iv_s;
  logic [NB-1:0] v_c, v_s;
  int checks = 0, failures = 0;
  int ref_c, ref_s[NB];
  bit refv_c, refv_s[NB];

  always #5 clk = ~clk;

  interval_regs                        uc (.clk, .rst_n, .wr_en, .wr_bank, .wr_value,
                                           .interval(iv_c), .valid(v_c));
  interval_regs #(.SEPARATE(1'b1))     us (.clk, .rst_n, .wr_en, .wr_bank, .wr_value,
                                           .interval(iv_s), .valid(v_s));

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
    wr_en = 1'b0; wr_bank = '0; wr_value = '0;
    ref_c = 0; refv_c = 0;
    for (int b = 0; b < NB; b++) begin ref_s[b] = 0; refv_s[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(v_c == '0 && v_s == '0, "no interval valid after reset");
    for (int i = 0; i < 2000; i++) begin
      wr_en    = ($urandom_range(0, 2) == 0);
      // bank 3 is kept out of the first 200 writes so a partly valid
      // per-bank set is seen
      wr_bank  = 2'($urandom_range(0, (i < 200) ? 2 : 3));
      wr_value = 18'($urandom);
      @(posedge clk);
      if (wr_en) begin
        ref_c = int'(wr_value); refv_c = 1;
        ref_s[wr_bank] = int'(wr_value); refv_s[wr_bank] = 1;
      end
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        check(v_c[b] == refv_c, $sformatf("common valid bank %0d", b));
        if (refv_c) check(int'(iv_c[b]) == ref_c, $sformatf("common value bank %0d", b));
        check(v_s[b] == refv_s[b], $sformatf("separate valid bank %0d", b));
        if (refv_s[b]) check(int'(iv_s[b]) == ref_s[b], $sformatf("separate value bank %0d", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
