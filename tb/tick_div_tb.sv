// tick_div_tb: checks that tick_div pulses exactly once every DIV clocks,
// first in the DIV-th clock after reset, for the default ratio and for 5.
module tick_div_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick16, tick5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tick_div            u16 (.clk, .rst_n, .tick(tick16));
  tick_div #(.DIV(5)) u5  (.clk, .rst_n, .tick(tick5));

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
    int n16, n5;
    n16 = 0; n5 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // cycle k after reset release (k = 1, 2, ...): tick when k % DIV == 0
    for (int k = 1; k <= 400; k++) begin
      @(negedge clk);
      check(tick16 == ((k % 16) == 0), $sformatf("tick16 at cycle %0d", k));
      check(tick5  == ((k % 5)  == 0), $sformatf("tick5 at cycle %0d", k));
      n16 += int'(tick16);
      n5  += int'(tick5);
      @(posedge clk);
    end
    check(n16 == 25, "16-divider tick count over 400 cycles");
    check(n5 == 80, "5-divider tick count over 400 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
