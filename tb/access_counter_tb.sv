// access_counter_tb: drives random tick and clear into a narrow (4-bit) and a
// default-width counter and compares them every clock with a saturating
// reference count.
module access_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick, clear;
  logic [3:0]  cnt4;
  logic [17:0] cnt18;
  int checks = 0, failures = 0;
  int ref4, ref18, sat_seen;

  always #5 clk = ~clk;

  access_counter #(.CNT_W(4)) u4  (.clk, .rst_n, .tick, .clear, .count(cnt4));
  access_counter              u18 (.clk, .rst_n, .tick, .clear, .count(cnt18));

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
    tick = 1'b0; clear = 1'b0; ref4 = 0; ref18 = 0; sat_seen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(cnt4 == 0 && cnt18 == 0, "zero after reset");
    for (int i = 0; i < 3000; i++) begin
      tick  = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 60) == 0);
      @(posedge clk);
      if (clear) begin ref4 = 0; ref18 = 0; end
      else if (tick) begin
        if (ref4 < 15) ref4++;
        ref18++;
      end
      @(negedge clk);
      check(int'(cnt4) == ref4, $sformatf("cnt4 %0d expected %0d", cnt4, ref4));
      check(int'(cnt18) == ref18, $sformatf("cnt18 %0d expected %0d", cnt18, ref18));
      if (ref4 == 15) sat_seen++;
    end
    check(sat_seen > 0, "saturation was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
