// boundary_cmp_tb: exhaustive check of the dead-time comparison for a 6-bit
// counter with boundary = 2 x interval and = 4 x interval, and random checks
// at the default width.
module boundary_cmp_tb;
  logic [5:0]  count, interval;
  logic        iv_valid;
  logic        close2, close4;
  logic [17:0] count_d, interval_d;
  logic        close_d;
  int checks = 0, failures = 0;

  boundary_cmp #(.CNT_W(6), .SHIFT(1)) u2 (.count, .interval, .interval_valid(iv_valid), .close(close2));
  boundary_cmp #(.CNT_W(6), .SHIFT(2)) u4 (.count, .interval, .interval_valid(iv_valid), .close(close4));
  boundary_cmp                         ud (.count(count_d), .interval(interval_d),
                                           .interval_valid(iv_valid), .close(close_d));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 64; c++)
        for (int i = 0; i < 64; i++) begin
          iv_valid = 1'(v); count = 6'(c); interval = 6'(i);
          #1;
          check(close2 == (v == 1 && c >= 2 * i), $sformatf("x2 c=%0d i=%0d v=%0d", c, i, v));
          check(close4 == (v == 1 && c >= 4 * i), $sformatf("x4 c=%0d i=%0d v=%0d", c, i, v));
        end
    iv_valid = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      count_d = 18'($urandom); interval_d = 18'($urandom_range(0, 200000));
      if (k % 4 == 0) count_d = 18'(2 * int'(interval_d) + $urandom_range(0, 2) - 1);
      #1;
      check(close_d == (longint'(count_d) >= 2 * longint'(interval_d)),
            $sformatf("default c=%0d i=%0d", count_d, interval_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
