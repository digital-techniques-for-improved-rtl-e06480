// tb_ts_gen: the test signal must repeat with period 2^23-1, not earlier, hold
// 2^22 ones per period (a maximal-length sequence) and stop while en=0.
module tb_ts_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ts;
  logic [22:0] start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ts_gen dut (.clk, .rst_n, .en, .ts);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, period;
    logic [22:0] win;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    // collect the first 23 bits as a window, then look for its recurrence
    win = '0;
    for (int c = 0; c < 23; c++) begin
      win = {win[21:0], ts};
      @(negedge clk);
    end
    start = win;
    ones = 0; period = 0;
    for (int c = 1; c <= 8500000; c++) begin
      ones += int'(ts);
      win = {win[21:0], ts};
      @(negedge clk);
      if (win == start) begin period = c; break; end
    end
    checks++;
    if (period != 8388607 || ones != 4194304) begin
      failures++;
      $display("FAIL: period %0d ones %0d", period, ones);
    end
    en = 1'b0;
    begin
      logic t0;
      int moved;
      t0 = ts; moved = 0;
      repeat (20) begin @(negedge clk); if (ts != t0) moved++; end
      checks++;
      if (moved != 0) begin failures++; $display("FAIL: ts moved while en=0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
