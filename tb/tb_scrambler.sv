// tb_scrambler: checks the element scrambler.
// * every clock b has as many ones as d (the DAC level is kept);
// * with a single one in d, that one lands on every output position, each
//   between 60 % and 140 % of the fair share;
// * with a half-full thermometer word, elements i and i+M/2 are on together
//   about as often as elements i and i+1 (equal status of all pairs);
// * the reordering changes from clock to clock.
module tb_scrambler;
  localparam int unsigned M = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] d, b, b_prev;
  int checks = 0, failures = 0;
  int hits [M];
  int pop_bad = 0, both_far = 0, both_near = 0, changes = 0;

  always #5 clk = ~clk;
  scrambler #(.M(M)) dut (.clk, .rst_n, .en(1'b1), .d, .b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < M; i++) hits[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random thermometer words
    for (int c = 0; c < 2000; c++) begin
      int v;
      v = int'($urandom_range(M, 0));
      d = (v == 0) ? '0 : M'((64'd1 << v) - 1);
      #1;
      if ($countones(b) != v) pop_bad++;
      @(negedge clk);
    end
    check(pop_bad == 0, "number of ones preserved");
    // single one
    d = M'(1);
    for (int c = 0; c < 3200; c++) begin
      #1;
      for (int i = 0; i < M; i++) if (b[i]) hits[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < M; i++)
      check(hits[i] > 60 && hits[i] < 140, $sformatf("position %0d hit %0d times of ~100", i, hits[i]));
    // half-full thermometer: pair statistics and variation
    d = M'((64'd1 << (M / 2)) - 1);
    b_prev = '0;
    for (int c = 0; c < 4000; c++) begin
      #1;
      if (b[0] && b[M/2]) both_far++;
      if (b[0] && b[1])   both_near++;
      if (b != b_prev)    changes++;
      b_prev = b;
      @(negedge clk);
    end
    // expected 4000 * 16*15/(32*31) = 968 for each
    check(both_far > 800 && both_far < 1140, $sformatf("pair (0,%0d) on together %0d times", M/2, both_far));
    check(both_near > 800 && both_near < 1140, $sformatf("pair (0,1) on together %0d times", both_near));
    check(changes > 3900, "selection changes every clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
