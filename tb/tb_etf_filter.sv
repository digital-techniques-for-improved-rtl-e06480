// tb_etf_filter: drives random element sequences and compares every output
// with sum_j C[j] * n(k-j) computed from the testbench's own input history,
// for the default taps and for a second, asymmetric tap set.
module tb_etf_filter;
  localparam int unsigned M = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [6:0] n_in [M];
  logic signed [9:0] o1 [M];
  logic signed [9:0] o2 [M];
  int hist [8][M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  etf_filter #(.M(M), .IN_W(7), .NT(4), .OUT_W(10)) dut1 (.clk, .rst_n, .en(1'b1), .n_in, .n_out(o1));
  etf_filter #(.M(M), .IN_W(7), .NT(4), .C('{1, 3, -1, 2}), .OUT_W(10)) dut2 (.clk, .rst_n, .en(1'b1), .n_in, .n_out(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) for (int i = 0; i < M; i++) hist[j][i] = 0;
    for (int i = 0; i < M; i++) n_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      for (int i = 0; i < M; i++) begin
        n_in[i] = 7'($signed(7'($urandom_range(62, 0))) - 7'sd31);
        hist[0][i] = int'(n_in[i]);
      end
      #1;
      for (int i = 0; i < M; i++) begin
        int e1, e2;
        e1 = -2 * hist[2][i] + hist[3][i];
        e2 = hist[0][i] + 3 * hist[1][i] - hist[2][i] + 2 * hist[3][i];
        checks += 2;
        if (int'(o1[i]) != e1) begin failures++; $display("FAIL: default taps, got %0d exp %0d", o1[i], e1); end
        if (int'(o2[i]) != e2) begin failures++; $display("FAIL: taps {1,3,-1,2}, got %0d exp %0d", o2[i], e2); end
      end
      @(negedge clk);
      for (int j = 7; j > 0; j--) for (int i = 0; i < M; i++) hist[j][i] = hist[j-1][i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
