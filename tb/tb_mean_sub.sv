// tb_mean_sub: n_i must equal M*b_i minus the number of ones in b, for random
// and corner-case words.
module tb_mean_sub;
  localparam int unsigned M = 32;
  logic [M-1:0] b;
  logic signed [$clog2(M)+1:0] n [M];
  int checks = 0, failures = 0;

  mean_sub #(.M(M)) dut (.b, .n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 500; c++) begin
      int ones;
      b = (c == 0) ? '0 : (c == 1) ? '1 : {$urandom, $urandom} >> (c % 7);
      #1;
      ones = $countones(b);
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(n[i]) != (b[i] ? int'(M) : 0) - ones) begin
          failures++;
          if (failures < 5) $display("FAIL: b=%h n[%0d]=%0d", b, i, n[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
