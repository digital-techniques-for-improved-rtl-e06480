// tb_dac_correct: random y, n-hat' and e-hat; z must equal
// y - round(sum n_i e_i / 2^(log2 M + EF)), computed here in real arithmetic,
// and must saturate instead of wrapping when the result leaves the range.
module tb_dac_correct;
  localparam int unsigned M = 32, Y_W = 24, NE_W = 10, E_W = 24, EF = 8;
  logic signed [Y_W-1:0]  y;
  logic signed [NE_W-1:0] n_e [M];
  logic signed [E_W-1:0]  e_hat [M];
  logic signed [Y_W-1:0]  z;
  int checks = 0, failures = 0;

  dac_correct #(.M(M), .Y_W(Y_W), .NE_W(NE_W), .E_W(E_W), .EF(EF), .Z_W(Y_W)) dut (.y, .n_e, .e_hat, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 600; c++) begin
      real s;
      longint ze;
      bit big;
      big = (c >= 500);
      y = big ? 24'sh7FFF00 : Y_W'(int'($urandom_range(4000000, 0)) - 2000000);
      s = 0.0;
      for (int i = 0; i < M; i++) begin
        n_e[i]   = NE_W'(int'($urandom_range(186, 0)) - 93);
        e_hat[i] = big ? -E_W'(int'($urandom_range(4000000, 3000000)))
                       : E_W'(int'($urandom_range(200000, 0)) - 100000);
        s += real'(n_e[i]) * real'(e_hat[i]);
      end
      ze = longint'(y) - longint'($floor(s / 8192.0 + 0.5));
      if (ze > 8388607)  ze = 8388607;
      if (ze < -8388608) ze = -8388608;
      #1;
      checks++;
      if (longint'(z) != ze) begin
        failures++;
        if (failures < 5) $display("FAIL: z=%0d exp %0d", z, ze);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
