// tb_mash_ncl: random stage outputs; y must equal v1(k-1) * 2^FY plus
// (v2(k) - 2 v2(k-1) + v2(k-2)) * 2^(FY-N2), from the testbench's history.
module tb_mash_ncl;
  localparam int unsigned M = 32, N2 = 12, FY = 16, Y_W = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] v1;
  logic signed [N2-1:0] v2;
  logic signed [Y_W-1:0] y;
  int v1_1, v2_1, v2_2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mash_ncl #(.M(M), .N2(N2), .FY(FY), .Y_W(Y_W)) dut (.clk, .rst_n, .en(1'b1), .v1, .v2, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v1 = '0; v2 = '0; v1_1 = 0; v2_1 = 0; v2_2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      int e;
      v1 = 6'($urandom_range(M, 0));
      v2 = N2'($urandom);
      e  = v1_1 * (1 << FY) + (int'(v2) - 2 * v2_1 + v2_2) * (1 << (FY - N2));
      #1;
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 5) $display("FAIL: y=%0d exp %0d", y, e);
      end
      @(negedge clk);
      v1_1 = int'(v1); v2_2 = v2_1; v2_1 = int'(v2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
