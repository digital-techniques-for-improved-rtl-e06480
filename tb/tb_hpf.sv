// tb_hpf: random input; output must equal x(k) - 2x(k-1) + x(k-2) for the
// default second order and x(k) - x(k-1) for first order. A constant input
// must give zero output once the filter has filled.
module tb_hpf;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] x;
  logic signed [17:0] y2;
  logic signed [16:0] y1;
  longint h0, h1, h2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  hpf #(.IN_W(16)) dut2 (.clk, .rst_n, .en(1'b1), .x, .y(y2));
  hpf #(.IN_W(16), .ORDER(1)) dut1 (.clk, .rst_n, .en(1'b1), .x, .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; h1 = 0; h2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      x = (c >= 300) ? 16'sd12345 : 16'($urandom);
      h0 = longint'(x);
      #1;
      checks += 2;
      if (longint'(y2) != h0 - 2 * h1 + h2) begin failures++; $display("FAIL: order 2 got %0d", y2); end
      if (longint'(y1) != h0 - h1)          begin failures++; $display("FAIL: order 1 got %0d", y1); end
      if (c >= 303) begin
        checks++;
        if (y2 != 0 || y1 != 0) begin failures++; $display("FAIL: DC not removed"); end
      end
      @(negedge clk);
      h2 = h1; h1 = h0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
