// tb_err_ram: resets to zero, then random writes; after each write every
// entry must match the testbench's copy.
module tb_err_ram;
  localparam int unsigned M = 32, E_W = 24;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_addr = '0;
  logic signed [E_W-1:0] wr_data = '0;
  logic signed [E_W-1:0] rd_data [M];
  int ref_m [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  err_ram #(.M(M), .E_W(E_W)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < M; i++) begin
      checks++;
      if (int'(rd_data[i]) != ref_m[i]) begin
        failures++;
        if (failures < 5) $display("FAIL: entry %0d = %0d exp %0d", i, rd_data[i], ref_m[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++) ref_m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int c = 0; c < 200; c++) begin
      wr_en   = ($urandom_range(3, 0) != 0);
      wr_addr = 5'($urandom);
      wr_data = E_W'($urandom);
      @(negedge clk);
      if (wr_en) ref_m[wr_addr] = int'(wr_data);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
