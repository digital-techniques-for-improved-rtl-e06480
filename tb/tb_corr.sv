// tb_corr: checks the correlator and its divider.
// Phase 1: random n''_i and y' = sum c_i n''_i + noise for 3000 samples. The
// testbench keeps its own sums; after the divider has drained, every estimate
// written must equal trunc((M-1) * num_i * 2^EF / den_i) exactly, and the sign
// of each estimate must match c_i.
// Phase 2: after clear, one sample with a tiny n''_0 and a huge y' must give a
// saturated estimate, and elements that never saw a non-zero n'' must read 0.
module tb_corr;
  localparam int unsigned M = 4, YH_W = 26, NH_W = 12, EF = 8, E_W = 24;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clear = 1'b0;
  logic signed [YH_W-1:0] y_h;
  logic signed [NH_W-1:0] n_h [M];
  logic wr_en;
  logic [1:0] wr_addr;
  logic signed [E_W-1:0] wr_data;
  longint num [M], den [M];
  int c_i [M] = '{700, -1500, 40, 0};
  int checks = 0, failures = 0;
  logic signed [E_W-1:0] last_q [M];

  always #5 clk = ~clk;
  corr #(.M(M), .YH_W(YH_W), .NH_W(NH_W), .EF(EF), .E_W(E_W)) dut (
    .clk, .rst_n, .en, .clear, .y_h, .n_h, .wr_en, .wr_addr, .wr_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint expq(input int i);
    longint q, lim;
    lim = (longint'(1) <<< (E_W - 1)) - 1;
    if (den[i] == 0) return 0;
    q = (longint'(M - 1) * num[i] * (longint'(1) <<< EF)) / den[i];
    if (q > lim) q = lim;
    if (q < -lim) q = -lim;
    return q;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wr_en) last_q[wr_addr] <= wr_data;

  initial begin
    int bad;
    for (int i = 0; i < M; i++) begin num[i] = 0; den[i] = 0; n_h[i] = '0; end
    y_h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      longint yv;
      yv = longint'($urandom_range(20000, 0)) - 10000;
      for (int i = 0; i < M; i++) begin
        n_h[i] = NH_W'(int'($urandom_range(600, 0)) - 300);
        yv += longint'(c_i[i]) * longint'(n_h[i]);
      end
      y_h = YH_W'(yv);
      @(posedge clk);
      for (int i = 0; i < M; i++) begin
        num[i] += longint'(y_h) * longint'(n_h[i]);
        den[i] += longint'(n_h[i]) * longint'(n_h[i]);
      end
      @(negedge clk);
    end
    en = 1'b0;
    repeat (E_W + 2 * M + 4) @(negedge clk);
    bad = 0;
    for (int c = 0; c < 2 * M; c++) begin
      @(posedge clk);
      checks++;
      if (!wr_en || longint'(wr_data) != expq(int'(wr_addr))) begin
        bad++; failures++;
        $display("FAIL: element %0d got %0d exp %0d", wr_addr, wr_data, expq(int'(wr_addr)));
      end
    end
    @(negedge clk);
    check(last_q[0] > 0 && last_q[1] < 0 && last_q[2] > 0, "estimate signs follow the correlation");
    // Phase 2: saturation and empty sums
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    en = 1'b1;
    for (int i = 0; i < M; i++) n_h[i] = '0;
    n_h[0] = 12'sd1;
    y_h = 26'sd16000000;
    @(negedge clk);
    en = 1'b0;
    repeat (E_W + 2 * M + 4) @(negedge clk);
    for (int c = 0; c < M; c++) begin
      @(negedge clk);
      checks++;
      if (last_q[0] != 24'sh7FFFFF || last_q[1] != 0 || last_q[2] != 0) begin
        failures++;
        $display("FAIL: saturation / empty sums: %0d %0d %0d", last_q[0], last_q[1], last_q[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
