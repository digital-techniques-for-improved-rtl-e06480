// tb_ssblms_corr: random v_r and ts with K = 16. The testbench sums
// v_r(k) * (-ts(k-i)) itself; upd must pulse exactly once every K samples,
// one clock after the K-th, with sgn equal to the sign of each block sum.
// A block of all-zero v_r must give zero signs. A v_r built from the delayed
// test signal must give the matching tap a positive sign.
module tb_ssblms_corr;
  import aqnc_pkg::*;
  localparam int unsigned NT = 6, VR_W = 20, K = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ts = 1'b0, upd;
  logic signed [VR_W-1:0] v_r;
  sgn_t sgn [NT];
  int tsh [NT];
  longint acc [NT];
  int checks = 0, failures = 0, n_upd = 0;

  always #5 clk = ~clk;
  ssblms_corr #(.NT(NT), .VR_W(VR_W), .K(K)) dut (.clk, .rst_n, .en, .v_r, .ts, .upd, .sgn);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sgn_t sref(input longint a);
    return (a == 0) ? SGN_ZERO : (a < 0) ? SGN_NEG : SGN_POS;
  endfunction

  initial begin
    for (int i = 0; i < NT; i++) begin tsh[i] = -1; acc[i] = 0; end
    v_r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int c = 0; c < 60 * K; c++) begin
      int blk, pos;
      blk = c / int'(K);
      pos = c % int'(K);
      ts = 1'($urandom);
      tsh[0] = ts ? 1 : -1;
      if (blk == 20)       v_r = '0;
      else if (blk >= 40)  v_r = VR_W'(-50 * tsh[3] + int'($urandom_range(40, 0)) - 20);
      else                 v_r = VR_W'(int'($urandom_range(2000, 0)) - 1000);
      for (int i = 0; i < NT; i++) acc[i] += -longint'(tsh[i]) * longint'(v_r);
      @(negedge clk);
      for (int i = NT - 1; i > 0; i--) tsh[i] = tsh[i-1];
      checks++;
      if (upd != (pos == int'(K) - 1)) begin failures++; $display("FAIL: upd at sample %0d", c); end
      if (pos == int'(K) - 1) begin
        n_upd++;
        for (int i = 0; i < NT; i++) begin
          checks++;
          if (sgn[i] != sref(acc[i])) begin
            failures++;
            if (failures < 6) $display("FAIL: block %0d tap %0d sgn %0d sum %0d", blk, i, sgn[i], acc[i]);
          end
          acc[i] = 0;
        end
        if (blk >= 41) begin
          checks++;
          if (sgn[3] != SGN_POS) begin failures++; $display("FAIL: correlated tap not found"); end
        end
      end
    end
    checks++;
    if (n_upd != 60) begin failures++; $display("FAIL: %0d updates", n_upd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
