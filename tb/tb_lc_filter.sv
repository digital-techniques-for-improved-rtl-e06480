// tb_lc_filter: random v_c and random sign updates. The testbench keeps its
// own coefficients and delay line; v_l must equal sum l_i v_c(k-i) and every
// coefficient must match after each update. A second instance with 6-bit
// coefficients and GAMMA = 3 is pushed against both limits to check that the
// counters saturate.
module tb_lc_filter;
  import aqnc_pkg::*;
  localparam int unsigned NT = 6, VC_W = 12, L_W = 16;
  logic clk = 1'b0, rst_n = 1'b0, upd = 1'b0;
  logic signed [VC_W-1:0] v_c;
  sgn_t sgn [NT];
  logic signed [VC_W+L_W+2:0] v_l;
  logic signed [L_W-1:0] l [NT];
  logic signed [VC_W+6+2:0] v_l_s;
  logic signed [5:0] l_s [NT];
  int lr [NT], dl [NT], ls_ref [NT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  lc_filter #(.NT(NT), .VC_W(VC_W), .L_W(L_W)) dut (
    .clk, .rst_n, .en(1'b1), .v_c, .upd, .sgn, .v_l, .l);
  lc_filter #(.NT(NT), .VC_W(VC_W), .L_W(6), .GAMMA(3)) dut_s (
    .clk, .rst_n, .en(1'b1), .v_c, .upd, .sgn, .v_l(v_l_s), .l(l_s));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int step(input sgn_t s, input int g);
    return (s == SGN_POS) ? g : (s == SGN_NEG) ? -g : 0;
  endfunction

  initial begin
    for (int i = 0; i < NT; i++) begin lr[i] = 0; dl[i] = 0; ls_ref[i] = 0; sgn[i] = SGN_ZERO; end
    v_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1500; c++) begin
      longint e;
      int r;
      v_c = VC_W'($urandom);
      upd = ($urandom_range(3, 0) == 0);
      for (int i = 0; i < NT; i++) begin
        // the first 500 clocks lean upwards, the next 500 downwards
        r = int'($urandom_range(9, 0));
        if (c < 500)       sgn[i] = (r < 7) ? SGN_POS : (r < 8) ? SGN_NEG : SGN_ZERO;
        else if (c < 1000) sgn[i] = (r < 7) ? SGN_NEG : (r < 8) ? SGN_POS : SGN_ZERO;
        else               sgn[i] = (r < 4) ? SGN_NEG : (r < 8) ? SGN_POS : SGN_ZERO;
      end
      dl[0] = int'(v_c);
      #1;
      e = 0;
      for (int i = 0; i < NT; i++) e += longint'(lr[i]) * longint'(dl[i]);
      checks++;
      if (longint'(v_l) != e) begin failures++; if (failures < 5) $display("FAIL: v_l=%0d exp %0d", v_l, e); end
      @(negedge clk);
      for (int i = NT - 1; i > 0; i--) dl[i] = dl[i-1];
      if (upd) for (int i = 0; i < NT; i++) begin
        lr[i] += step(sgn[i], 1);
        ls_ref[i] += step(sgn[i], 3);
        if (ls_ref[i] > 31) ls_ref[i] = 31;
        if (ls_ref[i] < -32) ls_ref[i] = -32;
      end
      for (int i = 0; i < NT; i++) begin
        checks += 2;
        if (int'(l[i]) != lr[i]) begin failures++; if (failures < 5) $display("FAIL: l%0d=%0d exp %0d", i, l[i], lr[i]); end
        if (int'(l_s[i]) != ls_ref[i]) begin failures++; if (failures < 5) $display("FAIL: sat l%0d=%0d exp %0d", i, l_s[i], ls_ref[i]); end
      end
      if (c == 499) begin
        checks++;
        if (l_s[0] != 31) begin failures++; $display("FAIL: upper limit not reached"); end
      end
      if (c == 999) begin
        checks++;
        if (l_s[0] != -32) begin failures++; $display("FAIL: lower limit not reached"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
