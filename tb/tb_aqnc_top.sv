// tb_aqnc_top: closed-loop test of the adaptive noise-leakage compensation.
//
// The compensator's test signal drives the leakage model; the model's v_m and
// v_c come back. The model leaks the first-stage error through six taps
// H = {-0.05, 0.035, 0.012, -0.004, 0.002, 0}. After 16384 updates every
// coefficient must sit within 0.002 of -H[i]; the leakage left in v_r,
// sum (l_i + H[i])^2, must be at least 20 dB below sum H[i]^2; updates must occur once per
// K = 256 samples and coefficients must have moved both up and down.
module tb_aqnc_top;
  import aqnc_pkg::*;
  localparam int unsigned NCYC = 16384 * 256, K = 256;
  localparam real H [6] = '{-0.05, 0.035, 0.012, -0.004, 0.002, 0.0};
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] v_m;
  logic signed [11:0] v_c;
  logic ts, upd;
  logic signed [33:0] v_r;
  logic signed [15:0] l [NTAP], l_prev [NTAP];
  int checks = 0, failures = 0, n_upd = 0, n_up = 0, n_dn = 0;

  always #5 clk = ~clk;
  aqnc_top dut (.clk, .rst_n, .en, .v_m, .v_c, .ts, .v_r, .l, .upd);
  leak_model #(.H(H), .AMP(1000.0)) model (.clk, .rst_n, .ts, .v_m, .v_c);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (NCYC + 10000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_upd;
    real pm, pr;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    last_upd = 0;
    for (int i = 0; i < NTAP; i++) l_prev[i] = '0;
    for (int c = 1; c <= int'(NCYC); c++) begin
      @(negedge clk);
      if (upd) begin
        n_upd++;
        if (n_upd > 1 && c - last_upd != int'(K)) begin
          failures++; checks++;
          $display("FAIL: update spacing %0d", c - last_upd);
        end
        last_upd = c;
      end
      for (int i = 0; i < NTAP; i++) begin
        if (l[i] > l_prev[i]) n_up++;
        if (l[i] < l_prev[i]) n_dn++;
        l_prev[i] = l[i];
      end
    end
    pm = 0.0; pr = 0.0;
    for (int i = 0; i < NTAP; i++) begin
      real lv;
      lv = real'(l[i]) / 16384.0;
      $display("l%0d = %f (ideal %f)", i, lv, -H[i]);
      check(lv + H[i] < 0.002 && lv + H[i] > -0.002, $sformatf("coefficient l%0d converged", i));
      pm += H[i] * H[i];
      pr += (lv + H[i]) * (lv + H[i]);
    end
    $display("leakage suppressed by %f dB", 10.0 * $log10(pm / pr));
    check(pr * 100.0 < pm, "leakage suppressed by 20 dB");
    check(n_upd == int'(NCYC / K), $sformatf("%0d updates", n_upd));
    check(n_up > 0 && n_dn > 0, "coefficients moved up and down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
