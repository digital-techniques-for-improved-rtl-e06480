// tb_dsm_dual_top: end-to-end test of both correction engines at their
// default sizes, each closed around its behavioural converter model.
//
// DAC calibration: 32-element DAC with 0.1 % rms errors, sine input at
// -0.92 dB of full scale and 1.56/100 of the clock. The estimation is cleared
// once after start-up and then runs for 131072 clocks; the estimates must then
// be within 25 % rms of the true errors and the DAC error left in z at least
// 20 dB below that in y.
// Leakage compensation: six-tap leakage, 16384 coefficient updates of 256
// samples; coefficients within 0.002 of their ideal values.
// Each mechanism is counted and must occur: scrambling (b differs from d),
// estimate writes, correction applied (z differs from the delayed y), clear,
// test-signal toggling, coefficient updates, upward and downward steps.
module tb_dsm_dual_top;
  import dac_cal_pkg::*;
  import aqnc_pkg::*;
  localparam int unsigned NCAL = 131072, NCYC = 16384 * 256 + 64;
  localparam real H [6] = '{-0.05, 0.035, 0.012, -0.004, 0.002, 0.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic dc_cal_en = 1'b0, dc_clear = 1'b0, lc_en = 1'b0;
  logic [M_ELEM-1:0] dc_d, dc_b;
  logic signed [N2_W-1:0] dc_v2;
  logic signed [Y_W-1:0] dc_y, dc_z, y_q;
  logic signed [E_W-1:0] dc_e_hat [M_ELEM];
  logic signed [15:0] lc_v_m;
  logic signed [11:0] lc_v_c;
  logic lc_ts, lc_upd;
  logic signed [33:0] lc_v_r;
  logic signed [15:0] lc_l [NTAP], l_prev [NTAP];
  int checks = 0, failures = 0;
  int n_scr = 0, n_wr = 0, n_cor = 0, n_clr = 0, n_ts = 0, n_upd = 0, n_up = 0, n_dn = 0;

  always #5 clk = ~clk;

  dsm_dual_top dut (.*);
  mash_model #(.M(M_ELEM), .N2(N2_W), .ERR_RMS(0.001), .AMP(14.4), .FREQ(0.0156), .SEED(5))
    mash (.clk, .rst_n, .b(dc_b), .d(dc_d), .v2(dc_v2));
  leak_model #(.H(H), .AMP(1000.0)) leak (.clk, .rst_n, .ts(lc_ts), .v_m(lc_v_m), .v_c(lc_v_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (NCYC + 100000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic ts_q = 1'b0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (dc_b != dc_d) n_scr++;
      if (dut.u_dac_cal.wr_en) n_wr++;
      if (dc_z != y_q) n_cor++;
      if (dc_clear) n_clr++;
      if (lc_ts != ts_q) n_ts++;
      if (lc_upd) n_upd++;
      for (int i = 0; i < NTAP; i++) begin
        if (lc_l[i] > l_prev[i]) n_up++;
        if (lc_l[i] < l_prev[i]) n_dn++;
        l_prev[i] = lc_l[i];
      end
      ts_q = lc_ts;
      y_q  = dc_y;
    end
  end

  // DAC error power in y and left in z over the last 8192 calibration clocks
  real p_y = 0.0, p_z = 0.0;
  bit  meas = 1'b0;
  always @(negedge clk) begin
    if (meas) begin
      real ty, tz;
      ty = 0.0; tz = 0.0;
      for (int i = 0; i < M_ELEM; i++) begin
        ty += real'(dut.u_dac_cal.n_e[i]) / real'(M_ELEM) * mash.err[i];
        tz += real'(dut.u_dac_cal.n_e[i]) / real'(M_ELEM) *
              (mash.err[i] - real'(dc_e_hat[i]) / real'(2 ** (FY + EF)));
      end
      p_y += ty * ty;
      p_z += tz * tz;
    end
  end

  initial begin
    real se, sd, pm, pr;
    for (int i = 0; i < NTAP; i++) l_prev[i] = '0;
    y_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dc_cal_en = 1'b1;
    lc_en = 1'b1;
    repeat (50) @(negedge clk);
    dc_clear = 1'b1;
    @(negedge clk);
    dc_clear = 1'b0;
    repeat (NCAL - 8192) @(negedge clk);
    meas = 1'b1;
    repeat (8192) @(negedge clk);
    meas = 1'b0;
    se = 0.0; sd = 0.0;
    for (int i = 0; i < M_ELEM; i++) begin
      se += mash.err[i] ** 2;
      sd += (real'(dc_e_hat[i]) / real'(2 ** (FY + EF)) - mash.err[i]) ** 2;
    end
    $display("DAC: rms error %f, rms estimation error %f after %0d clocks", $sqrt(se / M_ELEM), $sqrt(sd / M_ELEM), NCAL);
    $display("DAC error power left in z: %f dB below y", 10.0 * $log10(p_y / p_z));
    check(sd < 0.0625 * se, "DAC estimates within 25 % rms");
    check(p_z * 100.0 < p_y, "DAC error in z 20 dB below y");
    repeat (NCYC - NCAL - 60) @(negedge clk);
    pm = 0.0; pr = 0.0;
    for (int i = 0; i < NTAP; i++) begin
      real lv;
      lv = real'(lc_l[i]) / 16384.0;
      check(lv + H[i] < 0.002 && lv + H[i] > -0.002, $sformatf("l%0d = %f, ideal %f", i, lv, -H[i]));
      pm += H[i] * H[i];
      pr += (lv + H[i]) ** 2;
    end
    $display("leakage suppressed by %f dB", 10.0 * $log10(pm / pr));
    check(pr * 100.0 < pm, "leakage suppressed by 20 dB");
    $display("mechanisms: scrambled %0d, estimate writes %0d, corrected %0d, clear %0d, ts toggles %0d, updates %0d, up %0d, down %0d",
             n_scr, n_wr, n_cor, n_clr, n_ts, n_upd, n_up, n_dn);
    check(n_scr > 0, "scrambling");
    check(n_wr > 0, "estimate writes");
    check(n_cor > 0, "correction applied");
    check(n_clr > 0, "clear");
    check(n_ts > 0, "test signal toggles");
    check(n_upd == 16384, "coefficient updates");
    check(n_up > 0, "upward coefficient steps");
    check(n_dn > 0, "downward coefficient steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
