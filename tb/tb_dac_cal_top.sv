// tb_dac_cal_top: closed-loop test of the DAC error calibration.
//
// The calibration core drives the behavioural MASH model: the model's ADC1
// word goes in as d, the scrambled selects b drive the model's DAC, and the
// model's ADC2 code comes back as v2. Conditions: 32 unit elements with 0.1 %
// rms random errors, a sine input at -0.92 dB of full scale and 1.56/100 of
// the clock rate, and 131072 calibration clocks. After them the stored
// estimates e-hat_i are compared with the model's true element errors: their
// rms difference must be under 25 % of the rms error. Over the last 8192
// clocks the DAC error left in z (true errors minus estimates, filtered like
// the real error) must be at least 20 dB below the error present in y. Also checked: b always holds as many ones as d, the estimates
// are refreshed, the corrected output z differs from y by exactly the
// correction computed from the stored estimates, and clear empties the sums.
module tb_dac_cal_top;
  import dac_cal_pkg::*;
  localparam int unsigned M    = 32;
  localparam int unsigned NCYC = 131072;

  logic clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0, clear = 1'b0;
  logic [M-1:0] d, b;
  logic signed [N2_W-1:0] v2;
  logic signed [Y_W-1:0]  y, z;
  logic signed [E_W-1:0]  e_hat [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dac_cal_top dut (.clk, .rst_n, .cal_en, .clear, .d, .v2, .b, .y, .z, .e_hat);
  mash_model #(.M(M), .N2(N2_W), .ERR_RMS(0.001), .AMP(14.4), .FREQ(0.0156), .SEED(11))
    model (.clk, .rst_n, .b, .d, .v2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(10 * (NCYC + 40000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pop_bad = 0;
  always @(negedge clk) if (rst_n && $countones(b) != $countones(d)) pop_bad++;

  // Independent model of the registered correction z(k+1) = y(k) - corr(k).
  real   corr_ref;
  longint z_exp;
  int    z_bad = 0, z_cnt = 0;
  logic  z_exp_v = 1'b0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (z_exp_v) begin
        z_cnt++;
        if (longint'(z) != z_exp) begin z_bad++; if (z_bad < 4) $display("z %0d exp %0d y %0d", z, z_exp, y); end
      end
      corr_ref = 0.0;
      for (int i = 0; i < M; i++)
        corr_ref += real'(dut.n_e[i]) * real'(e_hat[i]);
      z_exp   = longint'(y) - longint'($floor(corr_ref / real'(2 ** ($clog2(M) + EF)) + 0.5));
      z_exp_v = 1'b1;
    end
  end

  // DAC error power in y and left in z, last 8192 clocks.
  real p_y = 0.0, p_z = 0.0;
  int  c_now = 0;
  always @(negedge clk) begin
    if (rst_n && c_now >= NCYC - 8192) begin
      real ty, tz;
      ty = 0.0; tz = 0.0;
      for (int i = 0; i < M; i++) begin
        ty += real'(dut.n_e[i]) / real'(M) * model.err[i];
        tz += real'(dut.n_e[i]) / real'(M) *
              (model.err[i] - real'(e_hat[i]) / real'(2 ** (FY + EF)));
      end
      p_y += ty * ty;
      p_z += tz * tz;
    end
  end

  initial begin
    real se, sd, ev;
    int  writes;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cal_en = 1'b1;
    writes = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      c_now = c;
      if (dut.wr_en) writes++;
    end
    se = 0.0; sd = 0.0;
    for (int i = 0; i < M; i++) begin
      ev  = real'(e_hat[i]) / real'(2 ** (FY + EF));
      se += model.err[i] ** 2;
      sd += (ev - model.err[i]) ** 2;
    end
    $display("rms error %f, rms estimation error %f", $sqrt(se / M), $sqrt(sd / M));
    check(sd < 0.0625 * se, "estimates within 25 % rms of the true element errors");
    $display("DAC error power: in y %e, left in z %e (%f dB lower)", p_y, p_z, 10.0 * $log10(p_y / p_z));
    check(p_z * 100.0 < p_y, "DAC error in z at least 20 dB below that in y");
    check(writes > NCYC - 64, "an estimate is written every clock");
    check(pop_bad == 0, "scrambler keeps the DAC level");
    check(z_cnt > 1000 && z_bad == 0, "z equals y minus the stored-estimate correction");
    // clear empties the sums
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(dut.u_corr.den[0] == 0 && dut.u_corr.num[5] == 0, "clear empties the correlator sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
