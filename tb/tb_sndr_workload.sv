// tb_sndr_workload: in-band SNDR of the calibrated multibit MASH ADC.
//
// Three converters run side by side on the same input. Two are calibration
// cores closed around the behavioural MASH model, one with an ideal DAC and
// one with 0.1 % rms random element errors. The third uses the same
// mismatched DAC without the scrambler: the thermometer word drives the
// elements directly, and only the noise-cancellation logic forms y. Input: sine at -0.92 dB of full scale at exactly 128/8192 of
// the clock (1.5625 MHz at 100 MHz), so an 8192-point DFT needs no window.
// After 131072 calibration clocks, 8192 samples are recorded: z of the ideal
// converter, y of the unscrambled one (no element matching at all), and y
// (scrambling only) and z (corrected) of the calibrated one. The SNDR counts bins 1..1024, the band for an
// oversampling ratio of 4, with the signal in bin 128 and DC excluded.
// Required: the mismatched DAC costs at least 10 dB of SNDR without element
// matching; scrambling alone stays within 10 dB of that;
// after correction the SNDR is at least 100 dB and at least 25 dB above the
// uncorrected value. (The model's ideal-DAC floor lies near 120 dB, lower
// noise than the original set-up, so the corrected result is compared with
// absolute numbers rather than with the ideal converter.)
module tb_sndr_workload;
  import dac_cal_pkg::*;
  localparam int unsigned M = 32, NCAL = 131072, NFFT = 8192, NBAND = 1024, SBIN = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] d_i, b_i, d_r, b_r;
  logic signed [N2_W-1:0] v2_i, v2_r;
  logic signed [Y_W-1:0] y_i, z_i, y_r, z_r;
  logic signed [E_W-1:0] e_i [M], e_r [M];
  logic [M-1:0] d_t;
  logic signed [N2_W-1:0] v2_t;
  logic signed [Y_W-1:0] y_t;
  int checks = 0, failures = 0;
  real rec_y [NFFT], rec_z [NFFT], rec_ideal [NFFT], rec_t [NFFT];
  real cs [NFFT], sn [NFFT];

  always #5 clk = ~clk;

  dac_cal_top dut_i (.clk, .rst_n, .cal_en(1'b1), .clear(1'b0), .d(d_i), .v2(v2_i), .b(b_i), .y(y_i), .z(z_i), .e_hat(e_i));
  mash_model #(.M(M), .N2(N2_W), .ERR_RMS(0.0), .AMP(14.4), .FREQ(0.015625), .SEED(3))
    mod_i (.clk, .rst_n, .b(b_i), .d(d_i), .v2(v2_i));
  dac_cal_top dut_r (.clk, .rst_n, .cal_en(1'b1), .clear(1'b0), .d(d_r), .v2(v2_r), .b(b_r), .y(y_r), .z(z_r), .e_hat(e_r));
  mash_model #(.M(M), .N2(N2_W), .ERR_RMS(0.001), .AMP(14.4), .FREQ(0.015625), .SEED(3))
    mod_r (.clk, .rst_n, .b(b_r), .d(d_r), .v2(v2_r));
  mash_model #(.M(M), .N2(N2_W), .ERR_RMS(0.001), .AMP(14.4), .FREQ(0.015625), .SEED(3))
    mod_t (.clk, .rst_n, .b(d_t), .d(d_t), .v2(v2_t));
  mash_ncl #(.M(M), .N2(N2_W), .FY(FY), .Y_W(Y_W))
    ncl_t (.clk, .rst_n, .en(1'b1), .v1(($clog2(M+1))'($countones(d_t))), .v2(v2_t), .y(y_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (NCAL + NFFT + 10000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sndr(ref real x [NFFT]);
    real ps, pn, re, im, p;
    ps = 0.0; pn = 0.0;
    for (int k = 1; k <= int'(NBAND); k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < int'(NFFT); n++) begin
        int idx;
        idx = (k * n) % int'(NFFT);
        re += x[n] * cs[idx];
        im += x[n] * sn[idx];
      end
      p = re * re + im * im;
      if (k == int'(SBIN)) ps = p; else pn += p;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real s_ideal, s_y, s_z, s_t;
    for (int n = 0; n < int'(NFFT); n++) begin
      cs[n] = $cos(2.0 * 3.14159265358979 * real'(n) / real'(NFFT));
      sn[n] = $sin(2.0 * 3.14159265358979 * real'(n) / real'(NFFT));
    end
    #1;
    mod_t.err = mod_r.err;   // same element errors in both mismatched DACs
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (NCAL) @(negedge clk);
    for (int n = 0; n < int'(NFFT); n++) begin
      // z is registered, so it trails y by one clock; both are recorded as
      // full sequences, which only shifts the phase
      rec_ideal[n] = real'(z_i) / 65536.0;
      rec_y[n]     = real'(y_r) / 65536.0;
      rec_z[n]     = real'(z_r) / 65536.0;
      rec_t[n]     = real'(y_t) / 65536.0;
      @(negedge clk);
    end
    s_ideal = sndr(rec_ideal);
    s_y     = sndr(rec_y);
    s_z     = sndr(rec_z);
    s_t     = sndr(rec_t);
    $display("SNDR: ideal DAC %0.1f dB; real DAC: no element matching %0.1f dB, scrambling only %0.1f dB, corrected %0.1f dB",
             s_ideal, s_t, s_y, s_z);
    check(s_t < s_ideal - 10.0, "mismatch lowers the SNDR by at least 10 dB");
    check(s_y < s_t + 10.0 && s_y > s_t - 10.0, "scrambling alone changes the SNDR by less than 10 dB");
    check(s_z > 100.0, "corrected SNDR at least 100 dB");
    check(s_z > s_y + 25.0, "correction gains at least 25 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
