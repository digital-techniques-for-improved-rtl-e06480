// tb_aqnc_sndr: in-band SNDR of a 2-0 MASH ADC with and without adaptive
// noise-leakage compensation.
//
// Two designs are run at once, each as a pair of behavioural converters
// (mash20_model) on the same input and the same test signal. One of each
// pair is ideal. The other has the leakage path
//   H_leak(z) = A0 + A1(1 - z^-1) + ... + A4(1 - z^-1)^4,
// with A0 = 1e-6 and A1..A4 between 3e-3 and 1e-2, the orders of magnitude
// given for 54 dB op-amp gain and 0.8 % capacitor error. The adaptive core is
// connected to each mismatched converter. Tri-level design: OSR 8, 10-bit
// second stage. Prototype: single-bit first stage, 12-bit second stage,
// OSR 4. Test signal +-0.1 of the DAC level in both.
// Each core adapts for NCAL clocks while the input is a small sine (0.02 of
// the DAC level). The input then steps to 0.5 of the DAC level at exactly 67/8192
// of the clock, and 8192 samples of the ideal output, the uncorrected output
// v_m and the corrected output v_r are recorded; adaptation continues. An
// 8192-point DFT gives the SNDR over bins 1..512 (OSR 8) or 1..1024 (OSR 4),
// DC excluded.
// Own choices for this run: K = 4096 samples per block and 12 fractional bits
// of the coefficients, so that the sign-sign steps settle within the run; the
// small calibration input, because the sign of a block correlation is much
// noisier with a large sine in v_r and the coefficients then wander by tens
// of steps. The leakage is rounded into a finer output code (1/16384 unit,
// 20 bits) so that rounding adds no in-band noise.
// Required, tri-level: the leakage costs at least 15 dB of SNDR; the
// correction gains at least 12 dB and ends within 10 dB of the ideal
// converter. Required, prototype: the correction gains at least 15 dB.
// The coefficients keep jittering by a few steps around their targets, and
// the in-band result depends on where in that jitter the recording falls
// (75 to 82 dB for the tri-level design over runs of 24 to 40 million
// clocks), hence the margins.
module tb_aqnc_sndr;
  import aqnc_pkg::*;
  localparam int unsigned NCAL = 40_000_000, KBLK = 4096, NFFT = 8192, SBIN = 67;
  localparam real FREQ = real'(SBIN) / real'(NFFT);
  localparam int unsigned VM_W = 20, L_FRAC = 12;
  localparam real LEAK [5] = '{1.0e-6, 1.0e-2, 1.0e-2, -8.0e-3, 5.0e-3};
  localparam real AMP_CAL = 0.02, AMP_MEAS = 0.5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ts, upd;
  logic signed [19:0] v_m, v_m_i;
  logic signed [11:0] v_c, v_c_i;
  logic signed [VM_W+L_FRAC+3:0] v_r;
  logic signed [15:0] l [NTAP];
  int checks = 0, failures = 0;
  real rec_i [NFFT], rec_m [NFFT], rec_r [NFFT];
  // prototype (single-bit first stage)
  logic ts_p, upd_p;
  logic signed [19:0] v_m_p, v_m_pi;
  logic signed [11:0] v_c_p, v_c_pi;
  logic signed [VM_W+L_FRAC+3:0] v_r_p;
  logic signed [15:0] l_p [NTAP];
  real rec_pi [NFFT], rec_pm [NFFT], rec_pr [NFFT];
  real cs [NFFT], sn [NFFT];

  always #5 clk = ~clk;

  aqnc_top #(.VM_W(VM_W), .L_FRAC(L_FRAC), .K(KBLK)) dut (.clk, .rst_n, .en(1'b1), .v_m, .v_c, .ts, .v_r, .l, .upd);
  mash20_model #(.A(LEAK), .AMP(AMP_CAL), .FREQ(FREQ))
    mod_r (.clk, .rst_n, .ts, .v_m, .v_c);
  mash20_model #(.AMP(AMP_CAL), .FREQ(FREQ))
    mod_i (.clk, .rst_n, .ts, .v_m(v_m_i), .v_c(v_c_i));

  aqnc_top #(.VM_W(VM_W), .L_FRAC(L_FRAC), .K(KBLK)) dut_p (.clk, .rst_n, .en(1'b1), .v_m(v_m_p), .v_c(v_c_p),
    .ts(ts_p), .v_r(v_r_p), .l(l_p), .upd(upd_p));
  mash20_model #(.LEVELS(2), .VC_LSB(1), .VC_MAX(2047), .A(LEAK), .AMP(AMP_CAL), .FREQ(FREQ))
    mod_pr (.clk, .rst_n, .ts(ts_p), .v_m(v_m_p), .v_c(v_c_p));
  mash20_model #(.LEVELS(2), .VC_LSB(1), .VC_MAX(2047), .AMP(AMP_CAL), .FREQ(FREQ))
    mod_pi (.clk, .rst_n, .ts(ts_p), .v_m(v_m_pi), .v_c(v_c_pi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10 * (NCAL + NFFT + 20000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sndr(ref real x [NFFT], input int nband);
    real ps, pn, re, im, p;
    ps = 0.0; pn = 0.0;
    for (int k = 1; k <= nband; k++) begin
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

  task automatic record;
    for (int n = 0; n < int'(NFFT); n++) begin
      @(negedge clk);
      rec_i[n] = real'(v_m_i);
      rec_m[n] = real'(v_m);
      rec_r[n] = real'(v_r) / real'(2 ** L_FRAC);
      rec_pi[n] = real'(v_m_pi);
      rec_pm[n] = real'(v_m_p);
      rec_pr[n] = real'(v_r_p) / real'(2 ** L_FRAC);
    end
  endtask

  initial begin
    real s_i, s_m, s_r, p_i, p_m, p_r;
    for (int n = 0; n < int'(NFFT); n++) begin
      cs[n] = $cos(2.0 * 3.14159265358979 * real'(n) / real'(NFFT));
      sn[n] = $sin(2.0 * 3.14159265358979 * real'(n) / real'(NFFT));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 4; b++) begin
      repeat (NCAL / 4) @(negedge clk);
      $display("after %0d clocks: l = %0d %0d %0d %0d %0d %0d (tri-level), %0d %0d %0d %0d %0d %0d (single-bit)",
               (b + 1) * (NCAL / 4), l[0], l[1], l[2], l[3], l[4], l[5],
               l_p[0], l_p[1], l_p[2], l_p[3], l_p[4], l_p[5]);
    end
    // measure at the full input level; adaptation continues
    mod_r.amp = AMP_MEAS;
    mod_i.amp = AMP_MEAS;
    mod_pr.amp = AMP_MEAS;
    mod_pi.amp = AMP_MEAS;
    repeat (4096) @(negedge clk);
    record();
    s_i = sndr(rec_i, 512);
    s_m = sndr(rec_m, 512);
    s_r = sndr(rec_r, 512);
    p_i = sndr(rec_pi, 1024);
    p_m = sndr(rec_pm, 1024);
    p_r = sndr(rec_pr, 1024);
    $display("tri-level, OSR 8, SNDR at %0.2f of the DAC level: ideal %0.1f dB, uncorrected %0.1f dB, corrected %0.1f dB",
             AMP_MEAS, s_i, s_m, s_r);
    $display("single-bit, OSR 4, SNDR at %0.2f of the DAC level: ideal %0.1f dB, uncorrected %0.1f dB, corrected %0.1f dB",
             AMP_MEAS, p_i, p_m, p_r);
    check(s_m < s_i - 15.0, "tri-level: leakage lowers the SNDR by at least 15 dB");
    check(s_r > s_m + 12.0, "tri-level: correction gains at least 12 dB");
    check(s_r > s_i - 10.0, "tri-level: corrected SNDR within 10 dB of ideal");
    check(p_r > p_m + 15.0, "single-bit: correction gains at least 15 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
