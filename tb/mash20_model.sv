// mash20_model: behavioural 2-0 MASH ADC with a single-bit or tri-level first
// stage and a noise-leakage path, for simulation only.
//
// First stage: an ideal second-order loop of two delaying integrators,
//   w1(k+1) = w1(k) + u(k) - v1(k),   w2(k+1) = w2(k) + w1(k) - 2*v1(k),
// and a quantizer v1 = Q(w2 + t): with LEVELS = 3, levels -1, 0, +1 and
// thresholds at +-0.5; with LEVELS = 2, levels -1, +1 and the threshold at 0.
// So V1 = z^-2 U + (1 - z^-1)^2 E1. The test signal t = +-TSA
// units (from ts) is added at the quantizer input and is therefore part of the
// first-stage quantization error e1 = v1 - w2.
// Second stage: an ADC digitises e1 into v_c, in codes of 1/512 unit, with a
// step of VC_LSB codes and a largest code VC_MAX. The defaults, 2 and 1022,
// are a 10-bit ADC with a +-2 unit range; 1 and 2047 are a 12-bit ADC with a
// +-4 unit range.
// Output: v_m = 32*(512*v1(k) - (1 - z^-1)^2 v_c(k)) + leakage, in codes of
// 1/16384 unit. The leakage is the Taylor-series model of the analog errors,
//   H_leak(z) = A[0] + A[1](1 - z^-1) + ... + A[4](1 - z^-1)^4,
// applied to the true e1 and rounded to the output code. With A = 0 the output
// holds only z^-2 u and the shaped error of the second stage.
// Timing: v_c and v_m are combinational in ts and the current state; the state
// advances on each clock. The input u is a sine of amplitude amp units at
// FREQ cycles per sample; amp starts at AMP and a testbench may change it.
module mash20_model #(
  parameter int  LEVELS = 3,
  parameter int  VC_LSB = 2,
  parameter int  VC_MAX = 1022,
  parameter real A [5] = '{0.0, 0.0, 0.0, 0.0, 0.0},
  parameter real TSA   = 0.1,
  parameter real AMP   = 0.5,
  parameter real FREQ  = 0.01
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ts,
  output logic signed [19:0] v_m,
  output logic signed [11:0] v_c
);
  real    amp = AMP;
  real    w1, w2, u;
  real    e1h [5];            // e1(k-1) .. e1(k-4) in e1h[1..4]
  longint k;
  int     vc1, vc2;
  int     v1, vc;
  real    e1, lk;

  always_comb begin
    real q, d [5];
    u  = amp * $sin(2.0 * 3.14159265358979 * FREQ * real'(k));
    q  = w2 + (ts ? TSA : -TSA);
    if (LEVELS == 2) v1 = (q >= 0.0) ? 1 : -1;
    else             v1 = (q > 0.5) ? 1 : (q < -0.5) ? -1 : 0;
    e1 = real'(v1) - w2;
    vc = VC_LSB * int'($floor(e1 * 512.0 / real'(VC_LSB) + 0.5));
    if (vc > VC_MAX) vc = VC_MAX;
    if (vc < -VC_MAX - VC_LSB) vc = -VC_MAX - VC_LSB;
    v_c = 12'(vc);
    // d[i] = (1 - z^-1)^i e1
    d[0] = e1;
    d[1] = e1 - e1h[1];
    d[2] = e1 - 2.0 * e1h[1] + e1h[2];
    d[3] = e1 - 3.0 * e1h[1] + 3.0 * e1h[2] - e1h[3];
    d[4] = e1 - 4.0 * e1h[1] + 6.0 * e1h[2] - 4.0 * e1h[3] + e1h[4];
    lk = 0.0;
    for (int i = 0; i < 5; i++) lk += A[i] * d[i];
    v_m = 20'(32 * (512 * v1 - (vc - 2 * vc1 + vc2)) + int'($floor(lk * 16384.0 + 0.5)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1  <= 0.0;
      w2  <= 0.0;
      vc1 <= 0;
      vc2 <= 0;
      k   <= 0;
      for (int i = 0; i < 5; i++) e1h[i] <= 0.0;
    end else begin
      w1  <= w1 + u - real'(v1);
      w2  <= w2 + w1 - 2.0 * real'(v1);
      vc1 <= vc;
      vc2 <= vc1;
      k   <= k + 1;
      e1h[1] <= e1;
      for (int i = 2; i < 5; i++) e1h[i] <= e1h[i-1];
    end
  end
endmodule
