// mash_model: behavioural model of the analog part of a multibit 2-0 MASH ADC,
// for simulation only.
//
// First stage: second-order feed-forward loop with delaying integrators,
//   x1(k+1) = x1(k) + u(k) - a(k),   x2(k+1) = x2(k) + x1(k),
//   w(k) = u(k) + 2*x1(k) + x2(k),   v1(k) = clamp(round(w(k)), 0, M),
// so NTF = (1 - z^-1)^2, STF = 1 and the DAC error reaches v1 through
// -(2 z^-1 - z^-2). ADC1 outputs v1 as an M-bit thermometer word d. The DAC
// sums the selected unit elements: a(k) = sum_i b_i(k) * (1 + e_i) + OFFSET,
// with element errors e_i drawn once (approximately Gaussian, rms ERR_RMS,
// sum forced to zero). The second stage digitises 16*(w - v1) = -16*e1 with an
// N2-bit ADC of full scale +-8 units and delivers the code one clock later.
// Input: u(k) = M/2 + AMP*sin(2*pi*FREQ*k), in unit-element units.
module mash_model #(
  parameter int unsigned M       = 32,
  parameter int unsigned N2      = 12,
  parameter real         ERR_RMS = 0.001,
  parameter real         AMP     = 8.0,
  parameter real         FREQ    = 0.0156,
  parameter real         OFFSET  = 0.05,
  parameter int unsigned SEED    = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [M-1:0]         b,
  output logic [M-1:0]         d,
  output logic signed [N2-1:0] v2
);
  real x1, x2, w, u, err [M];
  int  v1;
  longint k;

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  initial begin
    real s, mean;
    void'($urandom(SEED));
    mean = 0.0;
    for (int i = 0; i < M; i++) begin
      s = 0.0;
      for (int j = 0; j < 12; j++) s += urand();
      err[i] = (s - 6.0) * ERR_RMS;
      mean  += err[i] / real'(M);
    end
    for (int i = 0; i < M; i++) err[i] -= mean;
  end

  always_comb begin
    u  = real'(M) / 2.0 + AMP * $sin(2.0 * 3.14159265358979 * FREQ * real'(k));
    w  = u + 2.0 * x1 + x2;
    v1 = int'($floor(w + 0.5));
    if (v1 < 0) v1 = 0;
    if (v1 > int'(M)) v1 = int'(M);
    for (int i = 0; i < M; i++) d[i] = (i < v1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 0.0;
      x2 <= 0.0;
      k  <= 0;
      v2 <= '0;
    end else begin
      real a, c;
      a = OFFSET;
      for (int i = 0; i < M; i++) if (b[i]) a += 1.0 + err[i];
      x1 <= x1 + u - a;
      x2 <= x2 + x1;
      k  <= k + 1;
      c = $floor(16.0 * (w - real'(v1)) * real'(2 ** (N2 - 4)) + 0.5);
      if (c >  real'(2 ** (N2 - 1) - 1)) c =  real'(2 ** (N2 - 1) - 1);
      if (c < -real'(2 ** (N2 - 1)))     c = -real'(2 ** (N2 - 1));
      v2 <= N2'(int'(c));
    end
  end
endmodule
