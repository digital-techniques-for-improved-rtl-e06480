// leak_model: behavioural model of the digital signals of a 2-0 MASH ADC
// whose first-stage quantization error leaks to the output, for simulation
// only.
//
// The correction input carries the first-stage quantization error plus the
// injected test signal, v_c(k) = TSA*(+-1) + e1(k), with e1 uniform in
// +-E1_AMP codes. The uncorrected output holds a sine, white noise and the
// leakage sum_i H[i] * v_c(k-i), so the ideal compensation coefficients are
// l_i = -H[i]. All signals are second-stage ADC codes.
module leak_model #(
  parameter real H [6]  = '{-0.05, 0.035, 0.012, -0.004, 0.002, 0.0},
  parameter int  TSA    = 256,
  parameter int  E1_AMP = 300,
  parameter real AMP    = 2000.0,
  parameter real FREQ   = 0.013,
  parameter int  N_AMP  = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ts,
  output logic signed [15:0] v_m,
  output logic signed [11:0] v_c
);
  int  hist [6];
  longint k;

  always_comb begin
    real s;
    hist[0] = (ts ? TSA : -TSA) + e1_q;
    s = AMP * $sin(2.0 * 3.14159265358979 * FREQ * real'(k));
    for (int i = 0; i < 6; i++) s += H[i] * real'(hist[i]);
    v_c = 12'(hist[0]);
    v_m = 16'(int'($floor(s + 0.5)) + nz_q);
  end

  int e1_q, nz_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 6; i++) hist[i] <= 0;
      k    <= 0;
      e1_q <= 0;
      nz_q <= 0;
    end else begin
      for (int i = 1; i < 6; i++) hist[i] <= hist[i-1];
      k    <= k + 1;
      e1_q <= int'($urandom_range(2 * E1_AMP, 0)) - E1_AMP;
      nz_q <= int'($urandom_range(2 * N_AMP, 0)) - N_AMP;
    end
  end
endmodule
