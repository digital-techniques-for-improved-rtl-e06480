// hpf: high-pass filter (1 - z^-1)^ORDER.
//
// The same filter is applied to the ADC output y and to every n-hat'_i so that
// the two inputs of the correlator see identical filtering. It removes the DAC
// offset (a constant) and attenuates the low-frequency input signal, while the
// scrambled element sequences keep most of their broadband power. The document
// asks only for a high-pass filter; the cascade of ORDER first differences,
// with ORDER = 2 by default, is this design's choice (a multiplier-free filter
// with a zero of order ORDER at DC).
//
// Timing: out(k) is combinational in in(k); ORDER registers hold past values
// and advance when en=1. Output width grows by ORDER bits, so nothing overflows.
module hpf #(
  parameter int unsigned IN_W  = 24,
  parameter int unsigned ORDER = 2,
  parameter int unsigned OUT_W = IN_W + ORDER
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] s   [ORDER+1];  // s[p] = (1-z^-1)^p x
  logic signed [OUT_W-1:0] s_q [ORDER];    // s[p] delayed by one sample

  always_comb begin
    s[0] = OUT_W'(x);
    for (int p = 0; p < ORDER; p++) s[p+1] = s[p] - s_q[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < ORDER; p++) s_q[p] <= '0;
    end else if (en) begin
      for (int p = 0; p < ORDER; p++) s_q[p] <= s[p];
    end
  end

  assign y = s[ORDER];
endmodule
