// ts_gen: binary pseudo-random test signal ts.
//
// The test signal is injected into the first stage of the MASH ADC and must be
// uncorrelated with the input signal and with the quantization errors; the
// correlator then measures how much of it leaks to the output. This design
// makes it with a 23-bit maximal-length LFSR (x^23 + x^18 + 1, period
// 8388607): ts = 1 stands for +1 and ts = 0 for -1. The period must be long
// compared with the adaptation time; with a short period the input signal's
// correlation with ts stops averaging out and biases the coefficients. The
// document states what the test signal must do but not how it is generated;
// the LFSR is this design's choice.
//
// Timing: ts changes on each clock with en=1; it is a register output.
module ts_gen #(
  parameter logic [22:0] SEED = 23'h5A1ACE   // any non-zero value
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic ts
);
  logic [22:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= SEED;
    else if (en) lfsr <= {lfsr[21:0], lfsr[22] ^ lfsr[17]};
  end

  assign ts = lfsr[22];
endmodule
