// scrambler: random reordering of the DAC element select bits (SCR).
//
// Every clock each output position i draws a fresh KEY_W-bit random key. The
// rank of position i is the number of positions whose key is smaller (equal
// keys are ordered by position), so the ranks form a random permutation of
// 0..M-1, and output i takes input bit rank_i: b[i] = d[rank_i]. For a
// thermometer word with v ones this selects the v elements with the smallest
// keys, a uniformly random choice apart from the rare ties. The number of ones,
// and so the DAC level, is preserved.
//
// All elements must have equal statistical status: the estimator of the
// element errors relies on every pair of element sequences being equally
// correlated. A butterfly of random swaps would not give that (with a
// thermometer input the elements i and i+M/2 would always be complementary),
// hence the ranking. The keys come from a 127-bit maximal-length LFSR
// (x^127 + x^126 + 1) stepped M*KEY_W times per clock.
//
// That the scrambler randomly reorders the M bits follows the document; the
// ranking scheme and the LFSR are this design's choice.
//
// Timing: b is combinational in d and the LFSR state, so the DAC sees b in the
// same cycle as d. The LFSR advances on every clock with en=1. An assertion
// checks on every clock that b has as many ones as d.
module scrambler #(
  parameter int unsigned M     = 32,
  parameter int unsigned KEY_W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] d,          // thermometer code from ADC1
  output logic [M-1:0] b           // scrambled element selects to the DAC
);
  localparam int unsigned AW = $clog2(M);

  logic [126:0]     lfsr_q, lfsr_d;
  logic [KEY_W-1:0] key  [M];
  logic [AW-1:0]    rank [M];

  // Step the LFSR M*KEY_W times; each step yields one key bit.
  always_comb begin
    lfsr_d = lfsr_q;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < KEY_W; j++) begin
        key[i][j] = lfsr_d[126];
        lfsr_d    = {lfsr_d[125:0], lfsr_d[126] ^ lfsr_d[125]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr_q <= 127'h4F1B_BCDC_BFA5_3E0A_9E37_79B9_7F4A_7C15;
    else if (en) lfsr_q <= lfsr_d;
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      rank[i] = '0;
      for (int j = 0; j < M; j++)
        if (key[j] < key[i] || (key[j] == key[i] && j < i)) rank[i] += 1'b1;
      b[i] = d[rank[i]];
    end
  end

  // The DAC level must never change.
  a_level_kept: assert property (@(posedge clk) $countones(b) == $countones(d));
endmodule
