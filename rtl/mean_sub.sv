// mean_sub: removes the mean of the element select bits (b - b_bar).
//
// Computes n_i(k) = b_i(k) - (1/M) * sum_j b_j(k) for every element. To stay in
// integers the result is scaled by M: n_i = M*b_i - sum_j b_j, a signed value in
// [-(M-1), M-1]. The subtraction of the mean follows the document (eq. 9); the
// scaling by M is this design's choice and is undone where the estimate is used.
//
// Timing: purely combinational.
module mean_sub #(
  parameter int unsigned M   = 32,
  parameter int unsigned N_W = $clog2(M) + 2   // output width, signed
) (
  input  logic [M-1:0]            b,
  output logic signed [N_W-1:0]   n [M]
);
  logic [N_W-1:0] cnt;
  always_comb begin
    cnt = '0;
    for (int unsigned i = 0; i < M; i++) cnt += N_W'(b[i]);
    for (int unsigned i = 0; i < M; i++)
      n[i] = (b[i] ? N_W'(M) : '0) - cnt;
  end
endmodule
