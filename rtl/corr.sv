// corr: correlator that estimates the DAC unit-element errors (CORR).
//
// For every element i it keeps two running sums over all samples since the
// last clear:
//   num_i = sum y'(k) * n''_i(k)      den_i = sum n''_i(k)^2
// and turns them into the estimate of eq. (14),
//   e-hat_i = ((M-1)/M) * sum(y' n''_real) / sum(n''_real^2),
// where n''_real = n''/M. With the scaled sequences this is
//   e-hat_i = (M-1) * num_i / den_i,
// computed with EF extra fractional bits by a pipelined divider. One element
// enters the divider per clock, chosen round-robin, so every clock one entry of
// the error RAM is rewritten and each entry is refreshed every M clocks.
//
// The sums and the normalised ratio follow the document; the accumulator
// widths, the shared divider and the round-robin refresh are this design's
// choices. The accumulators saturate rather than wrap.
//
// Interface: en qualifies a sample; clear restarts the estimation. The write
// port (wr_en, wr_addr, wr_data) goes to the error RAM. Latency from a sample to
// its effect on a written estimate: 1 clock into the sums plus E_W+1 clocks
// through the divider.
module corr #(
  parameter int unsigned M      = 32,
  parameter int unsigned YH_W   = 26,   // width of y'
  parameter int unsigned NH_W   = 12,   // width of n''_i
  parameter int unsigned ACC_W  = 56,   // width of num_i
  parameter int unsigned DEN_W  = 44,   // width of den_i
  parameter int unsigned EF     = 8,    // extra fractional bits of e-hat
  parameter int unsigned E_W    = 24    // width of e-hat
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clear,
  input  logic signed [YH_W-1:0]   y_h,
  input  logic signed [NH_W-1:0]   n_h [M],
  output logic                     wr_en,
  output logic [$clog2(M)-1:0]     wr_addr,
  output logic signed [E_W-1:0]    wr_data
);
  localparam int unsigned AW    = $clog2(M);
  localparam int unsigned DIV_W = ACC_W + AW + EF + 1;
  localparam int unsigned P_W   = YH_W + NH_W;

  logic signed [ACC_W-1:0] num [M];
  logic        [DEN_W-1:0] den [M];
  logic [AW-1:0]           rr;

  function automatic logic signed [ACC_W-1:0] sat_add(input logic signed [ACC_W-1:0] a,
                                                      input logic signed [P_W-1:0] p);
    logic signed [ACC_W:0] s;
    s = (ACC_W+1)'(a) + (ACC_W+1)'(p);
    if (s[ACC_W] != s[ACC_W-1]) return s[ACC_W] ? {1'b1, {(ACC_W-1){1'b0}}} : {1'b0, {(ACC_W-1){1'b1}}};
    return s[ACC_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] num_nx [M];
  logic        [DEN_W-1:0] den_nx [M];
  logic        [DEN_W:0]   den_sum [M];

  always_comb begin
    for (int i = 0; i < M; i++) begin
      num_nx[i]  = sat_add(num[i], P_W'(y_h) * P_W'(n_h[i]));
      den_sum[i] = (DEN_W+1)'(den[i]) + (DEN_W+1)'($unsigned(P_W'(n_h[i]) * P_W'(n_h[i])));
      den_nx[i]  = den_sum[i][DEN_W] ? '1 : den_sum[i][DEN_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        num[i] <= '0;
        den[i] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < M; i++) begin
        num[i] <= '0;
        den[i] <= '0;
      end
    end else if (en) begin
      for (int i = 0; i < M; i++) begin
        num[i] <= num_nx[i];
        den[i] <= den_nx[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else        rr <= (rr == AW'(M-1)) ? '0 : rr + 1'b1;
  end

  // (M-1) * num_i * 2^EF for the element selected this clock.
  logic signed [DIV_W-1:0] dividend;
  assign dividend = (DIV_W'(num[rr]) * DIV_W'(M-1)) <<< EF;

  pipe_div #(
    .NUM_W (DIV_W),
    .DEN_W (DEN_W),
    .QW    (E_W),
    .TAG_W (AW)
  ) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (!clear),
    .num       (dividend),
    .den       (den[rr]),
    .in_tag    (rr),
    .out_valid (wr_en),
    .q         (wr_data),
    .out_tag   (wr_addr)
  );
endmodule
