// dac_cal_top: background estimation and correction of the unit-element errors
// of the multibit feedback DAC in a MASH delta-sigma ADC.
//
// Data flow (one sample per clock):
//   d (thermometer, from ADC1) -> scrambler -> b (to the DAC)
//   b -> mean_sub -> n_i = M*b_i - sum(b) -> etf_filter -> n-hat'_i
//   v1 = ones(d), v2 (from ADC2) -> mash_ncl -> y
//   y -> hpf -> y'        n-hat'_i -> hpf -> n''_i
//   (y', n''_i) -> corr -> e-hat_i -> err_ram
//   z = y - sum n-hat'_i * e-hat_i / M  (dac_correct, registered)
// Every element's DAC error e_i reaches y as e_i times its deviation sequence
// filtered by the converter's DAC error transfer function. Because the
// scrambler makes the sequences random and broadband, correlating the
// high-passed output with each filtered sequence isolates that element's
// error, which is then removed sample by sample.
//
// Interface: d and v2 are the two ADC codes of the current sample; b goes to
// the DAC in the same cycle. cal_en lets the correlator accumulate; clear
// restarts estimation. z is the corrected output (FY fractional bits,
// unit-element units), valid one clock after the sample's y. e_hat exposes the
// stored estimates (FY+EF fractional bits).
//
// The structure follows the document's block diagram; the fixed-point formats,
// the warm-up period and the round-robin estimate refresh are this design's
// choices. The correlator ignores the first WARMUP samples after reset, while
// the filters fill.
module dac_cal_top
  import dac_cal_pkg::*;
#(
  parameter int unsigned M        = M_ELEM,
  parameter int unsigned N2       = N2_W,
  parameter int unsigned HPF_ORD  = 2,
  parameter int unsigned ETF_NT   = 4,
  parameter int          ETF_C [ETF_NT] = '{0, 0, -2, 1},
  parameter int unsigned WARMUP   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cal_en,
  input  logic                   clear,
  input  logic [M-1:0]           d,
  input  logic signed [N2-1:0]   v2,
  output logic [M-1:0]           b,
  output logic signed [Y_W-1:0]  y,
  output logic signed [Y_W-1:0]  z,
  output logic signed [E_W-1:0]  e_hat [M]
);
  localparam int unsigned N_W   = $clog2(M) + 2;
  localparam int unsigned NE_W  = N_W + 3;
  localparam int unsigned NH_W  = NE_W + HPF_ORD;
  localparam int unsigned YH_W  = Y_W + HPF_ORD;

  logic signed [N_W-1:0]  n    [M];
  logic signed [NE_W-1:0] n_e  [M];
  logic signed [NH_W-1:0] n_h  [M];
  logic signed [YH_W-1:0] y_h;
  logic signed [Y_W-1:0]  z_d;
  logic [$clog2(M+1)-1:0] v1;
  localparam int unsigned WARM_W = $clog2(WARMUP+1);
  logic [WARM_W-1:0]      warm;
  logic                   wr_en;
  logic [$clog2(M)-1:0]   wr_addr;
  logic signed [E_W-1:0]  wr_data;

  scrambler #(.M(M)) u_scr (.clk(clk), .rst_n(rst_n), .en(1'b1), .d(d), .b(b));

  mean_sub #(.M(M), .N_W(N_W)) u_mean (.b(b), .n(n));

  etf_filter #(.M(M), .IN_W(N_W), .NT(ETF_NT), .C(ETF_C), .OUT_W(NE_W)) u_etf (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .n_in(n), .n_out(n_e));

  always_comb begin
    v1 = '0;
    for (int i = 0; i < M; i++) v1 += ($clog2(M+1))'(d[i]);
  end

  mash_ncl #(.M(M), .N2(N2), .FY(FY), .Y_W(Y_W)) u_ncl (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .v1(v1), .v2(v2), .y(y));

  hpf #(.IN_W(Y_W), .ORDER(HPF_ORD), .OUT_W(YH_W)) u_hpf_y (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .x(y), .y(y_h));

  for (genvar i = 0; i < M; i++) begin : g_hpf_n
    hpf #(.IN_W(NE_W), .ORDER(HPF_ORD), .OUT_W(NH_W)) u_hpf_n (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .x(n_e[i]), .y(n_h[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               warm <= '0;
    else if (warm != WARM_W'(WARMUP))  warm <= warm + 1'b1;
  end

  corr #(.M(M), .YH_W(YH_W), .NH_W(NH_W), .EF(EF), .E_W(E_W)) u_corr (
    .clk(clk), .rst_n(rst_n), .en(cal_en && warm == WARM_W'(WARMUP)), .clear(clear),
    .y_h(y_h), .n_h(n_h), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  err_ram #(.M(M), .E_W(E_W)) u_ram (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_data(e_hat));

  dac_correct #(.M(M), .Y_W(Y_W), .NE_W(NE_W), .E_W(E_W), .EF(EF), .Z_W(Y_W)) u_cor (
    .y(y), .n_e(n_e), .e_hat(e_hat), .z(z_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z <= '0;
    else        z <= z_d;
  end
endmodule
