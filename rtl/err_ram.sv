// err_ram: storage for the M unit-element error estimates (RAM).
//
// One synchronous write port fed by the correlator and M parallel read ports,
// because the correction multiplies every estimate with its filtered element
// sequence in every clock. All entries reset to zero, so an uncalibrated
// converter passes y through unchanged. The document names this RAM and says
// that the estimates are updated every clock period and read out for the
// correction; organising it as a register file with all entries visible is
// this design's choice.
//
// Timing: a write in clock k is visible on rd_data from clock k+1.
module err_ram #(
  parameter int unsigned M   = 32,
  parameter int unsigned E_W = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(M)-1:0]  wr_addr,
  input  logic signed [E_W-1:0] wr_data,
  output logic signed [E_W-1:0] rd_data [M]
);
  logic signed [E_W-1:0] mem [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign rd_data = mem;
endmodule
