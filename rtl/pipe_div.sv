// pipe_div: pipelined signed divider with a saturated quotient.
//
// Computes q = trunc(num / den) for a signed dividend and an unsigned divisor,
// one division accepted per clock, result after QW+1 clocks (one register for
// the input, one per quotient bit). Restoring long division on magnitudes: the
// stage for quotient bit j subtracts den<<j from the running remainder when it
// fits. If |num| >= den * 2^(QW-1) the quotient saturates to the largest
// magnitude of a QW-bit signed number; den = 0 gives q = 0. A tag travels with
// each operation so the caller knows where the result belongs.
//
// This is a helper of the correlator; the document does not describe how the
// division of eq. (14) is carried out.
module pipe_div #(
  parameter int unsigned NUM_W = 64,   // signed dividend width
  parameter int unsigned DEN_W = 40,   // unsigned divisor width
  parameter int unsigned QW    = 24,   // signed quotient width
  parameter int unsigned TAG_W = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [NUM_W-1:0] num,
  input  logic [DEN_W-1:0]        den,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [QW-1:0]    q,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned QB  = QW - 1;            // magnitude bits of the quotient
  localparam int unsigned R_W = NUM_W + 1;          // remainder width
  localparam int unsigned D_W = DEN_W + QB + 1;     // shifted divisor width

  typedef struct packed {
    logic             valid;
    logic             neg;
    logic             sat;
    logic [R_W-1:0]   rem;
    logic [DEN_W-1:0] den;
    logic [QB-1:0]    quo;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [QB+1];

  // Input stage: magnitudes, sign and saturation test.
  logic [R_W-1:0] mag;
  assign mag = num[NUM_W-1] ? R_W'(-$signed({num[NUM_W-1], num})) : R_W'(num);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].valid <= in_valid;
      st[0].neg   <= num[NUM_W-1];
      st[0].sat   <= (den == '0) ? 1'b0 : ((D_W + R_W)'(mag) >= ((D_W + R_W)'(den) << QB));
      st[0].rem   <= (den == '0) ? '0 : mag;
      st[0].den   <= den;
      st[0].quo   <= '0;
      st[0].tag   <= in_tag;
    end
  end

  // One stage per quotient bit, most significant first.
  for (genvar g = 0; g < QB; g++) begin : g_stage
    localparam int unsigned J = QB - 1 - g;
    logic [D_W+R_W-1:0] dsh;
    assign dsh = (D_W + R_W)'(st[g].den) << J;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[g+1] <= '0;
      end else begin
        st[g+1] <= st[g];
        if (!st[g].sat && st[g].den != '0 && (D_W + R_W)'(st[g].rem) >= dsh) begin
          st[g+1].rem    <= st[g].rem - R_W'(dsh);
          st[g+1].quo[J] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    logic [QB-1:0] m;
    m         = st[QB].sat ? {QB{1'b1}} : st[QB].quo;
    q         = st[QB].neg ? -$signed({1'b0, m}) : $signed({1'b0, m});
    out_valid = st[QB].valid;
    out_tag   = st[QB].tag;
  end
endmodule
