// pipn_router: the router of a PIPN, two interconnected banyan planes (front and back) of
// LINES x LINES each, built from 2x2 switching elements with dilation K.
//
// Each plane is a butterfly of STAGES stages. Stage s joins the two lines whose indices
// differ only in bit b = STAGES-1-s into one SE, which sends each cell to the line whose bit
// b equals destination bit b. After the last stage a cell sits on the line whose low STAGES
// bits equal the low STAGES bits of its (possibly complemented) destination field; the upper
// line bits are untouched. For a full PIPN (STAGES = LINES bits = n-1) the line index is the
// routing address itself. For a truncated router (selective loading, STAGES = n-r-1) the
// plane falls apart into R independent banyans, so every routing address is reached on R
// lines.
//
// The planes are interconnected: between two stages, the lower output (bit b = 1) of every
// SE crosses to the same position in the other plane, while the upper output stays in its
// plane. That two planes exchange traffic between stages follows the design; which links
// cross is this design's choice. Crossing never changes the line index, so self-routing is
// unaffected; it only changes which cells meet in the next SE.
//
// Timing: each stage is registered, so a cell takes STAGES clocks. `rnd` holds one SE
// priority bit per SE per slot (index = (plane*STAGES + stage)*LINES/2 + SE); `drops` is the
// number of cells that lost a contention anywhere in the router in the current slot.
module pipn_router
  import pipn_pkg::*;
#(
  parameter int LINES  = 128,
  parameter int STAGES = 7,
  parameter int K      = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  cell_t                      in_front  [LINES][K],
  input  cell_t                      in_back   [LINES][K],
  input  logic [LINES*STAGES-1:0]    rnd,
  output cell_t                      out_front [LINES][K],
  output cell_t                      out_back  [LINES][K],
  output logic [31:0]                drops
);
  localparam int NSE = LINES / 2;   // SEs per stage per plane
  localparam int DW  = $clog2(2*K+1);

  // st_*[s] is the input of stage s; st_*[STAGES] is the router output
  cell_t st_f [STAGES+1][LINES][K];
  cell_t st_b [STAGES+1][LINES][K];
  cell_t so_f [STAGES][LINES][K];
  cell_t so_b [STAGES][LINES][K];
  logic [DW-1:0] se_drops [2][STAGES][NSE];

  assign st_f[0] = in_front;
  assign st_b[0] = in_back;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int B = STAGES - 1 - s;
    for (genvar p = 0; p < 2; p++) begin : g_plane
      for (genvar j = 0; j < NSE; j++) begin : g_se
        // line pair of SE j: insert a 0 (upper) or 1 (lower) at bit B of j
        localparam int L0 = ((j >> B) << (B + 1)) | (j & ((1 << B) - 1));
        localparam int L1 = L0 | (1 << B);
        cell_t g_in0 [K];
        cell_t g_in1 [K];
        cell_t g_out0 [K];
        cell_t g_out1 [K];
        if (p == 0) begin : g_f
          assign g_in0       = st_f[s][L0];
          assign g_in1       = st_f[s][L1];
          assign so_f[s][L0] = g_out0;
          assign so_f[s][L1] = g_out1;
        end else begin : g_b
          assign g_in0       = st_b[s][L0];
          assign g_in1       = st_b[s][L1];
          assign so_b[s][L0] = g_out0;
          assign so_b[s][L1] = g_out1;
        end
        pipn_se #(.K(K), .ROUTE_BIT(B)) u_se (
          .clk   (clk),
          .rst_n (rst_n),
          .in0   (g_in0),
          .in1   (g_in1),
          .prio  (rnd[(p*STAGES + s)*NSE + j]),
          .out0  (g_out0),
          .out1  (g_out1),
          .drops (se_drops[p][s][j])
        );
      end
    end
    // plane interconnection towards the next stage
    for (genvar i = 0; i < LINES; i++) begin : g_link
      if (s < STAGES - 1 && ((i >> B) & 1) == 1) begin : g_cross
        assign st_f[s+1][i] = so_b[s][i];
        assign st_b[s+1][i] = so_f[s][i];
      end else begin : g_straight
        assign st_f[s+1][i] = so_f[s][i];
        assign st_b[s+1][i] = so_b[s][i];
      end
    end
  end

  assign out_front = st_f[STAGES];
  assign out_back  = st_b[STAGES];

  always_comb begin
    drops = '0;
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < STAGES; s++)
        for (int j = 0; j < NSE; j++)
          drops = drops + 32'(se_drops[p][s][j]);
  end
endmodule
