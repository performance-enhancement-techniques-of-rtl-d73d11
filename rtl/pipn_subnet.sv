// pipn_subnet: one PIPN without its output-port dispatcher: the distributor followed by the
// two-plane router. A dilated PIPN has one of them; a replicated PIPN has R in parallel.
//
// The N inlets are paired into N/2 distributor elements, whose front and back outputs enter
// the router planes. The router has STAGES stages (n-1 for a full PIPN, n-r-1 for a
// truncated one under selective loading) and every link carries K parallel cells. LA is the
// address width the subnet resolves (STAGES + 1). The outputs are the router outlets of both
// planes; `drops` counts cells lost in the router this slot.
//
// Timing: STAGES clocks from inlet to outlet. `rnd` needs N/2 + (N/2)*STAGES fresh bits
// per slot: first the distributor's, then the router's.
module pipn_subnet
  import pipn_pkg::*;
#(
  parameter int N      = 256,
  parameter int K      = 2,
  parameter int STAGES = 7,
  localparam int LINES = N / 2,
  localparam int RNDW  = LINES + LINES * STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cell_t            in_cells  [N],
  input  logic [RNDW-1:0]  rnd,
  output cell_t            out_front [LINES][K],
  output cell_t            out_back  [LINES][K],
  output logic [31:0]      drops
);
  cell_t de_front [LINES];
  cell_t de_back  [LINES];
  cell_t r_front  [LINES][K];
  cell_t r_back   [LINES][K];

  pipn_distributor #(.N(N), .LA(STAGES + 1)) u_dist (
    .in_cells (in_cells),
    .rnd      (rnd[LINES-1:0]),
    .front    (de_front),
    .back     (de_back)
  );

  // a distributor output drives link 0 of a router inlet; the other K-1 links stay unused
  always_comb begin
    for (int i = 0; i < LINES; i++)
      for (int k = 0; k < K; k++) begin
        r_front[i][k] = (k == 0) ? de_front[i] : EMPTY_CELL;
        r_back[i][k]  = (k == 0) ? de_back[i]  : EMPTY_CELL;
      end
  end

  pipn_router #(.LINES(LINES), .STAGES(STAGES), .K(K)) u_router (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_front  (r_front),
    .in_back   (r_back),
    .rnd       (rnd[RNDW-1:LINES]),
    .out_front (out_front),
    .out_back  (out_back),
    .drops     (drops)
  );
endmodule
