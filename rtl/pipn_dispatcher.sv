// pipn_dispatcher: the output-port dispatcher, deciders and collectors.
//
// There is one decider on every router outlet of every subnetwork (R subnets x 2 planes x
// N/2 outlets) and one collector per output port. The collectors are shared by all
// subnetworks, so no output multiplexers are needed. Collector c (local address lc = the low
// LA bits of c, msb = bit LA-1 of lc, low = the low M = LA-1 bits) is reachable from the
// outlets whose routing address is low (uncomplemented cells) or ~low (complemented cells),
// in both planes. Its 4R inlets, each K links wide, are numbered
//   random loading:    inlet ((s*2 + p)*2 + w) <- subnet s, plane p, line  (w ? ~low : low)
//   selective loading: inlet ((g*2 + p)*2 + w) <- subnet c>>LA, plane p,
//                                                 line {g, (w ? ~low : low)}
// and take port {msb, w} of that line's decider. Under selective loading the truncated
// router reaches each routing address on R lines (g = 0..R-1), hence again 4R inlets.
//
// Timing: the deciders are combinational and the collectors registered: one clock.
module pipn_dispatcher
  import pipn_pkg::*;
#(
  parameter int N         = 256,
  parameter int K         = 2,
  parameter int R         = 1,
  parameter bit SELECTIVE = 1'b0,
  parameter int BUF       = 2,
  localparam int LINES    = N / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cell_t       outlets   [R][2][LINES][K],
  output cell_t       out_cells [N],
  output logic [31:0] drops
);
  localparam int n   = ilog2(N);
  localparam int r   = ilog2(R);
  localparam int LA  = SELECTIVE ? n - r : n;
  localparam int M   = LA - 1;
  localparam int MM  = (1 << M) - 1;
  localparam int NIN = 4 * R * K;
  localparam int DW  = $clog2(NIN + 1);
  localparam int LW  = $clog2(BUF + 1);

  cell_t dec_out [R][2][LINES][4][K];

  for (genvar s = 0; s < R; s++) begin : g_sub
    for (genvar p = 0; p < 2; p++) begin : g_plane
      for (genvar l = 0; l < LINES; l++) begin : g_dec
        pipn_decider #(.K(K), .LA(LA), .ADDR(l & MM)) u_dec (
          .in_cells  (outlets[s][p][l]),
          .out_cells (dec_out[s][p][l])
        );
      end
    end
  end

  logic [DW-1:0] col_drops [N];

  for (genvar c = 0; c < N; c++) begin : g_col
    localparam int LC   = c & ((1 << LA) - 1);
    localparam int MSB  = (LC >> M) & 1;
    localparam int LOW  = LC & MM;
    localparam int NLOW = (~LC) & MM;
    localparam int SSEL = SELECTIVE ? (c >> LA) : 0;

    cell_t col_in [NIN];
    for (genvar q = 0; q < 4 * R; q++) begin : g_in
      localparam int W  = q & 1;
      localparam int P  = (q >> 1) & 1;
      localparam int G  = q >> 2;                       // subnet (random) or line group (selective)
      localparam int S  = SELECTIVE ? SSEL : G;
      localparam int LN = SELECTIVE ? ((G << M) | ((W != 0) ? NLOW : LOW)) : ((W != 0) ? NLOW : LOW);
      for (genvar k = 0; k < K; k++) begin : g_link
        assign col_in[q*K + k] = dec_out[S][P][LN][MSB*2 + W][k];
      end
    end

    logic [LW-1:0] level;
    pipn_collector #(.NIN(NIN), .BUF(BUF)) u_col (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_cells (col_in),
      .out_cell (out_cells[c]),
      .drops    (col_drops[c]),
      .level    (level)
    );
  end

  always_comb begin
    drops = '0;
    for (int c = 0; c < N; c++) drops = drops + 32'(col_drops[c]);
  end
endmodule
