// pipn_switch: a complete N x N Plane Interconnected Parallel Network (PIPN) with the two
// performance enhancements applied to it: dilation (K parallel links per SE port) and
// replication (R parallel PIPN subnetworks, randomly or selectively loaded).
//
//   inlets -> [1-to-R demux] -> R x (distributor -> 2-plane router) -> deciders -> collectors
//
// K = 1, R = 1 is the original PIPN; K > 1, R = 1 the dilated PIPN (D_K); K = 1, R > 1 the
// replicated PIPN, randomly loaded (R_R, SELECTIVE = 0) or selectively loaded (S_R,
// SELECTIVE = 1), whose routers are then truncated to n-r-1 stages and whose demultiplexers
// pick the subnet from the r top destination bits. The defaults give the 256 x 256 D2
// switch with two-cell collector buffers. Nothing prevents combining K > 1 with R > 1, but
// such a switch is not one of the evaluated configurations.
//
// Interface: one cell per inlet and per outlet per clock (a clock is a cell slot); a cell's
// valid bit marks a used slot. There is no back-pressure: cells that lose a contention in an
// SE or find their collector full are dropped and counted. `router_drops`,
// `collector_drops` and `delivered` are cumulative counters cleared by reset.
//
// Timing: STAGES router clocks plus one collector clock, so an unhindered cell arrives
// n clocks after it enters (n-r for selective loading); each buffered cell ahead of it in its
// collector adds one clock. All random choices come from one pipn_rand instance seeded with
// SEED.
module pipn_switch
  import pipn_pkg::*;
#(
  parameter int          N         = 256,
  parameter int          K         = 2,
  parameter int          R         = 1,
  parameter bit          SELECTIVE = 1'b0,
  parameter int          BUF       = 2,
  parameter logic [31:0] SEED      = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cell_t       in_cells  [N],
  output cell_t       out_cells [N],
  output logic [31:0] router_drops,
  output logic [31:0] collector_drops,
  output logic [31:0] delivered
);
  localparam int n      = ilog2(N);
  localparam int r      = ilog2(R);
  localparam int STAGES = SELECTIVE ? n - r - 1 : n - 1;
  localparam int LINES  = N / 2;
  localparam int RW     = (R > 1) ? r : 1;
  localparam int SUBW   = LINES + LINES * STAGES;      // random bits per subnet
  localparam int DMXW   = N * RW;                      // random bits for the demultiplexers
  localparam int RNDW   = DMXW + R * SUBW;

  initial begin
    assert (N <= (1 << ADDR_W) && (1 << n) == N && N >= 4)
      else $fatal(1, "N must be a power of two between 4 and %0d", 1 << ADDR_W);
    assert ((1 << r) == R && (K >= 1)) else $fatal(1, "R must be a power of two");
    assert (STAGES >= 1) else $fatal(1, "too few router stages for this N and R");
  end

  logic [RNDW-1:0] rnd;
  pipn_rand #(.NBITS(RNDW), .SEED(SEED)) u_rand (
    .clk   (clk),
    .rst_n (rst_n),
    .bits  (rnd)
  );

  // inlet i of the switch to inlet i of every subnet
  cell_t sub_in [R][N];
  for (genvar i = 0; i < N; i++) begin : g_in
    cell_t dmx_out [R];
    pipn_demux #(.N(N), .R(R), .SELECTIVE(SELECTIVE)) u_dmx (
      .in_cell   (in_cells[i]),
      .rnd       (rnd[i*RW +: RW]),
      .out_cells (dmx_out)
    );
    for (genvar s = 0; s < R; s++) begin : g_fan
      assign sub_in[s][i] = dmx_out[s];
    end
  end

  cell_t       outlets  [R][2][LINES][K];
  logic [31:0] sub_drops [R];
  for (genvar s = 0; s < R; s++) begin : g_sub
    pipn_subnet #(.N(N), .K(K), .STAGES(STAGES)) u_sub (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_cells  (sub_in[s]),
      .rnd       (rnd[DMXW + s*SUBW +: SUBW]),
      .out_front (outlets[s][0]),
      .out_back  (outlets[s][1]),
      .drops     (sub_drops[s])
    );
  end

  logic [31:0] col_drops;
  pipn_dispatcher #(.N(N), .K(K), .R(R), .SELECTIVE(SELECTIVE), .BUF(BUF)) u_disp (
    .clk       (clk),
    .rst_n     (rst_n),
    .outlets   (outlets),
    .out_cells (out_cells),
    .drops     (col_drops)
  );

  logic [31:0] r_drop_now, out_now;
  always_comb begin
    r_drop_now = '0;
    out_now    = '0;
    for (int s = 0; s < R; s++) r_drop_now = r_drop_now + sub_drops[s];
    for (int c = 0; c < N; c++) out_now = out_now + 32'(out_cells[c].valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      router_drops    <= '0;
      collector_drops <= '0;
      delivered       <= '0;
    end else begin
      router_drops    <= router_drops + r_drop_now;
      collector_drops <= collector_drops + col_drops;
      delivered       <= delivered + out_now;
    end
  end

  // every outlet carries only cells addressed to it
  for (genvar c = 0; c < N; c++) begin : g_chk
    a_outlet : assert property (@(posedge clk) disable iff (!rst_n)
                                out_cells[c].valid |-> (out_cells[c].dest == ADDR_W'(c) && !out_cells[c].compl_f));
  end
endmodule
