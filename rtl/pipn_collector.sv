// pipn_collector: the collector of one output port, with its cell buffer.
//
// In every slot up to NIN cells arrive from the deciders that can reach this port (four
// inlets per subnetwork, each K links wide). The collector sends one cell per slot to its
// outlet and keeps up to BUF further cells; whatever does not fit is dropped and counted on
// `drops`. The buffer and the one-cell-per-slot outlet follow the design, as does the
// buffer size of two cells that the default takes; BUF = 0 gives the unbuffered collector,
// which delivers one of the arriving cells and drops the others.
//
// Service order is this design's choice: buffered cells first, oldest first, then the new
// arrivals in inlet order starting at a round-robin pointer that advances by one inlet every
// slot, so no inlet is favoured for long.
//
// Timing: the outlet is registered. A cell that finds the buffer empty leaves one clock after
// it arrives; a buffered cell leaves one clock later for every cell ahead of it.
module pipn_collector
  import pipn_pkg::*;
#(
  parameter int NIN = 8,
  parameter int BUF = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cell_t in_cells [NIN],
  output cell_t out_cell,
  output logic [$clog2(NIN+1)-1:0] drops,
  output logic [$clog2(BUF+1)-1:0] level
);
  localparam int BD = (BUF > 0) ? BUF : 1;   // storage depth (unused when BUF = 0)
  localparam int PW = (NIN > 1) ? $clog2(NIN) : 1;
  localparam int DW = $clog2(NIN+1);
  localparam int LW = $clog2(BUF+1);

  cell_t         store   [BD];
  int            cnt;
  logic [PW-1:0] rr;

  cell_t         store_n [BD];
  int            cnt_n;
  cell_t         out_n;

  always_comb begin
    int nd;
    int idx;
    out_n = EMPTY_CELL;
    cnt_n = 0;
    nd    = 0;
    for (int b = 0; b < BD; b++) store_n[b] = EMPTY_CELL;
    // buffered cells, oldest first
    for (int b = 0; b < BD; b++) begin
      if (b < cnt) begin
        if (!out_n.valid) out_n = store[b];
        else begin
          store_n[cnt_n] = store[b];
          cnt_n++;
        end
      end
    end
    // new arrivals, starting at the round-robin pointer
    for (int i = 0; i < NIN; i++) begin
      idx = (int'(rr) + i) % NIN;
      if (in_cells[idx].valid) begin
        if (!out_n.valid) out_n = in_cells[idx];
        else if (cnt_n < BUF) begin
          store_n[cnt_n] = in_cells[idx];
          cnt_n++;
        end else nd++;
      end
    end
    drops = DW'(nd);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_cell <= EMPTY_CELL;
      cnt      <= 0;
      rr       <= '0;
      for (int b = 0; b < BD; b++) store[b] <= EMPTY_CELL;
    end else begin
      out_cell <= out_n;
      cnt      <= cnt_n;
      rr       <= (int'(rr) == NIN - 1) ? '0 : rr + 1'b1;
      store    <= store_n;
    end
  end

  assign level = LW'(cnt);

  a_level : assert property (@(posedge clk) disable iff (!rst_n) cnt <= BUF);
endmodule
