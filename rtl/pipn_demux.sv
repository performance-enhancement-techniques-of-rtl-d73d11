// pipn_demux: the 1-to-R demultiplexer placed at every inlet of a replicated PIPN.
//
// It connects inlet i of the switch to inlet i of each of the R subnetworks and sends each
// arriving cell to exactly one of them. With SELECTIVE = 0 (random loading) the subnetwork
// is the random index `rnd`; with SELECTIVE = 1 (selective loading) it is the r = log2 R
// most significant bits of the destination address of an N-port switch, so that each
// subnetwork serves one contiguous group of N/R outputs. Both rules follow the design.
//
// Combinational. `rnd` is ignored in selective mode.
module pipn_demux
  import pipn_pkg::*;
#(
  parameter int N         = 256,
  parameter int R         = 2,
  parameter bit SELECTIVE = 1'b0,
  localparam int RW       = (R > 1) ? $clog2(R) : 1
) (
  input  cell_t                      in_cell,
  input  logic [RW-1:0]              rnd,
  output cell_t                      out_cells [R]
);
  localparam int n  = ilog2(N);

  logic [RW-1:0] sel;

  always_comb begin
    if (R == 1)         sel = '0;
    else if (SELECTIVE) sel = in_cell.dest[n-1 -: RW];
    else                sel = rnd;
    for (int s = 0; s < R; s++)
      out_cells[s] = (in_cell.valid && sel == RW'(s)) ? in_cell : EMPTY_CELL;
  end
endmodule
