// pipn_distributor: the first unit of a PIPN. N/2 distributor elements DE_i; DE_i takes
// inlets 2i and 2i+1 and feeds inlet i of the front plane and inlet i of the back plane of
// the router (pipn_de does the per-element work).
//
// Every valid cell that enters leaves on exactly one plane; cells routed to the back plane
// have their low LA destination bits complemented and their complement flag set. LA is the
// width of the address the PIPN resolves: log2 N for a full PIPN, log2(N/R) for a
// selectively loaded subnetwork, whose top r bits were already used to pick it.
//
// Combinational. `rnd` supplies one random bit per DE per slot.
module pipn_distributor
  import pipn_pkg::*;
#(
  parameter int N  = 256,
  parameter int LA = 8
) (
  input  cell_t            in_cells [N],
  input  logic [N/2-1:0]   rnd,
  output cell_t            front    [N/2],
  output cell_t            back     [N/2]
);
  for (genvar i = 0; i < N/2; i++) begin : g_de
    pipn_de #(.LA(LA)) u_de (
      .in0   (in_cells[2*i]),
      .in1   (in_cells[2*i+1]),
      .rnd   (rnd[i]),
      .front (front[i]),
      .back  (back[i])
    );
  end
endmodule
