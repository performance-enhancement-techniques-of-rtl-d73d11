// pipn_decider: one decider of the output-port dispatcher, sitting on one router outlet.
//
// A router outlet with routing address ADDR (the low LA-1 address bits) can carry cells for
// four output ports: two whose true low bits equal ADDR (uncomplemented cells, local MSB 0
// or 1) and two whose true low bits equal ~ADDR (complemented cells). The decider restores
// the destination field of each of its K cells (undoing the distributor's complement of the
// low LA bits and clearing the flag) and puts the cell on output port
// j = {restored local MSB, was-complemented}. The dispatcher wires port j to the collector
// of that output port. Restoring the address and picking the output port follow the design;
// the port numbering is this design's.
//
// Combinational. ADDR documents the outlet the decider sits on; the choice of port does not
// depend on it, since the router has already matched the routed bits to ADDR.
module pipn_decider
  import pipn_pkg::*;
#(
  parameter int K    = 2,
  parameter int LA   = 8,
  parameter int ADDR = 0
) (
  input  cell_t in_cells  [K],
  output cell_t out_cells [4][K]
);
  localparam int M = LA - 1;
  localparam logic [ADDR_W-1:0] MASK = ADDR_W'((1 << LA) - 1);

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int k = 0; k < K; k++)
        out_cells[j][k] = EMPTY_CELL;
    for (int k = 0; k < K; k++) begin
      cell_t c;
      logic [1:0] port;
      c = in_cells[k];
      port = 2'b00;
      if (c.valid) begin
        if (c.compl_f) c.dest = c.dest ^ MASK;
        port = {c.dest[LA-1], in_cells[k].compl_f};
        c.compl_f = 1'b0;
        out_cells[port][k] = c;
      end
    end
  end

endmodule
