// pipn_de: one distributor element (DE). It takes two switch inlets and hands one cell to
// the front plane and one to the back plane of the router.
//
// The cells arriving at a DE are split between the two planes at random: with two cells, the
// random bit `rnd` decides which of them goes to the back plane; with one cell, it decides
// the plane of that cell. A cell sent to the back plane has the low LA bits of its
// destination field complemented and its complement flag set, so that later stages can tell
// it apart and the decider can restore it. Splitting into planes and complementing one group
// follow the design; the choice of the back plane as the complemented group and the flag bit
// are this design's own.
//
// Purely combinational; the cell slot timing is set by the router behind it.
module pipn_de
  import pipn_pkg::*;
#(
  parameter int LA = 8
) (
  input  cell_t in0,
  input  cell_t in1,
  input  logic  rnd,
  output cell_t front,
  output cell_t back
);
  localparam logic [ADDR_W-1:0] MASK = ADDR_W'((1 << LA) - 1);

  function automatic cell_t complement(input cell_t c);
    cell_t r;
    r = c;
    if (c.valid) begin
      r.dest    = c.dest ^ MASK;
      r.compl_f = ~c.compl_f;
    end
    return r;
  endfunction

  always_comb begin
    cell_t to_front, to_back;
    if (in0.valid && in1.valid) begin
      to_front = rnd ? in1 : in0;
      to_back  = rnd ? in0 : in1;
    end else begin
      // at most one valid cell: rnd = 1 sends it to the back plane
      to_front = (rnd || !(in0.valid || in1.valid)) ? EMPTY_CELL : (in0.valid ? in0 : in1);
      to_back  = (rnd && (in0.valid || in1.valid))  ? (in0.valid ? in0 : in1) : EMPTY_CELL;
    end
    front = to_front;
    back  = complement(to_back);
  end
endmodule
