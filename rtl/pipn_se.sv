// pipn_se: 2x2 switching element with dilation degree K (a plain SE when K = 1).
//
// Each of the two input ports carries up to K cells per slot on K parallel links. A cell
// whose destination bit ROUTE_BIT is 0 leaves on the upper output port (out0), a cell whose
// bit is 1 on the lower one (out1). Each output port forwards at most K cells; the rest lose
// the contention and are dropped, and their number appears on `drops` in the same cycle.
// This follows the switching-element model of the design: cells addressed by the routing bit,
// min(cells for an outlet, K) forwarded, the remainder sent to the place for dropped cells.
//
// Which cells win is this design's choice: the 2K input links are ranked with one input port
// ahead of the other, chosen per slot by the random bit `prio` (0: in0 first), and links of a
// port in link order. Winners fill the output links from link 0 upward, so an output port's
// valid cells are always packed at the low link indices.
//
// Timing: outputs are registered; a cell spends one clock in the SE. Reset empties them.
module pipn_se
  import pipn_pkg::*;
#(
  parameter int K         = 2,
  parameter int ROUTE_BIT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cell_t in0  [K],
  input  cell_t in1  [K],
  input  logic  prio,
  output cell_t out0 [K],
  output cell_t out1 [K],
  output logic [$clog2(2*K+1)-1:0] drops
);
  localparam int CW = $clog2(2*K+1);

  cell_t nxt0 [K];
  cell_t nxt1 [K];

  always_comb begin
    cell_t       ranked [2*K];
    int          n0, n1, nd;
    for (int k = 0; k < K; k++) begin
      ranked[k]     = prio ? in1[k] : in0[k];
      ranked[K + k] = prio ? in0[k] : in1[k];
    end
    n0 = 0;
    n1 = 0;
    nd = 0;
    for (int k = 0; k < K; k++) begin
      nxt0[k] = EMPTY_CELL;
      nxt1[k] = EMPTY_CELL;
    end
    for (int j = 0; j < 2*K; j++) begin
      if (ranked[j].valid) begin
        if (!ranked[j].dest[ROUTE_BIT]) begin
          if (n0 < K) begin
            nxt0[n0] = ranked[j];
            n0++;
          end else begin
            nd++;
          end
        end else begin
          if (n1 < K) begin
            nxt1[n1] = ranked[j];
            n1++;
          end else begin
            nd++;
          end
        end
      end
    end
    drops = CW'(nd);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) begin
        out0[k] <= EMPTY_CELL;
        out1[k] <= EMPTY_CELL;
      end
    end else begin
      out0 <= nxt0;
      out1 <= nxt1;
    end
  end

  // A packed output port: no valid cell above an empty link.
  for (genvar k = 1; k < K; k++) begin : g_chk
    a_packed0 : assert property (@(posedge clk) disable iff (!rst_n) out0[k].valid |-> out0[k-1].valid);
    a_packed1 : assert property (@(posedge clk) disable iff (!rst_n) out1[k].valid |-> out1[k-1].valid);
  end
endmodule
