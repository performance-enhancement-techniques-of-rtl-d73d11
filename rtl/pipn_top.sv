// pipn_top: the enhanced PIPN switches side by side, each 256 x 256 with its own inlets,
// outlets and counters:
//   d2_*  dilated PIPN, dilation degree 2 (D2)
//   r2_*  replicated PIPN, two subnetworks, randomly loaded (R2)
//   s2_*  replicated PIPN, two subnetworks, selectively loaded (S2)
// All three use collectors holding two cells. See pipn_switch for the cell interface and
// timing (8 clocks inlet to outlet for D2 and R2, 7 for S2, when nothing waits). Degrees 4
// are reached by changing K or R of the instances; which switches stand here is this
// design's choice, the degree-2 variants being the ones drawn for the 8 x 8 examples.
module pipn_top
  import pipn_pkg::*;
#(
  parameter int N   = 256,
  parameter int BUF = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cell_t       d2_in  [N],
  output cell_t       d2_out [N],
  output logic [31:0] d2_router_drops,
  output logic [31:0] d2_collector_drops,
  output logic [31:0] d2_delivered,
  input  cell_t       r2_in  [N],
  output cell_t       r2_out [N],
  output logic [31:0] r2_router_drops,
  output logic [31:0] r2_collector_drops,
  output logic [31:0] r2_delivered,
  input  cell_t       s2_in  [N],
  output cell_t       s2_out [N],
  output logic [31:0] s2_router_drops,
  output logic [31:0] s2_collector_drops,
  output logic [31:0] s2_delivered
);
  pipn_switch #(.N(N), .K(2), .R(1), .SELECTIVE(1'b0), .BUF(BUF), .SEED(32'h0000_D002)) u_d2 (
    .clk, .rst_n,
    .in_cells        (d2_in),
    .out_cells       (d2_out),
    .router_drops    (d2_router_drops),
    .collector_drops (d2_collector_drops),
    .delivered       (d2_delivered)
  );

  pipn_switch #(.N(N), .K(1), .R(2), .SELECTIVE(1'b0), .BUF(BUF), .SEED(32'h0000_B002)) u_r2 (
    .clk, .rst_n,
    .in_cells        (r2_in),
    .out_cells       (r2_out),
    .router_drops    (r2_router_drops),
    .collector_drops (r2_collector_drops),
    .delivered       (r2_delivered)
  );

  pipn_switch #(.N(N), .K(1), .R(2), .SELECTIVE(1'b1), .BUF(BUF), .SEED(32'h0000_5002)) u_s2 (
    .clk, .rst_n,
    .in_cells        (s2_in),
    .out_cells       (s2_out),
    .router_drops    (s2_router_drops),
    .collector_drops (s2_collector_drops),
    .delivered       (s2_delivered)
  );
endmodule
