// pipn_rand: source of pseudo-random bits for the random decisions of the switch.
//
// The switch makes random choices in three places: the distributor picks the plane of each
// cell, the random-loading demultiplexer picks a subnetwork, and a switching element picks
// which input wins a contention. This block supplies NBITS fresh bits every clock from
// ceil(NBITS/32) independent 32-bit xorshift generators, each seeded differently from SEED.
// The generator itself is this design's choice; the switch only asks for random bits.
// The bits change on every rising clock edge after reset; reset reloads the seeds.
module pipn_rand #(
  parameter int          NBITS = 32,
  parameter logic [31:0] SEED  = 32'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NBITS-1:0] bits
);
  localparam int NGEN = (NBITS + 31) / 32;

  logic [31:0] state [NGEN];
  logic [NGEN*32-1:0] flat;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] seed_of(input int g);
    logic [31:0] s;
    s = SEED ^ (32'h9E3779B9 * (g + 1));
    if (s == '0) s = 32'h1;
    return s;
  endfunction

  for (genvar g = 0; g < NGEN; g++) begin : g_gen
    always_ff @(posedge clk) begin
      if (!rst_n) state[g] <= seed_of(g);
      else        state[g] <= xorshift(state[g]);
    end
    assign flat[g*32 +: 32] = state[g];
  end

  assign bits = flat[NBITS-1:0];
endmodule
