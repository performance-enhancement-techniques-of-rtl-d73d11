// pipn_sb: traffic source and scoreboard for one N x N PIPN switch, used by the switch-level
// testbenches. It is not a design block.
//
// For SLOTS slots it offers a cell to each inlet with probability LOAD_PCT percent. Each
// cell gets a unique 16-bit tag in its payload and a destination drawn from the traffic
// model: TRAFFIC = 0 uniform over all outputs; TRAFFIC = 1 Type-I traffic, in which the
// outputs form eight equal groups picked with probabilities
// (0.30, 0.02, 0.15, 0.00, 0.20, 0.06, 0.22, 0.05) and a port is uniform inside its group.
// Then it idles DRAIN slots so every cell either leaves or is counted as dropped.
//
// Checks on every delivered cell: it was offered and not delivered before, it leaves on the
// outlet of its address with the address restored and the flag clear, and its latency is
// between LAT (the fabric's register count) and LAT + BUF clocks. At the end: offered cells
// = delivered + router drops + collector drops, and the switch's delivered counter agrees.
// `done` rises when the checks are complete.
module pipn_sb
  import pipn_pkg::*;
#(
  parameter int N        = 16,
  parameter int LAT      = 4,
  parameter int BUF      = 2,
  parameter int LOAD_PCT = 100,
  parameter int SLOTS    = 100,
  parameter int DRAIN    = 20,
  parameter int TRAFFIC  = 0,
  parameter int SEED     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output cell_t       in_cells  [N],
  input  cell_t       out_cells [N],
  input  logic [31:0] router_drops,
  input  logic [31:0] collector_drops,
  input  logic [31:0] delivered,
  output int          checks,
  output int          failures,
  output int          n_offered,
  output int          n_delivered,
  output int          n_waited,
  output int          n_on_time,
  output logic        done
);
  int cyc;
  int inj_time [int];
  int inj_dest [int];
  // Type-I group probabilities in per mille
  int type1 [8] = '{300, 20, 150, 0, 200, 60, 220, 50};

  function automatic int pick_dest();
    int u, g, acc;
    if (TRAFFIC == 0) return $urandom_range(0, N-1);
    u = $urandom_range(0, 999);
    acc = 0;
    g = 7;
    for (int i = 0; i < 8; i++) begin
      acc += type1[i];
      if (u < acc) begin g = i; break; end
    end
    return g * (N/8) + $urandom_range(0, N/8 - 1);
  endfunction

  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) if (out_cells[c].valid) begin
      int id, lat;
      id = int'(out_cells[c].payload);
      checks++;
      if (!inj_time.exists(id)) begin
        failures++; $display("%m: unknown or repeated cell %0d at outlet %0d", id, c);
      end else begin
        lat = cyc - inj_time[id];
        if (inj_dest[id] != c || int'(out_cells[c].dest) != c || out_cells[c].compl_f ||
            lat < LAT || lat > LAT + BUF) begin
          failures++;
          $display("%m: cell %0d for %0d at outlet %0d, latency %0d", id, inj_dest[id], c, lat);
        end
        if (lat == LAT) n_on_time++; else n_waited++;
        inj_time.delete(id);
        n_delivered++;
      end
    end
  end

  initial begin
    int id;
    void'($urandom(SEED));
    checks = 0; failures = 0; n_offered = 0; n_delivered = 0; n_waited = 0; n_on_time = 0;
    done = 1'b0;
    id = 0;
    for (int i = 0; i < N; i++) in_cells[i] = EMPTY_CELL;
    @(posedge rst_n);
    for (int t = 0; t < SLOTS; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        cell_t c;
        c = EMPTY_CELL;
        if ($urandom_range(0, 99) < LOAD_PCT) begin
          c.valid   = 1'b1;
          c.dest    = ADDR_W'(pick_dest());
          c.payload = PAYLOAD_W'(id);
          if (inj_time.exists(id & 32'hFFFF)) begin
            failures++; $display("%m: tag space exhausted");
          end
          inj_time[id & 32'hFFFF] = cyc;
          inj_dest[id & 32'hFFFF] = int'(c.dest);
          n_offered++;
          id++;
        end
        in_cells[i] = c;
      end
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_cells[i] = EMPTY_CELL;
    repeat (DRAIN) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (n_offered != n_delivered + int'(router_drops) + int'(collector_drops)) begin
      failures++;
      $display("%m: offered %0d, delivered %0d, router drops %0d, collector drops %0d",
               n_offered, n_delivered, router_drops, collector_drops);
    end
    if (int'(delivered) != n_delivered) begin
      failures++; $display("%m: delivered counter %0d, seen %0d", delivered, n_delivered);
    end
    checks++;
    if (n_on_time == 0) begin failures++; $display("%m: no cell went through at the minimum latency"); end
    done = 1'b1;
  end
endmodule
