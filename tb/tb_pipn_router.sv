// tb_pipn_router: self-checking test of the two-plane router with 8 lines per plane, 3
// stages and dilation 2. Random cells enter link 0 of random plane inlets, each with a
// unique payload tag. Every cell that comes out must do so exactly STAGES clocks later, on a
// line whose index equals the low 3 bits of its destination field, unchanged; every cell
// that does not come out must be accounted for by the drop count, and some must be.
module tb_pipn_router;
  import pipn_pkg::*;
  localparam int LINES = 8, STAGES = 3, K = 2;

  logic  clk = 0, rst_n = 0;
  cell_t in_front [LINES][K], in_back [LINES][K];
  cell_t out_front [LINES][K], out_back [LINES][K];
  logic [LINES*STAGES-1:0] rnd;
  logic [31:0] drops;
  int    checks = 0, failures = 0;
  int    injected = 0, received = 0, dropped = 0, crossed = 0;
  int    inj_time [int];
  cell_t inj_cell [int];
  int    inj_plane [int];
  int    cyc = 0;

  pipn_router #(.LINES(LINES), .STAGES(STAGES), .K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: outputs seen at a posedge were produced by the previous edge
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < LINES; l++)
        for (int k = 0; k < K; k++) begin
          cell_t c;
          int id;
          c = (p == 0) ? out_front[l][k] : out_back[l][k];
          if (c.valid) begin
            id = int'(c.payload);
            checks++;
            if (!inj_time.exists(id)) begin
              failures++; $display("unknown or duplicate cell %0d", id);
            end else begin
              if (cyc - inj_time[id] != STAGES || int'(c.dest[2:0]) != l || c !== inj_cell[id]) begin
                failures++;
                $display("cell %0d: latency %0d line %0d dest %0h", id, cyc - inj_time[id], l, c.dest);
              end
              if (p != inj_plane[id]) crossed++;
              inj_time.delete(id);
              received++;
            end
          end
        end
    dropped += int'(drops);
  end

  initial begin
    int id = 0;
    for (int l = 0; l < LINES; l++) for (int k = 0; k < K; k++) begin
      in_front[l][k] = EMPTY_CELL; in_back[l][k] = EMPTY_CELL;
    end
    rnd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      rnd = (LINES*STAGES)'({$urandom, $urandom});
      for (int p = 0; p < 2; p++)
        for (int l = 0; l < LINES; l++) begin
          cell_t c;
          c = EMPTY_CELL;
          if ($urandom_range(0, 99) < 70) begin
            c.valid = 1'b1;
            c.compl_f = 1'($urandom);
            c.dest = ADDR_W'($urandom_range(0, 15));
            c.payload = PAYLOAD_W'(id);
            inj_time[id] = cyc;
            inj_cell[id] = c;
            inj_plane[id] = p;
            injected++;
            id++;
          end
          if (p == 0) in_front[l][0] = c; else in_back[l][0] = c;
        end
    end
    @(negedge clk);
    for (int l = 0; l < LINES; l++) begin in_front[l][0] = EMPTY_CELL; in_back[l][0] = EMPTY_CELL; end
    repeat (STAGES + 3) @(posedge clk);
    checks += 3;
    if (injected != received + dropped) begin
      failures++; $display("injected %0d received %0d dropped %0d", injected, received, dropped);
    end
    if (dropped == 0) begin failures++; $display("no contention losses seen"); end
    if (crossed == 0) begin failures++; $display("no plane crossing seen"); end
    $display("injected %0d received %0d dropped %0d crossed %0d", injected, received, dropped, crossed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
