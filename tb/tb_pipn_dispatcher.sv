// tb_pipn_dispatcher: self-checking test of the output-port dispatcher for a 16-port switch
// with two subnetworks, once randomly loaded and once selectively loaded (two instances).
// Each slot, router outlets carry random cells that such a router could deliver there
// (routing address = outlet line, complemented or not, subnet fixed by the top bits under
// selective loading). Every cell must reach the outlet of its true address, with the
// address restored, 1 to 1+BUF clocks later; cells not delivered must equal the collectors'
// drop count, and both buffering and dropping must occur.
module tb_pipn_dispatcher;
  import pipn_pkg::*;
  localparam int N = 16, K = 1, R = 2, BUF = 2, LINES = N / 2;

  logic  clk = 0, rst_n = 0;
  cell_t outlets [2][R][2][LINES][K];
  cell_t outs    [2][N];
  logic [31:0] drops [2];
  int    checks = 0, failures = 0, cyc = 0;
  int    injected [2], received [2], dropped [2], waited [2];
  int    inj_time [2][int];
  int    inj_dest [2][int];

  for (genvar m = 0; m < 2; m++) begin : g_dut
    pipn_dispatcher #(.N(N), .K(K), .R(R), .SELECTIVE(m[0]), .BUF(BUF)) dut (
      .clk, .rst_n, .outlets(outlets[m]), .out_cells(outs[m]), .drops(drops[m])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 2; m++) begin
      for (int c = 0; c < N; c++) if (outs[m][c].valid) begin
        int id, lat;
        id = int'(outs[m][c].payload);
        checks++;
        if (!inj_time[m].exists(id)) begin
          failures++; $display("mode %0d: unknown cell %0d at %0d", m, id, c);
        end else begin
          lat = cyc - inj_time[m][id];
          if (inj_dest[m][id] != c || int'(outs[m][c].dest) != c || outs[m][c].compl_f || lat < 1 || lat > 1 + BUF) begin
            failures++;
            $display("mode %0d: cell %0d for %0d at outlet %0d latency %0d", m, id, inj_dest[m][id], c, lat);
          end
          if (lat > 1) waited[m]++;
          inj_time[m].delete(id);
          received[m]++;
        end
      end
      dropped[m] += int'(drops[m]);
    end
  end

  initial begin
    int id = 0;
    for (int m = 0; m < 2; m++) begin injected[m] = 0; received[m] = 0; dropped[m] = 0; waited[m] = 0; end
    foreach (outlets[m, s, p, l, k]) outlets[m][s][p][l][k] = EMPTY_CELL;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      foreach (outlets[m, s, p, l, k]) begin
        cell_t c;
        int d, msb, cm, low, la;
        c = EMPTY_CELL;
        if ($urandom_range(0, 99) < 25) begin
          msb = $urandom_range(0, 1);
          cm  = $urandom_range(0, 1);
          if (m == 0) begin
            // random loading: 4-bit local address, router routes on 3 bits = line
            la  = 4;
            low = cm ? ((~l) & 7) : l;
            d   = (msb << 3) | low;
          end else begin
            // selective loading: subnet s = top bit, 3-bit local address, routes on 2 bits
            la  = 3;
            low = cm ? ((~l) & 3) : (l & 3);
            d   = (s << 3) | (msb << 2) | low;
          end
          c.valid   = 1'b1;
          c.compl_f = 1'(cm);
          c.dest    = ADDR_W'(cm ? (d ^ ((1 << la) - 1)) : d);
          c.payload = PAYLOAD_W'(id);
          inj_time[m][id] = cyc;
          inj_dest[m][id] = d;
          injected[m]++;
          id++;
        end
        outlets[m][s][p][l][k] = c;
      end
    end
    @(negedge clk);
    foreach (outlets[m, s, p, l, k]) outlets[m][s][p][l][k] = EMPTY_CELL;
    repeat (BUF + 4) @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      checks += 2;
      if (injected[m] != received[m] + dropped[m]) begin
        failures++; $display("mode %0d: injected %0d received %0d dropped %0d", m, injected[m], received[m], dropped[m]);
      end
      if (dropped[m] == 0 || waited[m] == 0) begin
        failures++; $display("mode %0d: dropped %0d waited %0d", m, dropped[m], waited[m]);
      end
      $display("mode %0d: injected %0d received %0d dropped %0d waited %0d", m, injected[m], received[m], dropped[m], waited[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
