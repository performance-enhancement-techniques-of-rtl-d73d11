// tb_pipn_collector: self-checking test of a collector with 4 inlets and a two-cell buffer.
// A reference queue kept here predicts, slot by slot, the cell sent to the outlet (buffered
// cells first, then arrivals in round-robin inlet order), the number of cells held and the
// number dropped. Bursts of arrivals are mixed with idle slots so that the buffer fills,
// drains and overflows; a lone cell into an empty collector must leave one clock later.
module tb_pipn_collector;
  import pipn_pkg::*;
  localparam int NIN = 4, BUF = 2;

  logic  clk = 0, rst_n = 0;
  cell_t in_cells [NIN];
  cell_t out_cell;
  logic [$clog2(NIN+1)-1:0] drops;
  logic [$clog2(BUF+1)-1:0] level;
  int    checks = 0, failures = 0, n_full = 0, n_drop = 0, n_direct = 0;

  pipn_collector #(.NIN(NIN), .BUF(BUF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t q [$];
    cell_t nq [$];
    cell_t exp_out;
    int    rr, exp_drop, busy;
    for (int i = 0; i < NIN; i++) in_cells[i] = EMPTY_CELL;
    rr = 1;  // the pointer already advanced on the first clock out of reset
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      busy = ((t / 20) % 2 == 0) ? 70 : 10;  // alternate heavy and light phases
      for (int i = 0; i < NIN; i++) begin
        in_cells[i].valid   = ($urandom_range(0, 99) < busy);
        in_cells[i].compl_f = 1'b0;
        in_cells[i].dest    = ADDR_W'(3);
        in_cells[i].payload = PAYLOAD_W'(t * 8 + i);
      end
      // reference
      nq = {};
      exp_out = EMPTY_CELL;
      exp_drop = 0;
      if (q.size() == 0) begin
        int nv;
        nv = 0;
        foreach (in_cells[i]) if (in_cells[i].valid) nv++;
        if (nv == 1) n_direct++;
      end
      foreach (q[b]) begin
        if (!exp_out.valid) exp_out = q[b]; else nq.push_back(q[b]);
      end
      for (int i = 0; i < NIN; i++) begin
        cell_t c;
        c = in_cells[(rr + i) % NIN];
        if (c.valid) begin
          if (!exp_out.valid) exp_out = c;
          else if (nq.size() < BUF) nq.push_back(c);
          else exp_drop++;
        end
      end
      #1;
      checks++;
      if (int'(drops) != exp_drop) begin failures++; $display("t=%0d drops %0d expected %0d", t, drops, exp_drop); end
      if (exp_drop > 0) n_drop++;
      @(posedge clk); #1;
      q = nq;
      rr = (rr + 1) % NIN;
      if (q.size() == BUF) n_full++;
      checks += 2;
      if (out_cell !== exp_out) begin failures++; $display("t=%0d out %h expected %h", t, out_cell, exp_out); end
      if (int'(level) != q.size()) begin failures++; $display("t=%0d level %0d expected %0d", t, level, q.size()); end
    end
    checks++;
    if (n_full == 0 || n_drop == 0 || n_direct == 0) begin
      failures++; $display("not exercised: full %0d drop %0d direct %0d", n_full, n_drop, n_direct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
