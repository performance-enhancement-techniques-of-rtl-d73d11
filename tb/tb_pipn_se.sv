// tb_pipn_se: self-checking test of the dilated 2x2 switching element (K = 2, routing on
// bit 1). Random cells on both input ports, random priority; the expected outputs are
// worked out here cell by cell: for each output port, the cells addressed to it (bit 1 of
// the destination) in priority order, the first K forwarded, the rest dropped. Checks the
// registered outputs one clock later, the drop count, and that full contention occurs.
module tb_pipn_se;
  import pipn_pkg::*;
  localparam int K  = 2;
  localparam int RB = 1;

  logic  clk = 0, rst_n = 0;
  cell_t in0 [K], in1 [K], out0 [K], out1 [K];
  logic  prio;
  logic [$clog2(2*K+1)-1:0] drops;
  int    checks = 0, failures = 0, contended = 0;

  pipn_se #(.K(K), .ROUTE_BIT(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_t rand_cell();
    cell_t c;
    c.valid   = ($urandom_range(0, 3) != 0);
    c.compl_f = 1'($urandom);
    c.dest    = ADDR_W'($urandom);
    c.payload = PAYLOAD_W'($urandom);
    return c;
  endfunction

  initial begin
    cell_t exp0 [K], exp1 [K];
    int    e0, e1, ed;
    cell_t order [2*K];
    for (int k = 0; k < K; k++) begin in0[k] = EMPTY_CELL; in1[k] = EMPTY_CELL; end
    prio = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int k = 0; k < K; k++) begin in0[k] = rand_cell(); in1[k] = rand_cell(); end
      prio = 1'($urandom);
      // reference
      for (int k = 0; k < K; k++) begin
        order[k]     = prio ? in1[k] : in0[k];
        order[K + k] = prio ? in0[k] : in1[k];
        exp0[k] = EMPTY_CELL; exp1[k] = EMPTY_CELL;
      end
      e0 = 0; e1 = 0; ed = 0;
      foreach (order[j]) if (order[j].valid) begin
        if (order[j].dest[RB] == 1'b0) begin
          if (e0 < K) exp0[e0++] = order[j]; else ed++;
        end else begin
          if (e1 < K) exp1[e1++] = order[j]; else ed++;
        end
      end
      #1;
      checks++;
      if (int'(drops) != ed) begin failures++; $display("t=%0d drops %0d expected %0d", t, drops, ed); end
      if (ed > 0) contended++;
      @(posedge clk); #1;
      for (int k = 0; k < K; k++) begin
        checks += 2;
        if (out0[k] !== exp0[k]) begin failures++; $display("t=%0d out0[%0d] %h expected %h", t, k, out0[k], exp0[k]); end
        if (out1[k] !== exp1[k]) begin failures++; $display("t=%0d out1[%0d] %h expected %h", t, k, out1[k], exp1[k]); end
      end
    end
    checks++;
    if (contended == 0) begin failures++; $display("no contention was exercised"); end
    $display("contended slots: %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
