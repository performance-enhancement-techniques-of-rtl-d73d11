// tb_pipn_decider: self-checking test of a decider (K = 2, 4-bit local address, outlet with
// routing address 5). Random cells that a router could deliver to outlet 5 (true low bits
// 5 uncomplemented, or 2 complemented) are applied; each must come out on port
// {true bit 3, was-complemented} at its own link, with its true address and a clear flag,
// and every other port must stay empty.
module tb_pipn_decider;
  import pipn_pkg::*;
  localparam int K = 2, LA = 4, ADDR = 5;

  cell_t in_cells [K];
  cell_t out_cells [4][K];
  int    checks = 0, failures = 0;
  int    port_hits [4];

  pipn_decider #(.K(K), .LA(LA), .ADDR(ADDR)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int true_dest [K];
    logic cm [K];
    foreach (port_hits[j]) port_hits[j] = 0;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < K; k++) begin
        int msb;
        msb = $urandom_range(0, 1);
        cm[k] = 1'($urandom);
        // a cell on outlet ADDR: routed low bits are ADDR; true low bits are ~ADDR if complemented
        true_dest[k] = cm[k] ? ((msb << 3) | ((~ADDR) & 7)) : ((msb << 3) | ADDR);
        in_cells[k].valid   = 1'($urandom);
        in_cells[k].compl_f = cm[k];
        in_cells[k].dest    = ADDR_W'(cm[k] ? (true_dest[k] ^ 15) : true_dest[k]);
        in_cells[k].payload = PAYLOAD_W'($urandom);
      end
      #1;
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < K; k++) begin
          cell_t e;
          e = EMPTY_CELL;
          if (in_cells[k].valid && j == ((((true_dest[k] >> 3) & 1) << 1) | int'(cm[k]))) begin
            e = in_cells[k];
            e.dest = ADDR_W'(true_dest[k]);
            e.compl_f = 1'b0;
            port_hits[j]++;
          end
          checks++;
          if (out_cells[j][k] !== e) begin
            failures++;
            $display("t=%0d port %0d link %0d: %h expected %h", t, j, k, out_cells[j][k], e);
          end
        end
    end
    foreach (port_hits[j]) begin checks++; if (port_hits[j] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
