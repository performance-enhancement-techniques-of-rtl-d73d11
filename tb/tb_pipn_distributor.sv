// tb_pipn_distributor: self-checking test of the distributor (N = 8, 3-bit addresses).
// Every slot, random cells on the inlets and random plane bits. For each DE the test checks
// that every valid cell leaves on exactly one plane, the front-plane cell unchanged and the
// back-plane cell with its address complemented and its flag set, that two cells are split
// over the two planes, and that the plane choice follows the random bit.
module tb_pipn_distributor;
  import pipn_pkg::*;
  localparam int N  = 8;
  localparam int LA = 3;

  cell_t          in_cells [N];
  logic [N/2-1:0] rnd;
  cell_t          front [N/2], back [N/2];
  int             checks = 0, failures = 0, both = 0, single_back = 0;

  pipn_distributor #(.N(N), .LA(LA)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_t compl_of(cell_t c);
    cell_t r = c;
    r.dest    = c.dest ^ ADDR_W'((1 << LA) - 1);
    r.compl_f = 1'b1;
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        in_cells[i].valid   = 1'($urandom);
        in_cells[i].compl_f = 1'b0;
        in_cells[i].dest    = ADDR_W'($urandom_range(0, N-1));
        in_cells[i].payload = PAYLOAD_W'($urandom);
      end
      rnd = (N/2)'($urandom);
      #1;
      for (int d = 0; d < N/2; d++) begin
        cell_t a, b, ef, eb;
        a = in_cells[2*d]; b = in_cells[2*d+1];
        if (a.valid && b.valid) begin
          ef = rnd[d] ? b : a;
          eb = compl_of(rnd[d] ? a : b);
          both++;
        end else if (a.valid || b.valid) begin
          ef = rnd[d] ? EMPTY_CELL : (a.valid ? a : b);
          eb = rnd[d] ? compl_of(a.valid ? a : b) : EMPTY_CELL;
          if (rnd[d]) single_back++;
        end else begin
          ef = EMPTY_CELL; eb = EMPTY_CELL;
        end
        checks += 2;
        if (front[d] !== ef) begin failures++; $display("t=%0d DE%0d front %h expected %h", t, d, front[d], ef); end
        if (back[d]  !== eb) begin failures++; $display("t=%0d DE%0d back %h expected %h", t, d, back[d], eb); end
      end
    end
    checks++;
    if (both == 0 || single_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
