// tb_pipn_demux: self-checking test of the 1-to-R inlet demultiplexer, R = 4, N = 16, in both
// modes side by side. Random loading must follow the random index; selective loading must
// send a cell to subnet dest[3:2]. Exactly one output may carry a valid cell, and an empty
// slot must give all outputs empty.
module tb_pipn_demux;
  import pipn_pkg::*;
  localparam int N = 16;
  localparam int R = 4;

  cell_t      in_cell;
  logic [1:0] rnd;
  cell_t      out_rand [R], out_sel [R];
  int         checks = 0, failures = 0;
  int         hits_rand [R], hits_sel [R];

  pipn_demux #(.N(N), .R(R), .SELECTIVE(1'b0)) dut_rand (.in_cell, .rnd, .out_cells(out_rand));
  pipn_demux #(.N(N), .R(R), .SELECTIVE(1'b1)) dut_sel  (.in_cell, .rnd, .out_cells(out_sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits_rand[s]) begin hits_rand[s] = 0; hits_sel[s] = 0; end
    for (int t = 0; t < 400; t++) begin
      in_cell.valid   = ($urandom_range(0, 4) != 0);
      in_cell.compl_f = 1'b0;
      in_cell.dest    = ADDR_W'($urandom_range(0, N-1));
      in_cell.payload = PAYLOAD_W'($urandom);
      rnd = 2'($urandom);
      #1;
      for (int s = 0; s < R; s++) begin
        cell_t er, es;
        er = (in_cell.valid && s == int'(rnd))              ? in_cell : EMPTY_CELL;
        es = (in_cell.valid && s == int'(in_cell.dest[3:2])) ? in_cell : EMPTY_CELL;
        checks += 2;
        if (out_rand[s] !== er) begin failures++; $display("t=%0d random out %0d wrong", t, s); end
        if (out_sel[s]  !== es) begin failures++; $display("t=%0d selective out %0d wrong", t, s); end
        if (out_rand[s].valid) hits_rand[s]++;
        if (out_sel[s].valid)  hits_sel[s]++;
      end
    end
    for (int s = 0; s < R; s++) begin
      checks++;
      if (hits_rand[s] == 0 || hits_sel[s] == 0) begin failures++; $display("subnet %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
