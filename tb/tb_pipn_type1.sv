// tb_pipn_type1: the Type-I traffic workload on 16 x 16 switches: the original PIPN and the
// D2, D4, R2, S2, R4 and S4 variants, two-cell collector buffers, full offered load. The
// outputs form eight groups of two ports chosen with probabilities
// (0.30, 0.02, 0.15, 0.00, 0.20, 0.06, 0.22, 0.05). Every cell is checked by the scoreboard
// (pipn_sb) as in the uniform test; the test prints each variant's normalised throughput
// and its improvement over the original PIPN, and requires every variant to beat it.
module tb_pipn_type1;
  import pipn_pkg::*;
  localparam int N = 16, BUF = 2, SLOTS = 1000, NCFG = 7;
  localparam int    CK   [NCFG] = '{1, 2, 4, 1, 1, 1, 1};
  localparam int    CR   [NCFG] = '{1, 1, 1, 2, 2, 4, 4};
  localparam bit    CS   [NCFG] = '{0, 0, 0, 0, 1, 0, 1};
  localparam string NAME [NCFG] = '{"PIPN", "D2", "D4", "R2", "S2", "R4", "S4"};

  logic clk = 0, rst_n = 0;
  int   checks [NCFG], failures [NCFG], offered [NCFG], deliv [NCFG], waited [NCFG], on_time [NCFG];
  logic done [NCFG];
  logic [31:0] rdrop [NCFG], cdrop [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int STAGES = CS[g] ? 4 - $clog2(CR[g]) - 1 : 3;
    cell_t in_c [N], out_c [N];
    logic [31:0] dl;
    pipn_switch #(.N(N), .K(CK[g]), .R(CR[g]), .SELECTIVE(CS[g]), .BUF(BUF), .SEED(32'(100 + g))) dut (
      .clk, .rst_n, .in_cells(in_c), .out_cells(out_c),
      .router_drops(rdrop[g]), .collector_drops(cdrop[g]), .delivered(dl)
    );
    pipn_sb #(.N(N), .LAT(STAGES + 1), .BUF(BUF), .LOAD_PCT(100), .SLOTS(SLOTS), .TRAFFIC(1), .SEED(31 + g)) sb (
      .clk, .rst_n, .in_cells(in_c), .out_cells(out_c),
      .router_drops(rdrop[g]), .collector_drops(cdrop[g]), .delivered(dl),
      .checks(checks[g]), .failures(failures[g]), .n_offered(offered[g]), .n_delivered(deliv[g]),
      .n_waited(waited[g]), .n_on_time(on_time[g]), .done(done[g])
    );
  end

  int total_checks, total_failures;

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < NCFG; g++) if (!done[g]) all_done = 0;
    end while (!all_done);
    total_checks = 0; total_failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      total_checks += checks[g] + 1;
      total_failures += failures[g];
      if (g > 0 && deliv[g] <= deliv[0]) begin
        total_failures++; $display("%s: no better than the original PIPN", NAME[g]);
      end
      $display("%-4s offered %0d delivered %0d router drops %0d collector drops %0d waited %0d throughput %0.4f improvement %0.1f%%",
               NAME[g], offered[g], deliv[g], rdrop[g], cdrop[g], waited[g], real'(deliv[g]) / real'(N * SLOTS),
               100.0 * (real'(deliv[g]) - real'(deliv[0])) / real'(deliv[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
