// tb_pipn_top: end-to-end test of pipn_top, reduced to 32 x 32 to keep the build short, with all three
// switches (D2, R2, S2) loaded at full uniform load for SLOTS slots and then drained. One
// scoreboard per switch (pipn_sb) checks every cell's outlet, restored address, latency
// (log2 N clocks for D2 and R2, one less for S2, plus at most two slots of collector waiting) and the
// cell balance against the switches' counters.
//
// It also counts how often each mechanism of the design acted and fails if one never did:
// router contention losses and collector overflows in every switch, cells waiting in a
// collector buffer, back-plane cells with complemented addresses, the second link of a
// dilated port carrying a cell, and both subnetworks receiving cells under random and
// under selective loading.
module tb_pipn_top;
  import pipn_pkg::*;
  localparam int N = 32, BUF = 2, SLOTS = 200;
  localparam int LAT = $clog2(N);

  logic clk = 0, rst_n = 0;
  cell_t d2_in [N], d2_out [N], r2_in [N], r2_out [N], s2_in [N], s2_out [N];
  logic [31:0] d2_router_drops, d2_collector_drops, d2_delivered;
  logic [31:0] r2_router_drops, r2_collector_drops, r2_delivered;
  logic [31:0] s2_router_drops, s2_collector_drops, s2_delivered;

  pipn_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int   checks [3], failures [3], offered [3], deliv [3], waited [3], on_time [3];
  logic done [3];

  pipn_sb #(.N(N), .LAT(LAT), .BUF(BUF), .SLOTS(SLOTS), .SEED(11)) sb_d2 (
    .clk, .rst_n, .in_cells(d2_in), .out_cells(d2_out), .router_drops(d2_router_drops),
    .collector_drops(d2_collector_drops), .delivered(d2_delivered), .checks(checks[0]),
    .failures(failures[0]), .n_offered(offered[0]), .n_delivered(deliv[0]), .n_waited(waited[0]),
    .n_on_time(on_time[0]), .done(done[0]));
  pipn_sb #(.N(N), .LAT(LAT), .BUF(BUF), .SLOTS(SLOTS), .SEED(12)) sb_r2 (
    .clk, .rst_n, .in_cells(r2_in), .out_cells(r2_out), .router_drops(r2_router_drops),
    .collector_drops(r2_collector_drops), .delivered(r2_delivered), .checks(checks[1]),
    .failures(failures[1]), .n_offered(offered[1]), .n_delivered(deliv[1]), .n_waited(waited[1]),
    .n_on_time(on_time[1]), .done(done[1]));
  pipn_sb #(.N(N), .LAT(LAT - 1), .BUF(BUF), .SLOTS(SLOTS), .SEED(13)) sb_s2 (
    .clk, .rst_n, .in_cells(s2_in), .out_cells(s2_out), .router_drops(s2_router_drops),
    .collector_drops(s2_collector_drops), .delivered(s2_delivered), .checks(checks[2]),
    .failures(failures[2]), .n_offered(offered[2]), .n_delivered(deliv[2]), .n_waited(waited[2]),
    .n_on_time(on_time[2]), .done(done[2]));

  // mechanism counters, read through the hierarchy
  int n_back = 0, n_link1 = 0;
  int n_rsub [2] = '{0, 0};
  int n_ssub [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N/2; i++) if (dut.u_d2.g_sub[0].u_sub.de_back[i].valid) n_back++;
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < N/2; l++) if (dut.u_d2.outlets[0][p][l][1].valid) n_link1++;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < N; i++) begin
        if (dut.u_r2.sub_in[s][i].valid) n_rsub[s]++;
        if (dut.u_s2.sub_in[s][i].valid) n_ssub[s]++;
      end
  end

  initial begin
    repeat (SLOTS + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    string name [3] = '{"D2", "R2", "S2"};
    logic [31:0] rd [3], cd [3];
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    @(posedge clk);
    rd = '{d2_router_drops, r2_router_drops, s2_router_drops};
    cd = '{d2_collector_drops, r2_collector_drops, s2_collector_drops};
    c = 0; f = 0;
    for (int g = 0; g < 3; g++) begin
      c += checks[g] + 3;
      f += failures[g];
      if (rd[g] == 0)     begin f++; $display("%s: no router contention loss", name[g]); end
      if (cd[g] == 0)     begin f++; $display("%s: no collector overflow", name[g]); end
      if (waited[g] == 0) begin f++; $display("%s: no cell waited in a collector", name[g]); end
      $display("%s offered %0d delivered %0d router drops %0d collector drops %0d waited %0d throughput %0.4f",
               name[g], offered[g], deliv[g], rd[g], cd[g], waited[g], real'(deliv[g]) / real'(N * SLOTS));
    end
    c += 6;
    if (n_back == 0)    begin f++; $display("no back-plane (complemented) cell"); end
    if (n_link1 == 0)   begin f++; $display("second dilated link never used"); end
    for (int s = 0; s < 2; s++) begin
      if (n_rsub[s] == 0) begin f++; $display("random loading never used subnet %0d", s); end
      if (n_ssub[s] == 0) begin f++; $display("selective loading never used subnet %0d", s); end
    end
    $display("back-plane cells %0d, second-link cells %0d, R2 subnets %0d/%0d, S2 subnets %0d/%0d",
             n_back, n_link1, n_rsub[0], n_rsub[1], n_ssub[0], n_ssub[1]);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
