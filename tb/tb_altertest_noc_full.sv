// tb_altertest_noc_full: the 10x8 AlterTest mesh at its default parameters.
//
// Test interval 10000 cycles, Testing phase 500 cycles, four-group sequence.
// Random packet traffic runs for two test intervals, so every one of the 80
// routers goes through two complete test procedures (both bypass channels). The run checks delivery of every packet
// (noc_traffic), that the network drains, and that every mechanism was
// exercised: the Emptying, Testing and Recovering phases, both rounds, bypass
// on the north and on the south side (top border), packets to and from cores
// of routers under test, injection stalls while a router empties, and head
// flits routed by routers next to a router under test.
module tb_altertest_noc_full;
  import altertest_pkg::*;
  localparam int MX = 10, MY = 8, NR = MX * MY;
  localparam int INTERVAL = 10000;

  logic clk = 0, rst_n = 0;
  logic  [NR-1:0] inj_valid, inj_ready, ej_valid, ej_ready, round;
  flit_t [NR-1:0] inj_flit, ej_flit;
  phase_e [NR-1:0] phase;
  int t_checks, t_failures, outstanding, sent_pkts, ej_bypass, inj_bypass, inj_stall;
  int checks = 0, failures = 0;
  int n_empty = 0, n_recover = 0, n_round [2] = '{0, 0}, n_top = 0, n_nbr_route = 0;
  int tests_done [NR];
  phase_e prev [NR];

  altertest_noc dut (.*);

  noc_traffic #(.MESH_X(MX), .MESH_Y(MY), .INJ_CYCLES(2 * INTERVAL + 200), .RATE(30)) traffic (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_ready, .phase,
    .checks(t_checks), .failures(t_failures), .outstanding, .sent_pkts,
    .ej_bypass, .inj_bypass, .inj_stall
  );

  always #5 clk = ~clk;

  // heads forwarded by direct neighbors of a router under test
  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      always @(posedge clk) if (rst_n) begin
        if ((dut.g_row[y].g_col[x].u_router.u_sync.nbr[7:4] != '0)
            && (dut.g_row[y].g_col[x].u_router.rt_out_valid
                & dut.g_row[y].g_col[x].u_router.rt_out_ready) != '0)
          n_nbr_route++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      if (phase[r] == PH_EMPTYING && prev[r] != PH_EMPTYING) n_empty++;
      if (phase[r] == PH_TESTING && prev[r] != PH_TESTING) begin
        n_round[round[r]]++;
        if (r < MX) n_top++;
      end
      if (phase[r] == PH_NORMAL && prev[r] == PH_RECOVERING) begin
        n_recover++;
        tests_done[r]++;
      end
      prev[r] = phase[r];
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    for (int r = 0; r < NR; r++) begin tests_done[r] = 0; prev[r] = PH_NORMAL; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2 * INTERVAL + 200) @(posedge clk);
    // drain
    for (int c = 0; c < 20000 && outstanding > 0; c++) @(posedge clk);
    checks++;
    if (outstanding != 0) begin failures++; $display("FAIL %0d packets never delivered", outstanding); end
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (tests_done[r] < 2) begin failures++; $display("FAIL router %0d tested %0d times", r, tests_done[r]); end
    end
    $display("  packets sent %0d", sent_pkts);
    need(n_empty, "emptying phases");
    need(n_recover, "recovering phases");
    need(n_round[0], "tests with bypass on channel 1");
    need(n_round[1], "tests with bypass on channel 2");
    need(n_top, "top-border tests (bypass to south)");
    need(ej_bypass, "packets delivered over a bypass");
    need(inj_bypass, "packets injected over a bypass");
    need(inj_stall, "injection stalls in emptying/recovering");
    need(n_nbr_route, "flits routed next to a router under test");
    checks += t_checks;
    failures += t_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d packets outstanding", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks + t_checks, failures + t_failures);
    $finish;
  end
endmodule
