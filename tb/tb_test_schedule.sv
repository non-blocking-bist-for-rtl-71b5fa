// tb_test_schedule: timer settings of the four-group testing sequence, 10x8 mesh.
//
// Recomputes every router's start time, checks it against the block, and checks
// that routers whose test windows overlap are never closer than two hops in
// X or Y, so no two routers under test are neighbors.
module tb_test_schedule;
  import altertest_pkg::*;
  localparam int MX = 10, MY = 8, INTERVAL = 10000, TEST = 500, MARGIN = 64;
  coord_t x, y;
  logic [19:0] init_value, overflow_value;
  logic [1:0] group;
  int checks = 0, failures = 0;
  int start [MY][MX];

  test_schedule #(.MESH_X(MX), .MESH_Y(MY), .INTERVAL(INTERVAL), .TEST_CYCLES(TEST),
                  .MARGIN(MARGIN), .TIMER_W(20)) dut (.*);

  initial begin
    int stride, g, idx, exp_start;
    stride = (INTERVAL / 4 - TEST - MARGIN) / 20;   // 20 routers per group
    for (int yy = 0; yy < MY; yy++)
      for (int xx = 0; xx < MX; xx++) begin
        x = coord_t'(xx); y = coord_t'(yy);
        #1;
        g = (xx % 2) + 2 * (yy % 2);
        idx = (yy / 2) * 5 + (xx / 2);
        exp_start = g * (INTERVAL / 4) + idx * stride;
        start[yy][xx] = (INTERVAL - 1) - int'(init_value);
        checks++;
        if (overflow_value != 20'(INTERVAL - 1) || start[yy][xx] != exp_start || group != 2'(g)) begin
          failures++;
          $display("FAIL (%0d,%0d) start %0d expected %0d", xx, yy, start[yy][xx], exp_start);
        end
      end
    // windows [start, start+TEST+MARGIN) of neighbors (incl. diagonal) never overlap
    for (int a = 0; a < MX * MY; a++)
      for (int b = a + 1; b < MX * MY; b++) begin
        int ax, ay, bx, by, sa, sb;
        ax = a % MX; ay = a / MX; bx = b % MX; by = b / MX;
        sa = start[ay][ax]; sb = start[by][bx];
        if ((ax - bx) * (ax - bx) <= 1 && (ay - by) * (ay - by) <= 1) begin
          checks++;
          if (sa < sb + TEST + MARGIN && sb < sa + TEST + MARGIN) begin
            failures++;
            $display("FAIL neighbors (%0d,%0d) and (%0d,%0d) overlap", ax, ay, bx, by);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
