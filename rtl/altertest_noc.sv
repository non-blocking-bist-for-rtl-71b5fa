// altertest_noc: mesh network of AlterTest routers with non-blocking BIST.
//
// MESH_X x MESH_Y routers (10x8 by default) connected in a mesh with one link
// pair in X and two link pairs (1 and 2) in Y between neighbors, plus the
// synchronization bundles on every side. Each router's timer is set by
// test_schedule for the four-group testing sequence, so routers under test are
// never neighbors and at most a quarter of them are under test at once; the
// cores stay reachable during tests through the bypass channels.
//
// Interface: one core port per router, router r = y*MESH_X + x:
// inj_* (core -> network) and ej_* (network -> core), valid/ready, flit_t
// flits with the destination coordinates in every flit. phase and round show
// each router's test state. Links at the mesh edge are tied off.
//
// The Verilator lint reports UNOPTFLAT (circular logic) on r_in_ready, r_out_valid and
// r_out_flit. It tracks each array and each port vector as one signal, and a
// router under test passes its core port straight to a link through the bypass,
// so at that granularity the arrays appear to feed themselves. Bit by bit there
// is no loop: a link's ready is a FIFO flag or the core's ready, and a link's
// valid comes from a buffer register or the core's valid. The warning stands.
module altertest_noc
  import altertest_pkg::*;
#(
  parameter int unsigned MESH_X      = 10,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned INTERVAL    = 10000,
  parameter int unsigned TEST_CYCLES = 500,
  parameter int unsigned TIMER_W     = 20,
  localparam int unsigned NR         = MESH_X * MESH_Y
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NR-1:0]      inj_valid,
  input  flit_t [NR-1:0]      inj_flit,
  output logic  [NR-1:0]      inj_ready,
  output logic  [NR-1:0]      ej_valid,
  output flit_t [NR-1:0]      ej_flit,
  input  logic  [NR-1:0]      ej_ready,
  output phase_e [NR-1:0]     phase,
  output logic  [NR-1:0]      round
);
  logic  [NPORTS-1:0] r_in_valid  [MESH_Y][MESH_X];
  flit_t [NPORTS-1:0] r_in_flit   [MESH_Y][MESH_X];
  logic  [NPORTS-1:0] r_in_ready  [MESH_Y][MESH_X];
  logic  [NPORTS-1:0] r_out_valid [MESH_Y][MESH_X];
  flit_t [NPORTS-1:0] r_out_flit  [MESH_Y][MESH_X];
  logic  [NPORTS-1:0] r_out_ready [MESH_Y][MESH_X];
  sync_t [NSIDES-1:0] r_sync_in   [MESH_Y][MESH_X];
  sync_t [NSIDES-1:0] r_sync_out  [MESH_Y][MESH_X];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int R = y * MESH_X + x;
      logic [TIMER_W-1:0] t_init, t_ovf;
      logic [1:0]         grp;

      test_schedule #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .INTERVAL(INTERVAL),
        .TEST_CYCLES(TEST_CYCLES), .TIMER_W(TIMER_W)
      ) u_sched (
        .x(coord_t'(x)), .y(coord_t'(y)),
        .init_value(t_init), .overflow_value(t_ovf), .group(grp)
      );

      altertest_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y),
        .BUF_DEPTH(BUF_DEPTH), .TEST_CYCLES(TEST_CYCLES), .TIMER_W(TIMER_W)
      ) u_router (
        .clk, .rst_n,
        .timer_init(t_init), .timer_overflow(t_ovf),
        .in_valid (r_in_valid[y][x]),  .in_flit (r_in_flit[y][x]),  .in_ready (r_in_ready[y][x]),
        .out_valid(r_out_valid[y][x]), .out_flit(r_out_flit[y][x]), .out_ready(r_out_ready[y][x]),
        .sync_in(r_sync_in[y][x]), .sync_out(r_sync_out[y][x]),
        .phase(phase[R]), .round(round[R])
      );

      // core port
      assign r_in_valid[y][x][P_L]  = inj_valid[R];
      assign r_in_flit[y][x][P_L]   = inj_flit[R];
      assign inj_ready[R]           = r_in_ready[y][x][P_L];
      assign ej_valid[R]            = r_out_valid[y][x][P_L];
      assign ej_flit[R]             = r_out_flit[y][x][P_L];
      assign r_out_ready[y][x][P_L] = ej_ready[R];

      // east side: my E port <-> east neighbor's W port
      if (x < MESH_X - 1) begin : g_e
        assign r_in_valid[y][x][P_E]  = r_out_valid[y][x+1][P_W];
        assign r_in_flit[y][x][P_E]   = r_out_flit[y][x+1][P_W];
        assign r_out_ready[y][x][P_E] = r_in_ready[y][x+1][P_W];
        assign r_sync_in[y][x][D_E]   = r_sync_out[y][x+1][D_W];
      end else begin : g_e_edge
        assign r_in_valid[y][x][P_E]  = 1'b0;
        assign r_in_flit[y][x][P_E]   = '0;
        assign r_out_ready[y][x][P_E] = 1'b0;
        assign r_sync_in[y][x][D_E]   = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[y][x][P_W]  = r_out_valid[y][x-1][P_E];
        assign r_in_flit[y][x][P_W]   = r_out_flit[y][x-1][P_E];
        assign r_out_ready[y][x][P_W] = r_in_ready[y][x-1][P_E];
        assign r_sync_in[y][x][D_W]   = r_sync_out[y][x-1][D_E];
      end else begin : g_w_edge
        assign r_in_valid[y][x][P_W]  = 1'b0;
        assign r_in_flit[y][x][P_W]   = '0;
        assign r_out_ready[y][x][P_W] = 1'b0;
        assign r_sync_in[y][x][D_W]   = '0;
      end
      // north side: my N1/N2 ports <-> north neighbor's S1/S2 ports
      if (y > 0) begin : g_n
        assign r_in_valid[y][x][P_N1]  = r_out_valid[y-1][x][P_S1];
        assign r_in_flit[y][x][P_N1]   = r_out_flit[y-1][x][P_S1];
        assign r_out_ready[y][x][P_N1] = r_in_ready[y-1][x][P_S1];
        assign r_in_valid[y][x][P_N2]  = r_out_valid[y-1][x][P_S2];
        assign r_in_flit[y][x][P_N2]   = r_out_flit[y-1][x][P_S2];
        assign r_out_ready[y][x][P_N2] = r_in_ready[y-1][x][P_S2];
        assign r_sync_in[y][x][D_N]    = r_sync_out[y-1][x][D_S];
      end else begin : g_n_edge
        assign r_in_valid[y][x][P_N1]  = 1'b0;
        assign r_in_flit[y][x][P_N1]   = '0;
        assign r_out_ready[y][x][P_N1] = 1'b0;
        assign r_in_valid[y][x][P_N2]  = 1'b0;
        assign r_in_flit[y][x][P_N2]   = '0;
        assign r_out_ready[y][x][P_N2] = 1'b0;
        assign r_sync_in[y][x][D_N]    = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in_valid[y][x][P_S1]  = r_out_valid[y+1][x][P_N1];
        assign r_in_flit[y][x][P_S1]   = r_out_flit[y+1][x][P_N1];
        assign r_out_ready[y][x][P_S1] = r_in_ready[y+1][x][P_N1];
        assign r_in_valid[y][x][P_S2]  = r_out_valid[y+1][x][P_N2];
        assign r_in_flit[y][x][P_S2]   = r_out_flit[y+1][x][P_N2];
        assign r_out_ready[y][x][P_S2] = r_in_ready[y+1][x][P_N2];
        assign r_sync_in[y][x][D_S]    = r_sync_out[y+1][x][D_N];
      end else begin : g_s_edge
        assign r_in_valid[y][x][P_S1]  = 1'b0;
        assign r_in_flit[y][x][P_S1]   = '0;
        assign r_out_ready[y][x][P_S1] = 1'b0;
        assign r_in_valid[y][x][P_S2]  = 1'b0;
        assign r_in_flit[y][x][P_S2]   = '0;
        assign r_out_ready[y][x][P_S2] = 1'b0;
        assign r_sync_in[y][x][D_S]    = '0;
      end
    end
  end
endmodule
