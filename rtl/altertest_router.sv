// altertest_router: design-for-test reconfigurable router with one bypass channel.
//
// Seven ports: Local, East, West, North1, North2, South1, South2; two channel
// pairs in Y give the two deadlock-free subnetworks and two choices for the
// bypass. In normal operation packets go input buffer -> routing unit ->
// crossbar. A periodic timer starts a test procedure (test_controller); while
// the router is under test it is isolated and its core stays connected to the
// network through the bypass channel to the ladder router (N1 or N2 port, S1 or
// S2 on the top border), alternating between the two channels of the pair from
// one procedure to the next. The synchronization signals tell the 3x3 area
// around the router that it is disabled, so neighbors route around it.
//
// Interface: per port a valid/ready input link and output link (index by
// port_e; P_L is the core: in_* = inject, out_* = eject), one sync_t bundle in
// and out per side (index by side_e), the timer settings, and the current test
// phase and round. A flit crosses a router in one cycle from the head of its
// input buffer; a buffer accepts a flit one cycle after it had room.
// Coordinates X, Y and the mesh size are parameters.
module altertest_router
  import altertest_pkg::*;
#(
  parameter int unsigned MESH_X      = 10,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned TEST_CYCLES = 500,
  parameter int unsigned TIMER_W     = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TIMER_W-1:0]   timer_init,
  input  logic [TIMER_W-1:0]   timer_overflow,
  input  logic  [NPORTS-1:0]   in_valid,
  input  flit_t [NPORTS-1:0]   in_flit,
  output logic  [NPORTS-1:0]   in_ready,
  output logic  [NPORTS-1:0]   out_valid,
  output flit_t [NPORTS-1:0]   out_flit,
  input  logic  [NPORTS-1:0]   out_ready,
  input  sync_t [NSIDES-1:0]   sync_in,
  output sync_t [NSIDES-1:0]   sync_out,
  output phase_e               phase,
  output logic                 round
);
  localparam logic TOP = (Y == 0);

  // router side of the bypass multiplexers
  logic  [NPORTS-1:0] rt_in_valid, rt_in_ready, rt_out_valid, rt_out_ready;
  flit_t [NPORTS-1:0] rt_in_flit, rt_out_flit;
  // input buffer heads
  logic  [NPORTS-1:0] buf_valid, buf_pop;
  flit_t [NPORTS-1:0] buf_flit;
  // routing
  logic  [NPORTS-1:0] req_valid, out_locked, out_avail, in_free;
  port_e [NPORTS-1:0] req_port;
  logic               xb_idle;
  // test control
  logic               trigger, er, dns, cs_en, cs_sel, bypass_on, xb_enable, block_new;
  logic               bypass_busy, router_empty;
  side_e              ladder_side;
  port_e              bypass_port;
  logic [NSIDES-1:0]  ea_in, busy_toward, nbr_present;
  nbr_status_t        nbr;
  logic               cs_n_en, cs_n_sel, cs_s_en, cs_s_sel;

  bypass_mux u_bypass (
    .clk, .rst_n,
    .bypass_on, .bypass_port, .block_new,
    .ext_in_valid (in_valid),  .ext_in_flit (in_flit),  .ext_in_ready (in_ready),
    .ext_out_valid(out_valid), .ext_out_flit(out_flit), .ext_out_ready(out_ready),
    .rt_in_valid, .rt_in_flit, .rt_in_ready,
    .rt_out_valid, .rt_out_flit, .rt_out_ready,
    .busy(bypass_busy)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (rt_in_valid[p]), .in_flit(rt_in_flit[p]), .in_ready(rt_in_ready[p]),
      .out_valid(buf_valid[p]),   .out_flit(buf_flit[p]), .out_pop(buf_pop[p])
    );

    route_unit #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_route (
      .cur_x(coord_t'(X)), .cur_y(coord_t'(Y)),
      .dst_x(buf_flit[p].dst_x), .dst_y(buf_flit[p].dst_y),
      .in_port(port_e'(p)), .in_free(in_free[p]), .nbr,
      .cs_n_en, .cs_n_sel, .cs_s_en, .cs_s_sel,
      .out_avail, .cand(), .req_valid(req_valid[p]), .req_port(req_port[p])
    );
  end

  // Flits from the core, or from a neighbor that is under test (they come off
  // its bypass channel), are new traffic for the subnetwork rules.
  always_comb begin
    in_free       = '0;
    in_free[P_L]  = 1'b1;
    in_free[P_N1] = nbr.n;
    in_free[P_N2] = nbr.n;
    in_free[P_S1] = nbr.s;
    in_free[P_S2] = nbr.s;
  end

  assign out_avail = rt_out_ready & ~out_locked;

  crossbar_switch u_xbar (
    .clk, .rst_n, .enable(xb_enable),
    .in_valid(buf_valid), .in_flit(buf_flit), .req_valid, .req_port,
    .in_pop(buf_pop),
    .out_valid(rt_out_valid), .out_flit(rt_out_flit), .out_ready(rt_out_ready),
    .out_locked, .idle(xb_idle)
  );

  test_timer #(.TIMER_W(TIMER_W)) u_timer (
    .clk, .rst_n, .init_value(timer_init), .overflow_value(timer_overflow), .trigger
  );

  assign router_empty = (buf_valid == '0) && xb_idle;
  assign nbr_present  = {X > 0, Y < MESH_Y - 1, X < MESH_X - 1, Y > 0};  // W,S,E,N

  test_controller #(.TEST_CYCLES(TEST_CYCLES)) u_ctrl (
    .clk, .rst_n, .trigger, .top_border(TOP), .nbr_present, .ea_in,
    .router_empty, .bypass_busy,
    .phase, .round, .er, .dns, .cs_en, .cs_sel, .ladder_side, .bypass_port,
    .bypass_on, .xb_enable, .block_new
  );

  always_comb begin
    busy_toward       = '0;
    busy_toward[D_N]  = out_locked[P_N1] || out_locked[P_N2];
    busy_toward[D_S]  = out_locked[P_S1] || out_locked[P_S2];
    busy_toward[D_E]  = out_locked[P_E];
    busy_toward[D_W]  = out_locked[P_W];
  end

  status_propagation u_sync (
    .clk, .rst_n, .sync_in, .er, .dns, .cs_en, .cs_sel, .ladder_side,
    .busy_toward, .sync_out, .nbr, .cs_n_en, .cs_n_sel, .cs_s_en, .cs_s_sel, .ea_in
  );
endmodule
