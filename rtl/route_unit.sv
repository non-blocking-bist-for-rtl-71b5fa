// route_unit: AlterTest fully adaptive routing for the head flit of one input.
//
// The network is split into two subnetworks to stay deadlock free:
//   A = eastward channel + N1/S1 pair, carries E, NE and SE-bound packets;
//   B = westward channel + N2/S2 pair, carries W, NW, SW, N and S-bound packets.
// A packet may move from B to A once and never back, except that a packet
// whose destination lies on the west border may turn into N2/S2 after using
// the eastward channel (left-border rule). Diagonal packets move adaptively
// towards the diagonal neighbor of their destination and finish with one Y
// hop and one X hop (YX); they never line up with the destination early.
//
// The status of the eight surrounding routers (nbr) tells which of them are
// under test (RUT). No packet is sent into a RUT. A packet for a RUT's core is
// steered to the RUT's ladder router (north neighbor, or south neighbor for a
// RUT on the top border), which hands it over on the N1/N2 (S1/S2) channel
// selected by the RUT's CS signal, only while that bypass is connected.
// When every minimal move is blocked, the packet detours: a pure X packet steps
// north (south on the top row) within its subnetwork, a pure Y packet steps
// west (east on the west border). A last-resort fallback picks any free
// direction; the document gives no rule for that case.
//
// Interface: purely combinational. cand is the set of allowed output ports,
// req_port the chosen one (first allowed port that is free in out_avail,
// in the order N1,N2,S1,S2,E,W,L, i.e. Y moves first), req_valid = |cand.
// A head with an empty cand (waiting for a bypass) is simply held.
module route_unit
  import altertest_pkg::*;
#(
  parameter int unsigned MESH_X = 10,
  parameter int unsigned MESH_Y = 8
) (
  input  coord_t            cur_x,
  input  coord_t            cur_y,
  input  coord_t            dst_x,
  input  coord_t            dst_y,
  input  port_e             in_port,
  input  logic              in_free,   // injected traffic: core or a RUT's bypass
  input  nbr_status_t       nbr,
  input  logic              cs_n_en,   // north neighbor's bypass connected to me
  input  logic              cs_n_sel,
  input  logic              cs_s_en,   // south neighbor's bypass connected to me
  input  logic              cs_s_sel,
  input  logic [NPORTS-1:0] out_avail,
  output logic [NPORTS-1:0] cand,
  output logic              req_valid,
  output port_e             req_port
);

  function automatic logic rut_at(input nbr_status_t s, input int ox, input int oy);
    // oy < 0 is north
    if (ox == 0  && oy == -1) return s.n;
    if (ox == 0  && oy == 1)  return s.s;
    if (ox == 1  && oy == 0)  return s.e;
    if (ox == -1 && oy == 0)  return s.w;
    if (ox == 1  && oy == -1) return s.ne;
    if (ox == -1 && oy == -1) return s.nw;
    if (ox == 1  && oy == 1)  return s.se;
    if (ox == -1 && oy == 1)  return s.sw;
    return 1'b0;
  endfunction

  function automatic int sgn(input int v);
    return (v > 0) ? 1 : ((v < 0) ? -1 : 0);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Ports that exist at this position, are not a RUT and can be reached from in_port.
  function automatic logic [NPORTS-1:0] usable(input int cx, input int cy,
                                               input nbr_status_t s, input port_e ip);
    logic [NPORTS-1:0] u;
    u = '0;
    u[P_E]  = (cx < int'(MESH_X) - 1) && !s.e;
    u[P_W]  = (cx > 0) && !s.w;
    u[P_N1] = (cy > 0) && !s.n;
    u[P_N2] = (cy > 0) && !s.n;
    u[P_S1] = (cy < int'(MESH_Y) - 1) && !s.s;
    u[P_S2] = (cy < int'(MESH_Y) - 1) && !s.s;
    for (int p = 0; p < int'(NPORTS); p++)
      if (!xb_connected(int'(ip), p)) u[p] = 1'b0;
    return u;
  endfunction

  always_comb begin
    int cx, cy, dxr, dyr, tx, ty, dx, dy, adx, ady;
    logic dst_rut, in_a, allow_b, pair_b, x_ok, y_ok, x_pref, y_pref, diag_rut;
    port_e xport, yport;
    logic [NPORTS-1:0] use_ok, lvl;
    port_e order [NPORTS];
    logic found;

    cx  = int'(cur_x);
    cy  = int'(cur_y);
    dxr = int'(dst_x) - cx;
    dyr = int'(dst_y) - cy;
    dst_rut = rut_at(nbr, dxr, dyr);
    cand    = '0;
    use_ok  = usable(cx, cy, nbr, in_port);
    tx = int'(dst_x);
    ty = int'(dst_y);
    dx = 0; dy = 0; adx = 0; ady = 0;
    in_a = 1'b0; allow_b = 1'b1; pair_b = 1'b0; x_ok = 1'b0; y_ok = 1'b0;
    x_pref = 1'b0; y_pref = 1'b0; diag_rut = 1'b0;
    xport = P_E; yport = P_N1; lvl = '0;

    if (dxr == 0 && dyr == 0) begin
      cand[P_L] = 1'b1;
    end else if (dst_rut && dxr == 0 && dyr == 1) begin
      // I am the ladder router of the RUT south of me
      if (cs_s_en) cand[cs_s_sel ? P_S2 : P_S1] = 1'b1;
    end else if (dst_rut && dxr == 0 && dyr == -1 && dst_y == '0) begin
      // RUT on the top border: I am its ladder router
      if (cs_n_en) cand[cs_n_sel ? P_N2 : P_N1] = 1'b1;
    end else begin
      if (dst_rut) ty = (dst_y == '0) ? 1 : int'(dst_y) - 1;  // go to the ladder
      dx  = tx - cx;
      dy  = ty - cy;
      adx = iabs(dx);
      ady = iabs(dy);
      in_a    = !in_free && (in_port == P_W || in_port == P_N1 || in_port == P_S1);
      allow_b = !in_a || (tx == 0);
      pair_b  = allow_b && (dx < 0 || (dx == 0 && !in_a));
      xport   = (dx > 0) ? P_E : P_W;
      yport   = (dy > 0) ? (pair_b ? P_S2 : P_S1) : (pair_b ? P_N2 : P_N1);
      diag_rut = rut_at(nbr, sgn(dx), sgn(dy));
      x_ok = (dx != 0) && (dx > 0 || allow_b) && use_ok[xport]
             && !(adx == 1 && dy != 0 && diag_rut);
      y_ok = (dy != 0) && use_ok[yport]
             && !(ady == 1 && dx != 0 && diag_rut);
      if (dx != 0 && dy != 0) begin
        x_pref = (adx > 1) || (ady == 1);
        y_pref = (ady > 1) || (adx == 1);
      end else begin
        x_pref = 1'b1;
        y_pref = 1'b1;
      end
      // 1: minimal moves that keep the packet off the destination's row/column
      lvl[xport] = x_ok && x_pref;
      lvl[yport] = lvl[yport] | (y_ok && y_pref);
      // 2: any minimal move
      if (lvl == '0) begin
        lvl[xport] = x_ok;
        lvl[yport] = lvl[yport] | y_ok;
      end
      // 3: detour around a RUT that blocks a straight path
      if (lvl == '0 && dy == 0) begin
        if (dx > 0 || !allow_b) begin
          if (use_ok[P_N1]) lvl[P_N1] = 1'b1;
          else              lvl[P_S1] = use_ok[P_S1];
        end else begin
          if (use_ok[P_N2]) lvl[P_N2] = 1'b1;
          else              lvl[P_S2] = use_ok[P_S2];
        end
      end
      if (lvl == '0 && dx == 0) begin
        if (allow_b && use_ok[P_W]) lvl[P_W] = 1'b1;
        else                        lvl[P_E] = use_ok[P_E];
      end
      // 4: last resort
      if (lvl == '0) lvl = use_ok;
      cand = lvl;
    end

    order = '{P_N1, P_N2, P_S1, P_S2, P_E, P_W, P_L};
    req_port = P_L;
    found    = 1'b0;
    for (int k = 0; k < int'(NPORTS); k++)
      if (!found && cand[order[k]] && out_avail[order[k]]) begin
        req_port = order[k];
        found    = 1'b1;
      end
    for (int k = 0; k < int'(NPORTS); k++)
      if (!found && cand[order[k]]) begin
        req_port = order[k];
        found    = 1'b1;
      end
    req_valid = |cand;
  end

endmodule
