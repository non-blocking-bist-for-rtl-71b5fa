// tb_route_unit: directed and random checks of the AlterTest routing unit.
//
// Directed cases on a 10x8 mesh cover the fault-free subnetwork choice, the
// YX finish of diagonal packets, the detours around a router under test, the
// retargeting of packets for a router under test to its ladder router, the
// ladder hand-over on the CS-selected channel and the left-border rule. A
// random phase checks, with no router under test, that every choice is a
// minimal move inside the mesh on the right subnetwork.
module tb_route_unit;
  import altertest_pkg::*;

  localparam int MX = 10, MY = 8;

  coord_t cur_x, cur_y, dst_x, dst_y;
  port_e in_port;
  logic in_free, cs_n_en, cs_n_sel, cs_s_en, cs_s_sel, req_valid;
  nbr_status_t nbr;
  logic [NPORTS-1:0] out_avail, cand;
  port_e req_port;
  int checks = 0, failures = 0;

  route_unit #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  function automatic logic [NPORTS-1:0] pm(input port_e a, input port_e b = P_L, input logic two = 1'b0);
    logic [NPORTS-1:0] m;
    m = '0;
    m[a] = 1'b1;
    if (two) m[b] = 1'b1;
    return m;
  endfunction

  task automatic tcase(input string name, input int cx, input int cy, input int dx, input int dy,
                       input port_e ip, input logic [NPORTS-1:0] exp);
    cur_x = coord_t'(cx); cur_y = coord_t'(cy); dst_x = coord_t'(dx); dst_y = coord_t'(dy);
    in_port = ip;
    in_free = (ip == P_L);
    #1;
    checks++;
    if (cand !== exp || req_valid !== (exp != '0)) begin
      failures++;
      $display("FAIL %s: cand=%b expected %b", name, cand, exp);
    end
  endtask

  initial begin
    nbr = '0; cs_n_en = 0; cs_n_sel = 0; cs_s_en = 0; cs_s_sel = 0; out_avail = '1;
    // fault free
    tcase("east",      4, 4, 7, 4, P_L, pm(P_E));
    tcase("west",      4, 4, 1, 4, P_L, pm(P_W));
    tcase("south",     4, 4, 4, 7, P_L, pm(P_S2));
    tcase("north",     4, 4, 4, 1, P_L, pm(P_N2));
    tcase("southeast", 4, 4, 7, 7, P_L, pm(P_E, P_S1, 1));
    tcase("northwest", 4, 4, 2, 1, P_L, pm(P_W, P_N2, 1));
    tcase("diag-nbr",  4, 4, 5, 5, P_L, pm(P_E, P_S1, 1));
    checks++; if (req_port !== P_S1) begin failures++; $display("FAIL YX preference"); end
    out_avail[P_S1] = 1'b0; #1;
    checks++; if (req_port !== P_E) begin failures++; $display("FAIL adaptive pick"); end
    out_avail = '1;
    tcase("column-first", 4, 4, 5, 7, P_L, pm(P_S1));
    tcase("row-first",    4, 4, 7, 5, P_L, pm(P_E));
    tcase("subnetA-S",    4, 4, 4, 7, P_N1, pm(P_S1));
    tcase("subnetA-NE",   4, 4, 7, 2, P_W, pm(P_E, P_N1, 1));
    // rule 4: destination on the west border, packet in subnetwork A
    tcase("left-border",  1, 4, 0, 7, P_W, pm(P_S2));
    // routers under test around
    nbr = '0; nbr.e = 1;
    tcase("detour-E",     4, 4, 7, 4, P_L, pm(P_N1));
    tcase("detour-E-top", 4, 0, 7, 0, P_L, pm(P_S1));
    tcase("row-first-blocked", 4, 4, 7, 5, P_L, pm(P_S1));
    tcase("to-RUT-east",  4, 4, 5, 4, P_L, pm(P_N1));
    nbr = '0; nbr.s = 1;
    tcase("detour-S",     4, 4, 4, 7, P_L, pm(P_W));
    tcase("detour-S-left",0, 4, 0, 7, P_L, pm(P_E));
    // ladder hand-over (RUT south of me)
    tcase("ladder-wait",  4, 4, 4, 5, P_W, '0);
    cs_s_en = 1; cs_s_sel = 1;
    tcase("ladder-S2",    4, 4, 4, 5, P_W, pm(P_S2));
    cs_s_sel = 0;
    tcase("ladder-S1",    4, 4, 4, 5, P_W, pm(P_S1));
    cs_s_en = 0;
    // RUT on the top border, I am below it
    nbr = '0; nbr.n = 1; cs_n_en = 1; cs_n_sel = 1;
    tcase("ladder-top",   4, 1, 4, 0, P_E, pm(P_N2));
    cs_n_en = 0;
    // diagonal RUT makes an early alignment a dead end
    nbr = '0; nbr.se = 1;
    tcase("no-align-into-RUT", 4, 4, 5, 7, P_W, pm(P_S1));
    nbr = '0; nbr.ne = 1;
    tcase("to-RUT-NE", 4, 4, 5, 3, P_L, pm(P_N1));

    // random, no router under test: minimal moves, in-mesh, subnetwork rules
    nbr = '0;
    for (int n = 0; n < 4000; n++) begin
      int cx, cy, dx, dy;
      logic [NPORTS-1:0] ok;
      cx = $urandom_range(MX-1); cy = $urandom_range(MY-1);
      dx = $urandom_range(MX-1); dy = $urandom_range(MY-1);
      cur_x = coord_t'(cx); cur_y = coord_t'(cy); dst_x = coord_t'(dx); dst_y = coord_t'(dy);
      in_port = P_L; in_free = 1;
      #1;
      ok = '0;
      if (dx == cx && dy == cy) ok[P_L] = 1;
      if (dx > cx) begin ok[P_E] = 1; if (dy > cy) ok[P_S1] = 1; if (dy < cy) ok[P_N1] = 1; end
      if (dx < cx) begin ok[P_W] = 1; if (dy > cy) ok[P_S2] = 1; if (dy < cy) ok[P_N2] = 1; end
      if (dx == cx) begin if (dy > cy) ok[P_S2] = 1; if (dy < cy) ok[P_N2] = 1; end
      checks++;
      if (cx == dx && cy == dy) begin
        if (cand != pm(P_L)) begin failures++; $display("FAIL self route"); end
      end else if (cand == '0 || (cand & ~ok) != '0 || !cand[req_port]) begin
        failures++;
        $display("FAIL random (%0d,%0d)->(%0d,%0d) cand=%b ok=%b", cx, cy, dx, dy, cand, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
