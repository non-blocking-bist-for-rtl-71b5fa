// tb_altertest_router: one router at the center of a 3x3 mesh, neighbors modeled.
//
// The testbench plays the eight surrounding routers: it sinks every output
// link, drives flits into chosen input links, answers ER with EA and sets
// their status bundles. It checks the one-cycle switch latency, routing in both
// subnetworks, the detour decided from a neighbor's DNS, INS forwarding, and
// two complete test procedures: isolation, the bypass on N1 then N2 with CS,
// the Testing length, and the return to normal operation.
module tb_altertest_router;
  import altertest_pkg::*;
  localparam int TC = 30;

  logic clk = 0, rst_n = 0;
  logic [19:0] timer_init, timer_overflow;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  sync_t [NSIDES-1:0] sync_in, sync_out;
  phase_e phase;
  logic round;
  logic auto_ea;
  int checks = 0, failures = 0;

  altertest_router #(.MESH_X(3), .MESH_Y(3), .X(1), .Y(1), .BUF_DEPTH(4),
                     .TEST_CYCLES(TC), .TIMER_W(20)) dut (.*);

  always #5 clk = ~clk;

  // neighbors answer ER with EA one cycle later
  always @(posedge clk)
    if (auto_ea) for (int d = 0; d < NSIDES; d++) sync_in[d].ea <= sync_out[d].er;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic flit_t mk(input logic h, input logic t, input int dx, input int dy, input int d);
    flit_t f;
    f.head = h; f.tail = t; f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy); f.data = 32'(d);
    return f;
  endfunction

  // drive one flit on input port p (at negedge), return after it is accepted
  task automatic send(input port_e p, input flit_t f);
    in_valid[p] = 1; in_flit[p] = f;
    do @(posedge clk); while (!in_ready[p]);
    @(negedge clk);
    in_valid[p] = 0;
  endtask

  // wait up to n cycles for flit data d on output port p; returns cycles waited
  task automatic expect_out(input port_e p, input int d, input int n, input string what, output int waited);
    waited = -1;
    for (int c = 0; c < n; c++) begin
      if (out_valid[p] && out_ready[p] && out_flit[p].data == 32'(d)) begin waited = c; break; end
      @(negedge clk);
    end
    chk(waited >= 0, what);
    if (waited >= 0) @(negedge clk);
  endtask

  logic [NPORTS-1:0] seen_valid;
  always @(posedge clk) seen_valid <= seen_valid | out_valid;

  initial begin
    int w, n;
    timer_init = 20'd0; timer_overflow = 20'd399;   // first test after 399 cycles
    in_valid = '0; in_flit = '0; out_ready = '1; sync_in = '0; auto_ea = 1; seen_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // L -> east neighbor (2,1): enters the buffer, crosses in the next cycle
    in_valid[P_L] = 1; in_flit[P_L] = mk(1, 1, 2, 1, 11);
    @(negedge clk); in_valid[P_L] = 0;
    expect_out(P_E, 11, 4, "L to E", w);
    chk(w == 0, "one-cycle switch latency");
    // from the west to my core
    send(P_W, mk(1, 1, 1, 1, 12));
    expect_out(P_L, 12, 4, "W to L", w);
    // subnetwork B: a southbound packet from the north on N2 leaves on S2
    in_valid[P_N2] = 1; in_flit[P_N2] = mk(1, 0, 1, 2, 13);
    @(negedge clk); in_flit[P_N2] = mk(0, 1, 1, 2, 14);
    expect_out(P_S2, 13, 4, "N2 to S2 head", w);
    in_valid[P_N2] = 0;
    expect_out(P_S2, 14, 4, "N2 to S2 tail", w);
    // subnetwork A: a southbound packet on N1 stays on S1
    send(P_N1, mk(1, 1, 1, 2, 15));
    expect_out(P_S1, 15, 4, "N1 to S1", w);
    // east neighbor under test: a packet for it goes north towards its ladder
    sync_in[D_E].dns = 1;
    @(negedge clk);
    send(P_L, mk(1, 1, 2, 1, 16));
    expect_out(P_N1, 16, 4, "detour around RUT to its ladder", w);
    chk(!sync_out[D_E].ins_n, "no INS without a north RUT");
    sync_in[D_E].dns = 0; sync_in[D_N].dns = 1;
    @(negedge clk);
    chk(sync_out[D_E].ins_n && sync_out[D_W].ins_n, "INS forwarded east and west");
    sync_in[D_N].dns = 0;
    // two test procedures
    for (int rnd = 0; rnd < 2; rnd++) begin
      port_e bp;
      bp = rnd ? P_N2 : P_N1;
      while (phase != PH_EMPTYING) @(negedge clk);
      chk(round == rnd[0], "round");
      repeat (2) @(negedge clk);
      chk(sync_out[D_N].er && sync_out[D_S].dns && sync_out[D_W].er, "ER/DNS sent");
      while (phase == PH_EMPTYING) @(negedge clk);
      chk(phase == PH_TESTING, "testing reached");
      @(negedge clk);
      chk(sync_out[D_N].cs_en && sync_out[D_N].cs_sel == rnd[0] && !sync_out[D_S].cs_en, "CS to the ladder");
      seen_valid = '0;
      // core -> bypass -> ladder
      in_valid[P_L] = 1; in_flit[P_L] = mk(1, 1, 0, 0, 20 + rnd);
      #1;
      chk(out_valid[bp] && out_flit[bp].data == 32'(20 + rnd) && in_ready[P_L], "core to bypass port");
      @(negedge clk); in_valid[P_L] = 0;
      // ladder -> bypass -> core
      in_valid[bp] = 1; in_flit[bp] = mk(1, 1, 1, 1, 30 + rnd);
      #1;
      chk(out_valid[P_L] && out_flit[P_L].data == 32'(30 + rnd), "bypass port to core");
      @(negedge clk); in_valid[bp] = 0;
      // isolated: other inputs refuse data
      chk(!in_ready[P_E] && !in_ready[P_W] && !in_ready[P_S1], "isolated inputs");
      n = 3;   // cycles of Testing already spent above
      while (phase == PH_TESTING) begin @(negedge clk); n++; end
      chk(n == TC, $sformatf("testing lasted %0d cycles", n));
      chk((seen_valid & ~((7'(1) << bp) | 7'(1))) == '0, "no traffic on other ports");
      while (phase != PH_NORMAL) @(negedge clk);
    end
    // back in normal operation
    send(P_L, mk(1, 1, 0, 1, 40));
    expect_out(P_W, 40, 4, "normal operation after tests", w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
