// tb_crossbar_switch: wormhole allocation and switching.
//
// Small packet sources on several inputs compete for outputs; a model checks
// that each output carries whole packets without interleaving, that all
// flits arrive in order, that back-pressure is respected, that heads are
// granted fairly, and that nothing moves while the crossbar is disabled.
module tb_crossbar_switch;
  import altertest_pkg::*;
  logic clk = 0, rst_n = 0, enable, idle;
  logic  [NPORTS-1:0] in_valid, req_valid, in_pop, out_valid, out_ready, out_locked;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  port_e [NPORTS-1:0] req_port;
  int checks = 0, failures = 0;

  crossbar_switch dut (.*);

  always #5 clk = ~clk;

  // each input i sends packets of LEN flits to output dest[i]; data = {input, seq}
  localparam int LEN = 3, NPKT = 6;
  int sent [NPORTS];
  port_e dest [NPORTS];
  int recv_seq [NPORTS];      // next expected seq per input
  int cur_src [NPORTS];       // per output: input whose packet is in progress, -1 none
  int delivered = 0;
  int first_winner [NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i]  = (sent[i] < NPKT * LEN);
      in_flit[i]   = '0;
      in_flit[i].head = (sent[i] % LEN == 0);
      in_flit[i].tail = (sent[i] % LEN == LEN - 1);
      in_flit[i].data = 32'(i * 1000 + sent[i]);
      req_valid[i] = 1'b1;
      req_port[i]  = dest[i];
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++) if (in_pop[i]) sent[i] <= sent[i] + 1;
    for (int o = 0; o < NPORTS; o++) if (out_valid[o] && out_ready[o]) begin
      int src, seq;
      src = int'(out_flit[o].data) / 1000;
      seq = int'(out_flit[o].data) % 1000;
      checks++;
      if (dest[src] != port_e'(o) || seq != recv_seq[src]
          || (cur_src[o] >= 0 && cur_src[o] != src) || (cur_src[o] < 0 && !out_flit[o].head)) begin
        failures++;
        $display("FAIL output %0d got input %0d seq %0d", o, src, seq);
      end
      if (first_winner[o] < 0) first_winner[o] = src;
      recv_seq[src] = seq + 1;
      cur_src[o] = out_flit[o].tail ? -1 : src;
      delivered++;
    end
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      sent[i] = 0; recv_seq[i] = 0; cur_src[i] = -1; first_winner[i] = -1;
    end
    // L,W,N1,S1 all to E; N2 to S1 (allowed); E to W
    dest[P_L] = P_E; dest[P_W] = P_E; dest[P_N1] = P_E; dest[P_S1] = P_E;
    dest[P_N2] = P_S1; dest[P_E] = P_W; dest[P_S2] = P_N2;
    enable = 0; out_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (delivered != 0) begin failures++; $display("FAIL flits moved while disabled"); end
    enable = 1;
    // random back-pressure
    for (int c = 0; c < 400; c++) begin
      out_ready = 7'($urandom);
      @(negedge clk);
    end
    out_ready = '1;
    repeat (50) @(negedge clk);
    checks++;
    if (delivered != 7 * NPKT * LEN) begin failures++; $display("FAIL delivered %0d", delivered); end
    checks++;
    if (!idle || out_locked != '0) begin failures++; $display("FAIL not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
