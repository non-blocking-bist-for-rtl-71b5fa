// tb_bypass_mux: normal pass-through, bypass paths, isolation and new-packet blocking.
module tb_bypass_mux;
  import altertest_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bypass_on, block_new, busy;
  port_e bypass_port;
  logic  [NPORTS-1:0] ext_in_valid, ext_in_ready, ext_out_valid, ext_out_ready;
  flit_t [NPORTS-1:0] ext_in_flit, ext_out_flit;
  logic  [NPORTS-1:0] rt_in_valid, rt_in_ready, rt_out_valid, rt_out_ready;
  flit_t [NPORTS-1:0] rt_in_flit, rt_out_flit;
  int checks = 0, failures = 0;

  bypass_mux dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic flit_t mk(input logic h, input logic t, input int d);
    flit_t f;
    f = '0; f.head = h; f.tail = t; f.data = 32'(d);
    return f;
  endfunction

  initial begin
    bypass_on = 0; block_new = 0; bypass_port = P_N1;
    ext_in_valid = '0; ext_out_ready = '0; rt_in_ready = '1; rt_out_valid = '0;
    for (int p = 0; p < NPORTS; p++) begin
      ext_in_flit[p] = mk(1, 1, 100 + p);
      rt_out_flit[p] = mk(1, 1, 200 + p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // normal: straight through
    ext_in_valid = '1; rt_out_valid = '1; ext_out_ready = '1;
    #1;
    chk(rt_in_valid == '1 && ext_out_valid == '1 && ext_in_ready == '1 && rt_out_ready == '1, "normal pass");
    chk(rt_in_flit[P_E].data == 101 && ext_out_flit[P_S2].data == 206, "normal data");
    // bypass on N2: core <-> N2 only
    bypass_on = 1; bypass_port = P_N2;
    #1;
    chk(rt_in_valid == '0 && rt_out_ready == '0, "router isolated");
    chk(ext_out_valid == ((7'(1) << P_N2) | 7'(1)), "only N2 and L outputs active");
    chk(ext_out_flit[P_N2].data == 100 && ext_out_flit[P_L].data == 104, "bypass data");
    chk(ext_in_ready == ((7'(1) << P_N2) | 7'(1)), "only N2 and L inputs ready");
    ext_out_ready[P_L] = 0;
    #1;
    chk(!ext_in_ready[P_N2], "eject back-pressure");
    ext_out_ready[P_L] = 1;
    // a two-flit packet from the core, block_new raised after its head
    ext_in_valid = '0; ext_in_valid[P_L] = 1; ext_in_flit[P_L] = mk(1, 0, 1);
    @(negedge clk);
    chk(busy, "busy during packet");
    block_new = 1; ext_in_flit[P_L] = mk(0, 1, 2);
    #1;
    chk(ext_out_valid[P_N2] && ext_in_ready[P_L], "tail passes while blocked");
    @(negedge clk);
    chk(!busy, "idle after tail");
    ext_in_flit[P_L] = mk(1, 1, 3);
    #1;
    chk(!ext_out_valid[P_N2] && !ext_in_ready[P_L], "new packet blocked");
    // normal mode with block_new: local injection held, others pass
    bypass_on = 0;
    #1;
    chk(!rt_in_valid[P_L] && !ext_in_ready[P_L], "local inject blocked in emptying");
    block_new = 0;
    #1;
    chk(rt_in_valid[P_L] && ext_in_ready[P_L], "local inject resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
