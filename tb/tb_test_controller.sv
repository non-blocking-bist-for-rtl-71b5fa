// tb_test_controller: phase sequence, handshake and round alternation.
//
// Plays the neighbors (EA) and the router (empty, bypass busy), and checks
// that Emptying waits for every present neighbor's EA and for an empty router,
// that Testing lasts TEST_CYCLES cycles, that Recovering waits for EA and an
// idle bypass, and that the bypass port alternates N1/N2 (S1/S2 on the top
// border) with the CS select following it.
module tb_test_controller;
  import altertest_pkg::*;
  localparam int TC = 12;
  logic clk = 0, rst_n = 0;
  logic trigger, top_border, router_empty, bypass_busy;
  logic [NSIDES-1:0] nbr_present, ea_in;
  phase_e phase;
  logic round, er, dns, cs_en, cs_sel, bypass_on, xb_enable, block_new;
  side_e ladder_side;
  port_e bypass_port;
  int checks = 0, failures = 0;

  test_controller #(.TEST_CYCLES(TC)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_phase(input phase_e p, input string what);
    checks++;
    if (phase !== p) begin failures++; $display("FAIL %s: phase %s", what, phase.name()); end
  endtask

  task automatic one_procedure(input logic top, input port_e exp_port);
    int n;
    top_border = top;
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    expect_phase(PH_EMPTYING, "after trigger");
    checks++;
    if (!(er && dns && !cs_en && xb_enable && block_new)) begin failures++; $display("FAIL emptying outputs"); end
    ea_in = 4'b0111; router_empty = 1;      // north neighbor has not answered
    repeat (3) @(negedge clk);
    expect_phase(PH_EMPTYING, "waiting for EA");
    ea_in = 4'b1111; router_empty = 0;
    repeat (2) @(negedge clk);
    expect_phase(PH_EMPTYING, "waiting for empty router");
    router_empty = 1;
    @(negedge clk);
    ea_in = 4'b0000;
    expect_phase(PH_TESTING, "testing");
    checks++;
    if (!(cs_en && dns && !er && bypass_on && !xb_enable && bypass_port == exp_port
          && cs_sel == round && ladder_side == (top ? D_S : D_N))) begin
      failures++; $display("FAIL testing outputs port %s", bypass_port.name());
    end
    n = 0;
    while (phase == PH_TESTING) begin @(negedge clk); n++; end
    checks++;
    if (n != TC) begin failures++; $display("FAIL testing lasted %0d", n); end
    expect_phase(PH_RECOVERING, "recovering");
    checks++;
    if (!(er && dns && !cs_en && bypass_on && block_new)) begin failures++; $display("FAIL recovering outputs"); end
    bypass_busy = 1; ea_in = 4'b1111;
    repeat (3) @(negedge clk);
    expect_phase(PH_RECOVERING, "waiting for bypass");
    bypass_busy = 0;
    @(negedge clk);
    ea_in = 4'b0000;
    expect_phase(PH_NORMAL, "back to normal");
  endtask

  initial begin
    trigger = 0; top_border = 0; router_empty = 1; bypass_busy = 0;
    nbr_present = 4'b1111; ea_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_phase(PH_NORMAL, "reset");
    one_procedure(1'b0, P_N1);
    one_procedure(1'b0, P_N2);
    one_procedure(1'b1, P_S1);
    one_procedure(1'b1, P_S2);
    // a missing neighbor needs no EA
    nbr_present = 4'b1110; top_border = 0;
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    ea_in = 4'b1110;
    repeat (2) @(negedge clk);
    expect_phase(PH_TESTING, "border router emptying");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
