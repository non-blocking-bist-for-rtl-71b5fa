// tb_test_timer: checks the first trigger time and the period of the test timer.
module tb_test_timer;
  logic clk = 0, rst_n = 0, trigger;
  logic [19:0] init_value, overflow_value;
  int checks = 0, failures = 0;
  int cyc = 0;
  int trig_cycles[$];

  test_timer #(.TIMER_W(20)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (trigger) trig_cycles.push_back(cyc);
    cyc++;
  end

  initial begin
    init_value = 20'd93; overflow_value = 20'd99;  // first after 6 cycles, then every 100
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (420) @(posedge clk);
    checks++;
    if (trig_cycles.size() != 5) begin
      failures++; $display("FAIL trigger count %0d", trig_cycles.size());
    end
    for (int k = 0; k < trig_cycles.size() && k < 5; k++) begin
      checks++;
      if (trig_cycles[k] != 6 + 100 * k) begin
        failures++; $display("FAIL trigger %0d at %0d", k, trig_cycles[k]);
      end
    end
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
