// test_timer: per-router interval timer that starts the test procedure.
//
// The counter is loaded with init_value at reset and counts up by one each
// cycle; when it reaches overflow_value it raises trigger for one cycle and
// restarts from zero. The first test therefore starts overflow_value -
// init_value cycles after reset and the following ones every
// overflow_value + 1 cycles. The overflow and initialization values setting
// the interval and the first start follow the document; the count direction
// and the synchronous load at reset are this design's choices.
module test_timer #(
  parameter int unsigned TIMER_W = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [TIMER_W-1:0] init_value,
  input  logic [TIMER_W-1:0] overflow_value,
  output logic               trigger
);
  logic [TIMER_W-1:0] cnt;

  assign trigger = (cnt == overflow_value);

  always_ff @(posedge clk) begin
    if (!rst_n)       cnt <= init_value;
    else if (trigger) cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end
endmodule
