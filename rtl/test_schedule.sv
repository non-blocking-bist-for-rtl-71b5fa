// test_schedule: four-group testing sequence, as timer settings of one router.
//
// Routers are split into four groups by the parity of their coordinates, so two
// routers of one group are at least two hops apart in both X and Y. Group g =
// x[0] + 2*y[0] owns the g-th quarter (SLOT = INTERVAL/4 cycles) of every test
// interval; inside it the group's routers start one after the other, in
// row-major order from the top-left, STRIDE cycles apart, where STRIDE spreads
// the starts over the slot minus one test length and a margin for the
// Emptying and Recovering phases. Start offset: g*SLOT + index*STRIDE. The timer
// of the router is then loaded with INTERVAL-1-start and overflows at
// INTERVAL-1. Groups in turn, top-left to bottom-right and at most one group
// at a time follow the document; the group order and the spacing formula are
// this design's choices. Purely combinational (constant in a mesh).
module test_schedule
  import altertest_pkg::*;
#(
  parameter int unsigned MESH_X      = 10,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned INTERVAL    = 10000,
  parameter int unsigned TEST_CYCLES = 500,
  parameter int unsigned MARGIN      = 64,
  parameter int unsigned TIMER_W     = 20
) (
  input  coord_t             x,
  input  coord_t             y,
  output logic [TIMER_W-1:0] init_value,
  output logic [TIMER_W-1:0] overflow_value,
  output logic [1:0]         group
);
  localparam int unsigned GX     = (MESH_X + 1) / 2;
  localparam int unsigned NPG    = GX * ((MESH_Y + 1) / 2);
  localparam int unsigned SLOT   = INTERVAL / 4;
  localparam int unsigned STRIDE = (SLOT > TEST_CYCLES + MARGIN) ?
                                   (SLOT - TEST_CYCLES - MARGIN) / NPG : 0;

  logic [TIMER_W-1:0] index, start;

  always_comb begin
    group          = {y[0], x[0]};
    index          = TIMER_W'(y >> 1) * TIMER_W'(GX) + TIMER_W'(x >> 1);
    start          = TIMER_W'(group) * TIMER_W'(SLOT) + index * TIMER_W'(STRIDE);
    overflow_value = TIMER_W'(INTERVAL - 1);
    init_value     = overflow_value - start;
  end
endmodule
