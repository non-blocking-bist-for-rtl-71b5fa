// test_controller: test state machine of one router.
//
// A test procedure runs through four phases:
//   Normal     - crossbar in use; waits for the timer trigger.
//   Emptying   - ER and DNS raised; the router keeps forwarding what it holds
//                but the core starts no new packet, and neighbors stop sending
//                new packets to it. Ends when every neighbor has answered EA,
//                the buffers are empty and no packet is in progress.
//   Testing    - the router is isolated and the bypass channel links the core
//                to the ladder router; CS tells the ladder which channel of the
//                pair to use. Lasts TEST_CYCLES cycles (the BIST run).
//   Recovering - bypass still connected but no new packet uses it; ER raised
//                again; ends when neighbors answer EA and the bypass is idle.
// Procedures alternate between round 0 (bypass on N1, or S1 for a router on the
// top border) and round 1 (N2 or S2), so two procedures test the whole router.
// The phases, the ER/EA handshake and the alternation follow the document; the
// exit conditions and a fixed-length Testing phase are this design's choices.
// All outputs are decoded from registers.
module test_controller
  import altertest_pkg::*;
#(
  parameter int unsigned TEST_CYCLES = 500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  input  logic              top_border,
  input  logic [NSIDES-1:0] nbr_present,
  input  logic [NSIDES-1:0] ea_in,
  input  logic              router_empty,
  input  logic              bypass_busy,
  output phase_e            phase,
  output logic              round,
  output logic              er,
  output logic              dns,
  output logic              cs_en,
  output logic              cs_sel,
  output side_e             ladder_side,
  output port_e             bypass_port,
  output logic              bypass_on,
  output logic              xb_enable,
  output logic              block_new
);
  localparam int unsigned CW = $clog2(TEST_CYCLES + 1);

  logic [CW-1:0] cnt;
  logic          all_ea;

  assign all_ea      = &(ea_in | ~nbr_present);
  assign er          = (phase == PH_EMPTYING) || (phase == PH_RECOVERING);
  assign dns         = (phase != PH_NORMAL);
  assign cs_en       = (phase == PH_TESTING);
  assign cs_sel      = round;
  assign ladder_side = top_border ? D_S : D_N;
  assign bypass_port = top_border ? (round ? P_S2 : P_S1) : (round ? P_N2 : P_N1);
  assign bypass_on   = (phase == PH_TESTING) || (phase == PH_RECOVERING);
  assign xb_enable   = (phase == PH_NORMAL) || (phase == PH_EMPTYING);
  assign block_new   = (phase == PH_EMPTYING) || (phase == PH_RECOVERING);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_NORMAL;
      round <= 1'b0;
      cnt   <= '0;
    end else begin
      unique case (phase)
        PH_NORMAL:
          if (trigger) phase <= PH_EMPTYING;
        PH_EMPTYING:
          if (all_ea && router_empty && !bypass_busy) begin
            phase <= PH_TESTING;
            cnt   <= '0;
          end
        PH_TESTING:
          if (cnt == CW'(TEST_CYCLES - 1)) phase <= PH_RECOVERING;
          else                             cnt   <= cnt + 1'b1;
        PH_RECOVERING:
          if (all_ea && !bypass_busy) begin
            phase <= PH_NORMAL;
            round <= !round;
          end
      endcase
    end
  end
endmodule
