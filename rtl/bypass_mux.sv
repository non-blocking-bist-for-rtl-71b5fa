// bypass_mux: the bypass channel and the isolating multiplexers of a router.
//
// In normal operation every external link is passed straight to the router's
// input buffers and crossbar. When the router is under test (bypass_on), the
// router is cut off from all links and the core's local port is connected
// through the bypass channel to one Y-dimension port (bypass_port: N1 or N2,
// S1 or S2 on the top border), which leads to the ladder router: core flits
// leave on that port's output link and flits arriving on that port's input link
// go to the core. All other outputs are silent and all other inputs refuse data.
//
// block_new stops the core from starting a new packet (Emptying and Recovering
// phases) while letting a packet already under way finish; busy reports a
// packet partly across the local inject or eject interface, so that the
// controller only switches the path between packets.
// The path choice follows the document; the handshake and the packet tracking
// are this design's.
module bypass_mux
  import altertest_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bypass_on,
  input  port_e                bypass_port,
  input  logic                 block_new,
  // external side (index P_L is the core: inject in, eject out)
  input  logic  [NPORTS-1:0]   ext_in_valid,
  input  flit_t [NPORTS-1:0]   ext_in_flit,
  output logic  [NPORTS-1:0]   ext_in_ready,
  output logic  [NPORTS-1:0]   ext_out_valid,
  output flit_t [NPORTS-1:0]   ext_out_flit,
  input  logic  [NPORTS-1:0]   ext_out_ready,
  // router side
  output logic  [NPORTS-1:0]   rt_in_valid,
  output flit_t [NPORTS-1:0]   rt_in_flit,
  input  logic  [NPORTS-1:0]   rt_in_ready,
  input  logic  [NPORTS-1:0]   rt_out_valid,
  input  flit_t [NPORTS-1:0]   rt_out_flit,
  output logic  [NPORTS-1:0]   rt_out_ready,
  output logic                 busy
);
  logic inj_worm, ej_worm;   // packet partly injected / ejected
  logic inj_go;              // the core may present its current flit

  assign inj_go = inj_worm || !block_new;
  assign busy   = inj_worm || ej_worm;

  always_comb begin
    rt_in_flit    = ext_in_flit;
    ext_out_flit  = rt_out_flit;
    rt_in_valid   = ext_in_valid;
    ext_in_ready  = rt_in_ready;
    ext_out_valid = rt_out_valid;
    rt_out_ready  = ext_out_ready;
    rt_in_valid[P_L]  = ext_in_valid[P_L] && inj_go;
    ext_in_ready[P_L] = rt_in_ready[P_L] && inj_go;
    if (bypass_on) begin
      rt_in_valid   = '0;
      rt_out_ready  = '0;
      ext_in_ready  = '0;
      ext_out_valid = '0;
      // core -> bypass port
      ext_out_valid[bypass_port] = ext_in_valid[P_L] && inj_go;
      ext_out_flit[bypass_port]  = ext_in_flit[P_L];
      ext_in_ready[P_L]          = ext_out_ready[bypass_port] && inj_go;
      // bypass port -> core
      ext_out_valid[P_L]         = ext_in_valid[bypass_port];
      ext_out_flit[P_L]          = ext_in_flit[bypass_port];
      ext_in_ready[bypass_port]  = ext_out_ready[P_L];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_worm <= 1'b0;
      ej_worm  <= 1'b0;
    end else begin
      if (ext_in_valid[P_L] && ext_in_ready[P_L])
        inj_worm <= !ext_in_flit[P_L].tail;
      if (ext_out_valid[P_L] && ext_out_ready[P_L])
        ej_worm <= !ext_out_flit[P_L].tail;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   bypass_on |-> (bypass_port inside {P_N1, P_N2, P_S1, P_S2}))
    else $error("bypass_mux: bypass must use a Y-dimension port");
endmodule
