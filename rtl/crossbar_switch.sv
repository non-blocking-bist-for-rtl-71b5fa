// crossbar_switch: switch allocation and crossbar of the seven-port router.
//
// Wormhole switching. A head flit whose routing unit has chosen an output asks
// for it; each output has a round-robin arbiter over the inputs asking for it.
// A head is granted only when the output is not held by another packet and the
// downstream buffer is ready, so grant and transfer happen in the same cycle.
// A granted multi-flit packet locks the input to the output until its tail
// passes. Connections that the routing never uses (U-turns, N1<->N2, S1<->S2)
// are absent. When enable is low (the router is under test) no flit moves.
// The allocator, arbiter and lock scheme are this design's choices; the
// document only gives the crossbar and its missing N1-N2 connections.
//
// Interface: in_* are the heads of the input buffers, in_pop pops them;
// out_* drive the output links (valid/ready); out_locked marks outputs held by
// a packet in progress; idle is high when no packet is in progress.
module crossbar_switch
  import altertest_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic  [NPORTS-1:0]       in_valid,
  input  flit_t [NPORTS-1:0]       in_flit,
  input  logic  [NPORTS-1:0]       req_valid,
  input  port_e [NPORTS-1:0]       req_port,
  output logic  [NPORTS-1:0]       in_pop,
  output logic  [NPORTS-1:0]       out_valid,
  output flit_t [NPORTS-1:0]       out_flit,
  input  logic  [NPORTS-1:0]       out_ready,
  output logic  [NPORTS-1:0]       out_locked,
  output logic                     idle
);
  typedef logic [2:0] pidx_t;

  logic  [NPORTS-1:0] in_lock;
  pidx_t [NPORTS-1:0] in_dst;
  logic  [NPORTS-1:0] out_lock;
  pidx_t [NPORTS-1:0] out_owner;
  pidx_t [NPORTS-1:0] rr_ptr;

  logic  [NPORTS-1:0] gnt_any;     // per output: a head was granted
  pidx_t [NPORTS-1:0] gnt_idx;     // per output: granted input
  pidx_t [NPORTS-1:0] sel;         // per output: input driving it
  logic  [NPORTS-1:0] req [NPORTS];  // req[o][i]

  assign out_locked = out_lock;
  assign idle       = (in_lock == '0);

  always_comb begin
    int i;
    i = 0;
    for (int o = 0; o < int'(NPORTS); o++) begin
      for (int j = 0; j < int'(NPORTS); j++)
        req[o][j] = enable && in_valid[j] && in_flit[j].head && !in_lock[j]
                    && req_valid[j] && (int'(req_port[j]) == o)
                    && xb_connected(j, o);
      gnt_any[o] = 1'b0;
      gnt_idx[o] = '0;
      if (!out_lock[o] && out_ready[o]) begin
        for (int k = 0; k < int'(NPORTS); k++) begin
          i = (int'(rr_ptr[o]) + k) % int'(NPORTS);
          if (!gnt_any[o] && req[o][i]) begin
            gnt_any[o] = 1'b1;
            gnt_idx[o] = pidx_t'(i);
          end
        end
      end
    end
  end

  always_comb begin
    in_pop = '0;
    for (int o = 0; o < int'(NPORTS); o++) begin
      sel[o]       = out_lock[o] ? out_owner[o] : gnt_idx[o];
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = enable && (gnt_any[o] || (out_lock[o] && in_valid[out_owner[o]]));
      if (out_valid[o] && out_ready[o]) in_pop[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_lock   <= '0;
      in_dst    <= '0;
      out_lock  <= '0;
      out_owner <= '0;
      rr_ptr    <= '0;
    end else begin
      for (int o = 0; o < int'(NPORTS); o++) begin
        if (gnt_any[o]) begin
          rr_ptr[o] <= (gnt_idx[o] == pidx_t'(NPORTS-1)) ? '0 : gnt_idx[o] + 1'b1;
          if (!in_flit[gnt_idx[o]].tail) begin
            out_lock[o]             <= 1'b1;
            out_owner[o]            <= gnt_idx[o];
            in_lock[gnt_idx[o]]     <= 1'b1;
            in_dst[gnt_idx[o]]      <= pidx_t'(o);
          end
        end else if (out_lock[o] && out_valid[o] && out_ready[o] && in_flit[out_owner[o]].tail) begin
          out_lock[o]           <= 1'b0;
          in_lock[out_owner[o]] <= 1'b0;
        end
      end
    end
  end

  // A locked input only ever feeds the output it holds.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     in_lock[i] |-> (out_lock[in_dst[i]] && out_owner[in_dst[i]] == pidx_t'(i)))
      else $error("crossbar_switch: lock tables disagree");
  end
endmodule
