// noc_traffic: core models and scoreboard for end-to-end tests of the mesh.
//
// Every core injects packets of 1..4 flits to random other cores at a rate of
// about one packet every RATE cycles for INJ_CYCLES cycles, then stops, and
// always accepts ejected flits except for random short stalls. Each flit
// carries {source, sequence, flit index}. The scoreboard checks that every
// packet arrives once, at the right core, whole and in order. It also counts
// how often the test mechanisms show up at the core ports: packets ejected to
// and injected from a core whose router is under test (bypass channel), and
// injection stalls while the core's router empties or recovers.
module noc_traffic
  import altertest_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned INJ_CYCLES = 2000,
  parameter int unsigned RATE       = 40,
  localparam int unsigned NR        = MESH_X * MESH_Y
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic  [NR-1:0]      inj_valid,
  output flit_t [NR-1:0]      inj_flit,
  input  logic  [NR-1:0]      inj_ready,
  input  logic  [NR-1:0]      ej_valid,
  input  flit_t [NR-1:0]      ej_flit,
  output logic  [NR-1:0]      ej_ready,
  input  phase_e [NR-1:0]     phase,
  output int                  checks,
  output int                  failures,
  output int                  outstanding,
  output int                  sent_pkts,
  output int                  ej_bypass,
  output int                  inj_bypass,
  output int                  inj_stall
);
  int cycle;
  int len   [NR];
  int idx   [NR];
  int seq   [NR];
  int dst   [NR];
  int ej_src[NR];
  int ej_idx[NR];
  int ej_seq[NR];
  int pend  [int];    // key src<<16|seq -> destination*8 + length

  function automatic flit_t mkflit(input int s, input int sq, input int i, input int l, input int d);
    flit_t f;
    f.head  = (i == 0);
    f.tail  = (i == l - 1);
    f.dst_x = coord_t'(d % int'(MESH_X));
    f.dst_y = coord_t'(d / int'(MESH_X));
    f.data  = {8'(s), 16'(sq), 8'(i)};
    return f;
  endfunction

  always_comb
    for (int r = 0; r < int'(NR); r++) begin
      inj_valid[r] = (len[r] > 0);
      inj_flit[r]  = mkflit(r, seq[r], idx[r], (len[r] > 0) ? len[r] : 1, dst[r]);
    end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle = 0; checks = 0; failures = 0; outstanding = 0; sent_pkts = 0;
      ej_bypass = 0; inj_bypass = 0; inj_stall = 0;
      for (int r = 0; r < int'(NR); r++) begin
        len[r] <= 0; idx[r] <= 0; seq[r] <= 0; dst[r] <= 0; ej_src[r] = -1;
        ej_idx[r] = 0; ej_seq[r] = 0; ej_ready[r] = 1'b1;
      end
    end else begin
      cycle++;
      for (int r = 0; r < int'(NR); r++) begin
        // ejection
        if (ej_valid[r] && ej_ready[r]) begin
          int s, sq, i;
          s  = int'(ej_flit[r].data[31:24]);
          sq = int'(ej_flit[r].data[23:8]);
          i  = int'(ej_flit[r].data[7:0]);
          checks++;
          if (int'(ej_flit[r].dst_x) + int'(ej_flit[r].dst_y) * int'(MESH_X) != r
              || (ej_src[r] < 0 && (!ej_flit[r].head || i != 0))
              || (ej_src[r] >= 0 && (s != ej_src[r] || sq != ej_seq[r] || i != ej_idx[r] + 1))) begin
            failures++;
            $display("FAIL core %0d got flit src %0d seq %0d idx %0d", r, s, sq, i);
          end
          if (ej_flit[r].head && phase[r] == PH_TESTING) ej_bypass++;
          if (ej_flit[r].tail) begin
            int key;
            key = (s << 16) | sq;
            checks++;
            if (!pend.exists(key) || pend[key] != r * 8 + i + 1) begin
              failures++;
              $display("FAIL core %0d: unexpected packet src %0d seq %0d", r, s, sq);
            end else begin
              pend.delete(key);
              outstanding--;
            end
            ej_src[r] = -1;
          end else begin
            ej_src[r] = s; ej_seq[r] = sq; ej_idx[r] = i;
          end
        end
        ej_ready[r] <= ($urandom_range(15) != 0);
        // injection (state driving the network changes with nonblocking assignments)
        begin
          int nl, ni, ns, nd;
          nl = len[r]; ni = idx[r]; ns = seq[r]; nd = dst[r];
          if (inj_valid[r] && !inj_ready[r] && phase[r] inside {PH_EMPTYING, PH_RECOVERING})
            inj_stall++;
          if (inj_valid[r] && inj_ready[r]) begin
            if (ni == 0 && phase[r] == PH_TESTING) inj_bypass++;
            if (ni == nl - 1) begin
              nl = 0; ni = 0; ns++;
            end else ni++;
          end
          if (nl == 0 && cycle < int'(INJ_CYCLES) && $urandom_range(RATE - 1) == 0) begin
            nd = $urandom_range(NR - 2);
            if (nd >= r) nd++;
            nl = $urandom_range(4, 1);
            pend[(r << 16) | ns] = nd * 8 + nl;
            outstanding++;
            sent_pkts++;
          end
          len[r] <= nl; idx[r] <= ni; seq[r] <= ns; dst[r] <= nd;
        end
      end
    end
  end
endmodule
