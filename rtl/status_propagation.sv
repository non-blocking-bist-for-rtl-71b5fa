// status_propagation: synchronization signals of one router (ER, EA, DNS, INS, CS).
//
// Every side of a router sends a registered sync_t bundle to the neighbor on
// that side. A router under test (RUT) sends ER and DNS to its four direct
// neighbors and CS only to its ladder router. Each router forwards the DNS it
// receives from its north and south neighbors to its east and west neighbors as
// INS, so the status of a RUT reaches the whole 3x3 area around it. A neighbor
// answers ER with EA once it has no packet partly sent towards the RUT.
// The received bundles are decoded into the status of the eight surrounding
// routers and the CS state of the north and south neighbors.
// Signal names and their reach follow the document; the encoding, the one-cycle
// register per hop and the EA condition are this design's choices.
module status_propagation
  import altertest_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  sync_t [NSIDES-1:0]     sync_in,
  input  logic                   er,
  input  logic                   dns,
  input  logic                   cs_en,
  input  logic                   cs_sel,
  input  side_e                  ladder_side,
  input  logic  [NSIDES-1:0]     busy_toward,
  output sync_t [NSIDES-1:0]     sync_out,
  output nbr_status_t            nbr,
  output logic                   cs_n_en,
  output logic                   cs_n_sel,
  output logic                   cs_s_en,
  output logic                   cs_s_sel,
  output logic  [NSIDES-1:0]     ea_in
);
  sync_t [NSIDES-1:0] nxt;

  always_comb begin
    for (int d = 0; d < int'(NSIDES); d++) begin
      nxt[d].er     = er;
      nxt[d].dns    = dns;
      nxt[d].ea     = sync_in[d].er && !busy_toward[d];
      nxt[d].ins_n  = (d == int'(D_E) || d == int'(D_W)) && sync_in[D_N].dns;
      nxt[d].ins_s  = (d == int'(D_E) || d == int'(D_W)) && sync_in[D_S].dns;
      nxt[d].cs_en  = cs_en && (d == int'(ladder_side));
      nxt[d].cs_sel = cs_sel;
      ea_in[d]      = sync_in[d].ea;
    end
    nbr.n  = sync_in[D_N].dns;
    nbr.s  = sync_in[D_S].dns;
    nbr.e  = sync_in[D_E].dns;
    nbr.w  = sync_in[D_W].dns;
    nbr.ne = sync_in[D_E].ins_n;
    nbr.se = sync_in[D_E].ins_s;
    nbr.nw = sync_in[D_W].ins_n;
    nbr.sw = sync_in[D_W].ins_s;
    cs_n_en  = sync_in[D_N].cs_en;
    cs_n_sel = sync_in[D_N].cs_sel;
    cs_s_en  = sync_in[D_S].cs_en;
    cs_s_sel = sync_in[D_S].cs_sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_out <= '0;
    else        sync_out <= nxt;
  end
endmodule
