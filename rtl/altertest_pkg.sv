// altertest_pkg: types and constants shared by the AlterTest router and mesh.
//
// A router has seven ports: Local, East, West and two channel pairs in the Y
// dimension on each side (North1/North2, South1/South2). Ports are named after
// the side of the router they sit on; a port carries one input and one output
// link. Subnetwork A is made of the eastward channel and the N1/S1 pair,
// subnetwork B of the westward channel and the N2/S2 pair.
//
// The flit format, the sizes and the encodings here are choices of this
// design: the port set, the four test phases and the synchronization signal
// names (ER, EA, DNS, INS, CS) follow the AlterTest scheme.
package altertest_pkg;

  localparam int unsigned NPORTS  = 7;
  localparam int unsigned NSIDES  = 4;
  localparam int unsigned COORD_W = 4;   // up to 16x16 routers
  localparam int unsigned DATA_W  = 32;  // payload bits per flit

  typedef enum logic [2:0] {
    P_L  = 3'd0,
    P_E  = 3'd1,
    P_W  = 3'd2,
    P_N1 = 3'd3,
    P_N2 = 3'd4,
    P_S1 = 3'd5,
    P_S2 = 3'd6
  } port_e;

  // Sides of a router, used to index the synchronization bundles.
  typedef enum logic [1:0] {
    D_N = 2'd0,
    D_E = 2'd1,
    D_S = 2'd2,
    D_W = 2'd3
  } side_e;

  typedef logic [COORD_W-1:0] coord_t;

  // Every flit carries its destination so that body flits need no state
  // beyond the wormhole lock. head and tail are both set for one-flit packets.
  typedef struct packed {
    logic              head;
    logic              tail;
    coord_t            dst_x;
    coord_t            dst_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  typedef enum logic [1:0] {
    PH_NORMAL     = 2'd0,
    PH_EMPTYING   = 2'd1,
    PH_TESTING    = 2'd2,
    PH_RECOVERING = 2'd3
  } phase_e;

  // Synchronization signals sent over one side of a router (one direction).
  //   er     : emptying request, the sender is a router under test (RUT)
  //   ea     : emptying acknowledge, answer to er
  //   dns    : direct neighbor status, the sender is disabled (RUT)
  //   ins_n  : indirect status, the sender's north neighbor is a RUT
  //   ins_s  : indirect status, the sender's south neighbor is a RUT
  //   cs_en  : the sender's bypass channel is connected towards the receiver
  //   cs_sel : which channel of the pair carries it (0: N1/S1, 1: N2/S2)
  typedef struct packed {
    logic er;
    logic ea;
    logic dns;
    logic ins_n;
    logic ins_s;
    logic cs_en;
    logic cs_sel;
  } sync_t;

  // Which of the eight routers around this one are disabled (under test).
  typedef struct packed {
    logic n;
    logic s;
    logic e;
    logic w;
    logic ne;
    logic nw;
    logic se;
    logic sw;
  } nbr_status_t;

  // Crossbar connections that exist. U-turns and the N1<->N2 and S1<->S2
  // connections are never used by the routing algorithm and are left out.
  function automatic logic xb_connected(input int unsigned in_p, input int unsigned out_p);
    int unsigned n1, n2, s1, s2;
    n1 = int'(P_N1);
    n2 = int'(P_N2);
    s1 = int'(P_S1);
    s2 = int'(P_S2);
    if (in_p == out_p) return 1'b0;
    if ((in_p == n1 && out_p == n2) || (in_p == n2 && out_p == n1)) return 1'b0;
    if ((in_p == s1 && out_p == s2) || (in_p == s2 && out_p == s1)) return 1'b0;
    return 1'b1;
  endfunction

  // Side on which a port sits (the local port has none; D_N is returned).
  function automatic side_e port_side(input port_e p);
    case (p)
      P_E:        return D_E;
      P_W:        return D_W;
      P_S1, P_S2: return D_S;
      default:    return D_N;
    endcase
  endfunction

endpackage
