// noc_pkg: types and constants shared by the input-output selection router.
//
// Flit format (32-bit flit as in the evaluated configuration). The top bit is
// EOM (end of message) and the bit below it BOM (begin of message), as the
// message format prescribes. In a header flit the next bit is the type T
// (0 unicast, 1 multicast) and the addresses follow. The exact packing of the
// address field is this design's own choice:
//
//   [31] EOM  [30] BOM  [29] T  [28:27] NDEST  [26:21] SRC
//   [20:15] DEST0  [14:9] DEST1  [8:3] DEST2  [2:0] unused
//
// An address is {y[2:0], x[2:0]} of a node in the mesh. DEST0 is always the
// next destination; a router that delivers to DEST0 shifts the list up by one
// and decrements NDEST before forwarding the header. Direction indices are
// N=0, E=1, S=2, W=3, L(ocal)=4; y grows to the north and x to the east.
// Outputs have a sixth index, L2=5: a second link to the local processing
// element that carries the local copies of multicast messages which fork
// while travelling in the low-channel subnetwork (see wrr_hamum_router).
package noc_pkg;

  localparam int unsigned FLIT_W   = 32;  // data width of a flit
  localparam int unsigned COORD_W  = 3;   // bits per mesh coordinate (up to 8)
  localparam int unsigned ADDR_W   = 2 * COORD_W;
  localparam int unsigned NDEST_W  = 2;
  localparam int unsigned MAX_DEST = (FLIT_W - 3 - NDEST_W - ADDR_W) / ADDR_W;
  localparam int unsigned NPORTS   = 5;   // input ports N, E, S, W, L
  localparam int unsigned NOUT     = 6;   // output ports N, E, S, W, L, L2
  localparam int unsigned PORT_W   = 3;   // $clog2(NPORTS)
  localparam int unsigned CL_W     = 3;   // congestion level 0..4

  // Defaults of the evaluated configuration.
  localparam int unsigned MESH_W_DEF   = 8;
  localparam int unsigned MESH_H_DEF   = 8;
  localparam int unsigned BUF_DEPTH    = 10;
  localparam int unsigned FULL_THRESH_DEF = 6;   // 60 % of a 10-flit buffer

  typedef enum logic [PORT_W-1:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4,
    DIR_L2 = 3'd5   // second consumption channel (output only)
  } dir_e;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } addr_t;

  typedef struct packed {
    logic                        eom;
    logic                        bom;
    logic                        mcast;
    logic [NDEST_W-1:0]          ndest;
    addr_t                       src;
    addr_t [MAX_DEST-1:0]        dest;   // dest[MAX_DEST-1] is DEST0
    logic [FLIT_W-3-NDEST_W-ADDR_W*(MAX_DEST+1)-1:0] rsvd;
  } header_t;

  // Forward half of a link (upstream to downstream): flit, its valid and
  // the sender's congestion level.
  typedef struct packed {
    logic            valid;
    flit_t           flit;
    logic [CL_W-1:0] cl;
  } link_fwd_t;

  // Backward half of a link: buffer has room, and the receiving input port's
  // congestion flag.
  typedef struct packed {
    logic ready;
    logic cf;
  } link_bwd_t;

  // Hamiltonian (boustrophedon) label of node (x,y): even rows count up
  // eastwards, odd rows count up westwards.
  function automatic int unsigned ham_label(input int unsigned x, input int unsigned y,
                                            input int unsigned mesh_w);
    return (y % 2 == 0) ? (y * mesh_w + x) : (y * mesh_w + (mesh_w - 1 - x));
  endfunction

  function automatic header_t make_header(input logic mcast, input addr_t src,
                                          input int unsigned ndest,
                                          input addr_t d0, input addr_t d1, input addr_t d2);
    header_t h;
    h = '0;
    h.bom   = 1'b1;
    h.mcast = mcast;
    h.ndest = NDEST_W'(ndest);
    h.src   = src;
    h.dest[MAX_DEST-1] = d0;
    h.dest[MAX_DEST-2] = d1;
    h.dest[MAX_DEST-3] = d2;
    return h;
  endfunction

endpackage
