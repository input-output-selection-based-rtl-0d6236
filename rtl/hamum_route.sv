// hamum_route: the address decoder (output selection) of one input port.
//
// Given the header flit at the head of an input buffer, the router's own
// coordinates and the congestion flags of the four downstream neighbours, it
// returns the output port(s) the message must take and the header to forward.
//
// Nodes carry the Hamiltonian (boustrophedon) label of noc_pkg::ham_label.
// A destination with a higher label than this node is reached through the
// high-channel subnetwork, where every hop raises the label; a lower one
// through the low-channel subnetwork, where every hop lowers it. No hop may
// pass the target's label, so a message never leaves its subnetwork. Within
// a subnetwork the route is minimal and adaptive: in the high subnetwork the
// moves are north (while the target is in a row further north and the node
// above does not have a label beyond the target's) and the horizontal move
// towards the target when that move raises the label (east in even rows,
// west in odd rows); the low subnetwork mirrors this with south. One of the
// two is always allowed, so every route is minimal.
// Because each subnetwork only ever climbs (or descends) the label order it
// is acyclic and therefore deadlock free, and a sorted multicast list is
// served in order along one path.
//
// When two directions are allowed, the horizontal one is the first choice
// (p1) and the vertical one the second (p2); p2 is taken only when p1's
// downstream router has raised its CF and p2's has not.
//
// Multicast: when this node is DEST0 the local port is requested and, if
// further destinations remain, the route is computed towards the next one;
// the forwarded header has DEST0 removed. Unicast at its destination takes
// only the local port. A multicast that forks here while heading on into
// the low subnetwork delivers its local copy on L2 instead of L, so that
// high- and low-subnetwork forks never wait for the same consumption
// channel. Purely combinational.
//
// The split into high and low subnetworks, minimal adaptivity and the CF
// rule follow the described routing; the exact turn rules of the underlying
// routing algorithm are not given, so the rule above is this design's own
// (the simplest minimal adaptive routing confined to one subnetwork).
module hamum_route
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W = MESH_W_DEF
) (
  input  header_t            hdr_in,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [3:0]         cf_down,   // CF of the neighbour at N, E, S, W
  output logic [NOUT-1:0]    out_mask,  // one bit per output: N,E,S,W,L,L2
  output header_t            hdr_out,
  output logic               adaptive,  // two minimal directions were allowed
  output logic               diverted   // the second choice was taken for CF
);

  addr_t tgt;
  logic  at_d0, need_net;
  int unsigned lc, lt, lv;
  logic  up, even_row;
  logic  v_ok, h_ok;
  dir_e  v_dir, h_dir;

  always_comb begin
    hdr_out  = hdr_in;
    out_mask = '0;
    adaptive = 1'b0;
    diverted = 1'b0;
    v_ok     = 1'b0;
    h_ok     = 1'b0;
    v_dir    = DIR_N;
    h_dir    = DIR_E;

    at_d0 = (hdr_in.dest[MAX_DEST-1] == {cur_y, cur_x});
    if (at_d0) begin
      out_mask[DIR_L] = 1'b1;
      need_net = hdr_in.mcast && (hdr_in.ndest > NDEST_W'(1));
      tgt      = hdr_in.dest[MAX_DEST-2];
      hdr_out.ndest = hdr_in.ndest - 1'b1;
      for (int i = MAX_DEST - 1; i > 0; i--) hdr_out.dest[i] = hdr_in.dest[i-1];
      hdr_out.dest[0] = '0;
    end else begin
      need_net = 1'b1;
      tgt      = hdr_in.dest[MAX_DEST-1];
    end

    lv       = 0;
    lc       = ham_label(32'(cur_x), 32'(cur_y), MESH_W);
    lt       = ham_label(32'(tgt.x), 32'(tgt.y), MESH_W);
    up       = (lt > lc);
    even_row = !cur_y[0];

    if (up) begin
      // high-channel subnetwork; a hop north must not pass the target's label
      lv    = ham_label(32'(cur_x), 32'(cur_y) + 1, MESH_W);
      v_ok  = (tgt.y > cur_y) && (lv <= lt);
      v_dir = DIR_N;
      if (tgt.y == cur_y) begin
        h_ok  = 1'b1;
        h_dir = (tgt.x > cur_x) ? DIR_E : DIR_W;
      end else if (even_row) begin
        h_ok  = (tgt.x > cur_x);
        h_dir = DIR_E;
      end else begin
        h_ok  = (tgt.x < cur_x);
        h_dir = DIR_W;
      end
    end else begin
      // low-channel subnetwork; a hop south must not pass the target's label
      lv    = ham_label(32'(cur_x), 32'(cur_y) - 1, MESH_W);
      v_ok  = (tgt.y < cur_y) && (lv >= lt);
      v_dir = DIR_S;
      if (tgt.y == cur_y) begin
        h_ok  = (tgt.x != cur_x);
        h_dir = (tgt.x > cur_x) ? DIR_E : DIR_W;
      end else if (even_row) begin
        h_ok  = (tgt.x < cur_x);
        h_dir = DIR_W;
      end else begin
        h_ok  = (tgt.x > cur_x);
        h_dir = DIR_E;
      end
    end

    // the local copy of a message that forks in the low subnetwork uses
    // the second consumption channel
    if (at_d0 && need_net && !up) begin
      out_mask[DIR_L]  = 1'b0;
      out_mask[DIR_L2] = 1'b1;
    end

    if (need_net) begin
      adaptive = h_ok && v_ok;
      if (h_ok && v_ok) begin
        if (cf_down[h_dir[1:0]] && !cf_down[v_dir[1:0]]) begin
          out_mask[v_dir] = 1'b1;
          diverted        = 1'b1;
        end else begin
          out_mask[h_dir] = 1'b1;
        end
      end else if (h_ok) begin
        out_mask[h_dir] = 1'b1;
      end else if (v_ok) begin
        out_mask[v_dir] = 1'b1;
      end
    end
  end

endmodule
