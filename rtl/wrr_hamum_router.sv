// wrr_hamum_router: a five-port wormhole router for a 2D mesh that combines
// adaptive output selection with weighted round-robin input selection.
//
// Structure (per port N, E, S, W, Local):
//   input_port   - handshake, 10-flit register FIFO, congestion flag CF
//   hamum_route  - routing unit / address decoder, Hamiltonian-path minimal
//                  adaptive routing for unicast and path-based multicast,
//                  choosing the direction whose downstream CF is low
//   wrr_arbiter  - one per output, weights = CL of the upstream routers
//   crossbar     - connects the 5 inputs to the 6 outputs
//   cars         - CL = number of congested N/E/S/W input buffers (0..4)
//
// Operation of one message (wormhole switching):
//   1. A header flit (BOM) reaches the head of an input buffer. In that cycle
//      the routing unit computes the output mask and the header to forward;
//      both are latched on the next edge and the input already requests.
//   2. The input requests each output in its mask. A network output is
//      requested first; the local output is requested only once the network
//      output (if any) is held, so two multicast messages can never each hold
//      the output the other one waits for. A free output grants one request
//      through its WRR arbiter and is then held by that input.
//   3. When every output in the mask is held and every downstream buffer has
//      room, one flit per cycle moves through the crossbar to all of them
//      (a multicast copy to the local port and the forwarded message advance
//      together). The EOM flit releases the outputs; a released output
//      arbitrates again in the following cycle.
//
// Consumption channels: there are two outputs towards the local processing
// element, L and L2. A multicast message that is delivered here and also
// forwarded holds its local output while it waits for its network output to
// advance. If forks of the high and of the low label subnetworks shared one
// local output, a chain of such waits could close into a cycle (high worm
// waits for a local port held by a low fork, which waits for a low worm,
// which waits for a local port held by a high fork ...). Forks heading into
// the low subnetwork therefore eject on L2 and everything else on L; each
// subnetwork is acyclic on its own, so the router is deadlock free as long
// as the processing element keeps accepting flits on L and L2.
//
// Links: in_fwd/out_fwd carry valid, flit and the sender's CL downstream;
// in_bwd/out_bwd carry ready and the receiver's CF upstream. The CL of this
// router goes out on every output; the WRR weight of the local input is this
// router's own CL. Without contention a header written into an input buffer
// on clock edge t is granted its output on edge t+1 and taken by the
// downstream buffer on edge t+2; the following flits stream at one flit per
// cycle.
//
// Documented behaviour: input/output selection, CF/CL generation and use,
// WRR weights, path-based multicast with local delivery. This design's own
// choices: valid/ready links, the header layout (noc_pkg), the order of
// requests for a multicast fork, and the exact turn rule in hamum_route.
module wrr_hamum_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned MESH_W      = MESH_W_DEF,
  parameter int unsigned DEPTH       = BUF_DEPTH,
  parameter int unsigned FULL_THRESH = FULL_THRESH_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  link_fwd_t [NPORTS-1:0] in_fwd,
  output link_bwd_t [NPORTS-1:0] in_bwd,
  output link_fwd_t [NOUT-1:0]   out_fwd,
  input  link_bwd_t [NOUT-1:0]   out_bwd,
  output logic      [CL_W-1:0]   cl
);

  localparam int unsigned N  = NPORTS;   // inputs
  localparam int unsigned NO = NOUT;     // outputs

  // ---------------- input ports ----------------
  flit_t [N-1:0]            head;
  logic  [N-1:0]            head_valid;
  logic  [N-1:0]            pop;
  logic  [N-1:0][CL_W-1:0]  cl_up;
  logic  [N-1:0]            cf_in;
  logic  [N-1:0][CL_W-1:0]  weight;

  for (genvar i = 0; i < N; i++) begin : g_in
    input_port #(.DEPTH(DEPTH), .FULL_THRESH(FULL_THRESH)) u_ip (
      .clk, .rst_n,
      .link_in   (in_fwd[i]),
      .link_out  (in_bwd[i]),
      .head      (head[i]),
      .head_valid(head_valid[i]),
      .pop       (pop[i]),
      .cl_up     (cl_up[i]),
      .cf        (cf_in[i])
    );
  end

  cars u_cars (.cf(cf_in[3:0]), .cl);

  always_comb begin
    for (int i = 0; i < N; i++) weight[i] = cl_up[i];
    weight[DIR_L] = cl;   // the local input is weighted by this router's CL
  end

  // ---------------- routing units ----------------
  logic    [3:0]        cf_down;
  logic    [N-1:0][NO-1:0] rt_mask;
  header_t [N-1:0]      rt_hdr;
  logic    [N-1:0]      rt_adaptive, rt_diverted;

  always_comb begin
    for (int d = 0; d < 4; d++) cf_down[d] = out_bwd[d].cf;
  end

  for (genvar i = 0; i < N; i++) begin : g_rt
    hamum_route #(.MESH_W(MESH_W)) u_rt (
      .hdr_in  (header_t'(head[i])),
      .cur_x   (COORD_W'(MY_X)),
      .cur_y   (COORD_W'(MY_Y)),
      .cf_down,
      .out_mask(rt_mask[i]),
      .hdr_out (rt_hdr[i]),
      .adaptive(rt_adaptive[i]),
      .diverted(rt_diverted[i])
    );
  end

  // ---------------- per-input route state ----------------
  logic  [N-1:0]         rt_valid_q;
  logic  [N-1:0][NO-1:0] mask_q;
  flit_t [N-1:0]         hdr_q;
  logic  [N-1:0]         route_now;   // header routed in this cycle
  logic  [N-1:0][NO-1:0] eff_mask;    // route in force for the requests

  // ---------------- per-output allocation state ----------------
  logic  [NO-1:0]             busy_q;
  logic  [NO-1:0][PORT_W-1:0] owner_q;
  logic  [N-1:0][NO-1:0]      held;     // held[i][o]: output o held by input i
  logic  [NO-1:0][N-1:0]      req_col;  // req_col[o][i]
  logic  [NO-1:0][N-1:0]      gnt_col;  // gnt_col[o][i]
  logic  [NO-1:0]             any_gnt;
  logic  [NO-1:0][PORT_W-1:0] p_enc;
  logic  [N-1:0]              move;
  flit_t [N-1:0]              send_flit;
  flit_t [NO-1:0]             xb_flit;
  logic  [NO-1:0]             xb_valid;
  logic  [NO-1:0]             xb_en;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      route_now[i] = head_valid[i] && !rt_valid_q[i] && head[i][FLIT_W-2];
      for (int o = 0; o < NO; o++)
        held[i][o] = busy_q[o] && (owner_q[o] == PORT_W'(i));
    end
  end

  // requests: network output first, local output once the network one is held
  always_comb begin
    logic net_done;
    req_col = '0;
    for (int i = 0; i < N; i++) begin
      eff_mask[i] = route_now[i] ? rt_mask[i] : mask_q[i];
      net_done = ((eff_mask[i][3:0] & ~held[i][3:0]) == '0);
      for (int o = 0; o < NO; o++) begin
        if ((rt_valid_q[i] || route_now[i]) && eff_mask[i][o] && !held[i][o] &&
            ((o < 4) || net_done))
          req_col[o][i] = 1'b1;
      end
    end
  end

  for (genvar o = 0; o < NO; o++) begin : g_arb
    wrr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req    (req_col[o]),
      .cl     (weight),
      .take   (!busy_q[o]),
      .gnt    (gnt_col[o]),
      .any_gnt(any_gnt[o]),
      .p_enc  (p_enc[o])
    );
  end

  // flit movement: all outputs of the mask held and ready
  always_comb begin
    for (int i = 0; i < N; i++) begin
      move[i] = head_valid[i] && rt_valid_q[i] && (mask_q[i] != '0);
      for (int o = 0; o < NO; o++) begin
        if (mask_q[i][o] && !(held[i][o] && out_bwd[o].ready)) move[i] = 1'b0;
      end
      send_flit[i] = head[i][FLIT_W-2] ? hdr_q[i] : head[i];
      pop[i]       = move[i];
    end
    for (int o = 0; o < NO; o++) xb_en[o] = busy_q[o] && move[owner_q[o]];
  end

  crossbar #(.NI(N), .NO(NO)) u_xbar (
    .in_flit  (send_flit),
    .sel      (owner_q),
    .en       (xb_en),
    .out_flit (xb_flit),
    .out_valid(xb_valid)
  );

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_fwd[o].valid = xb_valid[o];
      out_fwd[o].flit  = xb_flit[o];
      out_fwd[o].cl    = cl;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_valid_q <= '0;
      mask_q     <= '0;
      hdr_q      <= '0;
      busy_q     <= '0;
      owner_q    <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (route_now[i]) begin
          rt_valid_q[i] <= 1'b1;
          mask_q[i]     <= rt_mask[i];
          hdr_q[i]      <= flit_t'(rt_hdr[i]);
        end else if (move[i] && head[i][FLIT_W-1]) begin
          rt_valid_q[i] <= 1'b0;
          mask_q[i]     <= '0;
        end
      end
      for (int o = 0; o < NO; o++) begin
        if (!busy_q[o]) begin
          if (any_gnt[o]) begin
            busy_q[o] <= 1'b1;
            for (int i = 0; i < N; i++)
              if (gnt_col[o][i]) owner_q[o] <= PORT_W'(i);
          end
        end else if (move[owner_q[o]] && head[owner_q[o]][FLIT_W-1]) begin
          busy_q[o] <= 1'b0;
        end
      end
    end
  end

  // a body flit may only reach the head of a buffer behind a routed header
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_body_routed: assert property (@(posedge clk) disable iff (!rst_n)
      (head_valid[i] && !head[i][FLIT_W-2]) |-> rt_valid_q[i]);
  end

endmodule
