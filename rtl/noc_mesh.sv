// noc_mesh: a MESH_W x MESH_H two-dimensional mesh of input-output selection
// routers (8x8 by default, the evaluated network size).
//
// Router (x,y) sits at node index n = y*MESH_W + x; y grows northwards and
// x eastwards. Neighbouring routers are joined by a link in each direction:
// flits, valid and the sender's congestion level CL flow downstream, ready
// and the receiver's congestion flag CF flow upstream, so every router sees
// the CF of the input buffers it feeds (for output selection) and the CL of
// the routers feeding it (for its WRR weights). Links that would leave the
// mesh are tied off: nothing arrives on them and they are never ready; the
// minimal routing never selects them.
//
// The local port of every router is brought out (pe_* ports, indexed by n)
// for the processing elements, which inject messages with a sorted
// destination list and must always eventually accept delivered flits on
// both consumption channels, pe_out (L) and pe_out2 (L2, local copies of
// multicasts that fork into the low-label subnetwork).
// router_cl shows every router's congestion level.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W      = MESH_W_DEF,
  parameter int unsigned MESH_H      = MESH_H_DEF,
  parameter int unsigned DEPTH       = BUF_DEPTH,
  parameter int unsigned FULL_THRESH = FULL_THRESH_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  link_fwd_t [MESH_W*MESH_H-1:0]      pe_in_fwd,   // PE -> router
  output link_bwd_t [MESH_W*MESH_H-1:0]      pe_in_bwd,
  output link_fwd_t [MESH_W*MESH_H-1:0]      pe_out_fwd,  // router -> PE
  input  link_bwd_t [MESH_W*MESH_H-1:0]      pe_out_bwd,
  output link_fwd_t [MESH_W*MESH_H-1:0]      pe_out2_fwd, // router -> PE, L2
  input  link_bwd_t [MESH_W*MESH_H-1:0]      pe_out2_bwd,
  output logic [MESH_W*MESH_H-1:0][CL_W-1:0] router_cl
);

  localparam int unsigned NN = MESH_W * MESH_H;

  link_fwd_t [NN-1:0][NPORTS-1:0] r_in_fwd;
  link_fwd_t [NN-1:0][NOUT-1:0]   r_out_fwd;
  link_bwd_t [NN-1:0][NPORTS-1:0] r_in_bwd;
  link_bwd_t [NN-1:0][NOUT-1:0]   r_out_bwd;

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned n = y * MESH_W + x;

      wrr_hamum_router #(
        .MY_X(x), .MY_Y(y), .MESH_W(MESH_W),
        .DEPTH(DEPTH), .FULL_THRESH(FULL_THRESH)
      ) u_router (
        .clk, .rst_n,
        .in_fwd (r_in_fwd[n]),
        .in_bwd (r_in_bwd[n]),
        .out_fwd(r_out_fwd[n]),
        .out_bwd(r_out_bwd[n]),
        .cl     (router_cl[n])
      );

      // local port
      assign r_in_fwd[n][DIR_L]  = pe_in_fwd[n];
      assign pe_in_bwd[n]        = r_in_bwd[n][DIR_L];
      assign pe_out_fwd[n]       = r_out_fwd[n][DIR_L];
      assign r_out_bwd[n][DIR_L] = pe_out_bwd[n];
      assign pe_out2_fwd[n]       = r_out_fwd[n][DIR_L2];
      assign r_out_bwd[n][DIR_L2] = pe_out2_bwd[n];

      // north neighbour
      if (y + 1 < MESH_H) begin : g_n
        assign r_in_fwd[n][DIR_N]  = r_out_fwd[n + MESH_W][DIR_S];
        assign r_out_bwd[n][DIR_N] = r_in_bwd[n + MESH_W][DIR_S];
      end else begin : g_n_edge
        assign r_in_fwd[n][DIR_N]  = '0;
        assign r_out_bwd[n][DIR_N] = '0;
      end
      // south neighbour
      if (y > 0) begin : g_s
        assign r_in_fwd[n][DIR_S]  = r_out_fwd[n - MESH_W][DIR_N];
        assign r_out_bwd[n][DIR_S] = r_in_bwd[n - MESH_W][DIR_N];
      end else begin : g_s_edge
        assign r_in_fwd[n][DIR_S]  = '0;
        assign r_out_bwd[n][DIR_S] = '0;
      end
      // east neighbour
      if (x + 1 < MESH_W) begin : g_e
        assign r_in_fwd[n][DIR_E]  = r_out_fwd[n + 1][DIR_W];
        assign r_out_bwd[n][DIR_E] = r_in_bwd[n + 1][DIR_W];
      end else begin : g_e_edge
        assign r_in_fwd[n][DIR_E]  = '0;
        assign r_out_bwd[n][DIR_E] = '0;
      end
      // west neighbour
      if (x > 0) begin : g_w
        assign r_in_fwd[n][DIR_W]  = r_out_fwd[n - 1][DIR_E];
        assign r_out_bwd[n][DIR_W] = r_in_bwd[n - 1][DIR_E];
      end else begin : g_w_edge
        assign r_in_fwd[n][DIR_W]  = '0;
        assign r_out_bwd[n][DIR_W] = '0;
      end
    end
  end

endmodule
