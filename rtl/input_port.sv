// input_port: one router input channel - handshake controller, input buffer
// and congestion detection.
//
// The upstream router drives link_in (valid, flit, and its congestion level
// CL). The port answers on link_out with ready (the buffer has a free slot)
// and with the congestion flag CF of this buffer. A flit is taken on a rising
// edge where valid and ready are both high; ready depends only on registered
// state, so it never waits for valid. The head of the buffer is presented to
// the router on head/head_valid and removed with pop.
//
// The upstream CL is passed on as cl_up; the router uses it as the weight of
// this input in its weighted round-robin arbiters. The valid/ready handshake
// is this design's choice; the split of the port into controller, buffer and
// congestion circuit follows the described router structure.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH       = BUF_DEPTH,
  parameter int unsigned FULL_THRESH = FULL_THRESH_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  link_fwd_t       link_in,
  output link_bwd_t       link_out,
  output flit_t           head,
  output logic            head_valid,
  input  logic            pop,
  output logic [CL_W-1:0] cl_up,
  output logic            cf
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic             empty, full;
  logic [CNT_W-1:0] count;
  logic             w_full, rate_pos;

  input_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (link_in.valid && !full),
    .wr_data(link_in.flit),
    .rd_en  (pop),
    .rd_data(head),
    .empty,
    .full,
    .count
  );

  congestion_detector #(.DEPTH(DEPTH), .FULL_THRESH(FULL_THRESH)) u_cd (
    .clk, .rst_n,
    .n_new(count),
    .w_full,
    .rate_pos,
    .cf
  );

  assign head_valid     = !empty;
  assign link_out.ready = !full;
  assign link_out.cf    = cf;
  assign cl_up          = link_in.cl;

  // A flit offered while the buffer is full must be held until accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (link_in.valid && full) |=> link_in.valid);

endmodule
