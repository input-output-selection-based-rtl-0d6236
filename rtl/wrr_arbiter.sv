// wrr_arbiter: weighted round-robin arbiter of one router output port.
//
// Input selection. A programmable priority encoder (ppe) grants the first
// requesting input at or after the pointer p_enc. Each input i has a weight
// register that is loaded (En) with the congestion level CL of the router
// upstream of input i when that input starts a turn, and then counts down
// once per packet the input sends through this output. While the register is
// not zero the pointer stays on the input, so a congested upstream router is
// served for several packets in a row; when it reaches zero the pointer is
// rotated one place past the granted input (rr1 and Enc of the round-robin
// scheme). An input with an empty buffer does not request and is skipped;
// its turn ends and its register is cleared. The weight is the number of
// consecutive packets, max(1, CL), so with all CL = 0 the arbiter is a plain
// round-robin arbiter. The down-counters, their loading with the upstream CL
// and the pointer rotation follow the original design; max(1, CL) and the
// loss of a skipped input's turn are this implementation's choices.
//
// Timing: gnt/any_gnt are combinational from req and the registered state.
// take is high in a cycle where the output accepts the grant (starts a
// packet); the weight registers and pointer update on that clock edge.
module wrr_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned N     = NPORTS,
  parameter int unsigned PTR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             req,
  input  logic [N-1:0][CL_W-1:0]   cl,
  input  logic                     take,
  output logic [N-1:0]             gnt,
  output logic                     any_gnt,
  output logic [PTR_W-1:0]         p_enc
);

  logic [N-1:0][CL_W-1:0] wcnt;
  logic [N-1:0]           zero;

  ppe #(.N(N), .PTR_W(PTR_W)) u_ppe (
    .req, .ptr(p_enc), .gnt, .any_gnt
  );

  always_comb begin
    for (int i = 0; i < N; i++) zero[i] = (wcnt[i] == '0);
  end

  function automatic logic [PTR_W-1:0] rr1(input int unsigned g);
    return PTR_W'((g + 1) % N);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_enc <= '0;
      wcnt  <= '0;
    end else if (take && any_gnt) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (gnt[i]) begin
          if (zero[i]) begin
            // start of a turn: load the weight
            if (cl[i] > CL_W'(1)) begin
              wcnt[i] <= cl[i] - CL_W'(1);
              p_enc   <= PTR_W'(i);
            end else begin
              p_enc   <= rr1(i);
            end
          end else begin
            wcnt[i] <= wcnt[i] - CL_W'(1);
            if (wcnt[i] == CL_W'(1)) p_enc <= rr1(i);
            else                     p_enc <= PTR_W'(i);
          end
        end else begin
          wcnt[i] <= '0;
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_if_req: assert property (@(posedge clk) disable iff (!rst_n) (|req) == any_gnt);

endmodule
