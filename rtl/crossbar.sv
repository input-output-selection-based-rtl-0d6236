// crossbar: the switch that connects router input ports to output ports.
//
// NI inputs, NO outputs. For every output o, sel[o] names the input that owns it and en[o] says
// whether the owning input moves a flit this cycle; the output then carries
// that input's flit with valid high. One input may drive several outputs at
// once (a multicast message delivered locally and forwarded). Purely
// combinational: a 5-input, 6-output multiplexer array in the router.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NI = NPORTS,
  parameter int unsigned NO = NOUT,
  parameter int unsigned SEL_W = (NI > 1) ? $clog2(NI) : 1
) (
  input  flit_t [NI-1:0]            in_flit,
  input  logic  [NO-1:0][SEL_W-1:0] sel,
  input  logic  [NO-1:0]            en,
  output flit_t [NO-1:0]            out_flit,
  output logic  [NO-1:0]            out_valid
);

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = en[o];
    end
  end

endmodule
