// cars: Congestion Aware Routing Selection - the congestion level of a router.
//
// CL is the number of congested neighbour-facing input ports: the sum of the
// congestion flags of the north, east, south and west input buffers, a value
// from 0 to 4. The local input is not counted. It is purely combinational;
// the router sends CL to every neighbour along with its outgoing flits.
module cars
  import noc_pkg::*;
(
  input  logic [3:0]      cf,   // indexed N, E, S, W
  output logic [CL_W-1:0] cl
);

  always_comb begin
    cl = '0;
    for (int i = 0; i < 4; i++) cl = cl + CL_W'(cf[i]);
  end

endmodule
