// ppe: programmable priority encoder, the core of a round-robin arbiter.
//
// Given N one-bit requests and a pointer p to the request that currently has
// the highest priority, it grants the first nonzero request found scanning
// from req[p] upwards and wrapping around (req[p] itself included). gnt is
// one-hot or zero; any_gnt is high when at least one request is present.
// Purely combinational: the scan visits the offsets 0..N-1 from the pointer
// and keeps the first request it meets.
// Follows the original design: the request/pointer/grant/anyGnt interface
// and the scan rule are the original arbiter's. The loop implementation is
// this implementation's choice.
module ppe #(
  parameter int unsigned N     = 5,
  parameter int unsigned PTR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     req,
  input  logic [PTR_W-1:0] ptr,
  output logic [N-1:0]     gnt,
  output logic             any_gnt
);

  always_comb begin
    int unsigned idx;
    logic        found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (32'(ptr) + k) % N;
      if (!found && req[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
    any_gnt = |req;
  end

endmodule
