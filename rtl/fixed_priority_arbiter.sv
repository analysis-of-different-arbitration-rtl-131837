// fixed_priority_arbiter: static fixed priority bus arbitration.
//
// Every master has a fixed rank: master 1 (req[0]) is first, master 2
// (req[1]) second and so on. The arbiter asks, in rank order, whether the
// master of that rank requests the bus and grants the first one that does,
// exactly as a chain of decisions. A lower-ranked master is served only when
// no higher-ranked master requests, so a master that keeps its request up
// starves those below it. When nobody requests, no grant is given (a
// default master is this design's choice not to have).
//
// Interface: purely combinational; the grant follows the requests in the
// same cycle, the surrounding logic samples it on the clock edge.
//   req    bus requests, req[0] = master 1 (highest priority)
//   grant  one-hot grant, zero when no request
module fixed_priority_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  always_comb begin
    grant = '0;
    for (int i = 0; i < N; i++) begin
      if (req[i] && grant == '0) grant[i] = 1'b1;
    end
  end

endmodule
