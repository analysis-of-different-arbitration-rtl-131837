// round_robin_arbiter: token-passing round robin bus arbitration.
//
// A ring counter moves a one-hot token from master to master, one step per
// clock. An AND gate per master combines its token bit with its request: the
// master holding the token is granted the bus in that cycle if it requests;
// if it does not, no one is granted and the token simply passes on to the
// next master at the next edge. Every master is therefore offered the bus
// once every N cycles and none can starve, at the cost of up to N-1 cycles
// of waiting even when the bus is free. Example: with the token at master 1
// and only master 2 requesting, master 2 is granted in the second cycle.
//
// Interface:
//   clk, rst_n  clock (rising edge) and asynchronous active-low reset;
//               reset puts the token at master 1
//   req         bus requests, req[0] = master 1
//   grant       one-hot grant = token AND req, combinational from the token
//               register and req
//   token       current token position, exported for observation
module round_robin_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [N-1:0] token
);

  ring_counter #(.N(N)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .token(token)
  );

  assign grant = token & req;

endmodule
