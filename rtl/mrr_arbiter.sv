// mrr_arbiter: modified round robin bus arbitration.
//
// The same ring counter as the plain round robin arbiter moves a one-hot
// token one master per clock, but the token no longer has to coincide with a
// request. Instead it enables one of N priority logic blocks (priority
// encoder plus decoder). Block k sees the requests in round-robin order
// starting at master k+1 (req[k], req[k+1], ..., wrapping around), so the
// enabled block grants the first requesting master at or after the token
// holder. The outputs of all blocks, rotated back to master numbering, are
// ORed into the grant vector; as only one block is enabled, the OR carries
// that block's one-hot result. A requesting master is therefore granted in
// the very cycle it is found, without waiting for the token to reach it,
// while the moving token still shares the first place fairly.
//
// Interface:
//   clk, rst_n  clock (rising edge) and asynchronous active-low reset;
//               reset puts the token at master 1
//   req         bus requests, req[0] = master 1
//   grant       one-hot grant, combinational from the token register and req;
//               non-zero whenever any master requests
//   token       current token position, exported for observation
module mrr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [N-1:0] token
);

  logic [N-1:0] req_rot [N];  // requests seen by priority logic k
  logic [N-1:0] out_rot [N];  // its one-hot result, in its own order
  logic [N-1:0] out_abs [N];  // the same, back in master numbering

  ring_counter #(.N(N)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .token(token)
  );

  for (genvar k = 0; k < N; k++) begin : g_plogic
    // Rotate so that input 0 of block k is master k+1.
    always_comb begin
      for (int j = 0; j < N; j++) req_rot[k][j] = req[(j + k) % N];
    end

    priority_logic #(.N(N)) u_plogic (
      .en     (token[k]),
      .in_req (req_rot[k]),
      .out_gnt(out_rot[k])
    );

    always_comb begin
      for (int j = 0; j < N; j++) out_abs[k][(j + k) % N] = out_rot[k][j];
    end
  end

  // OR of all priority logic outputs.
  always_comb begin
    grant = '0;
    for (int k = 0; k < N; k++) grant |= out_abs[k];
  end

endmodule
