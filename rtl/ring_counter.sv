// ring_counter: one-hot token generator for the round robin arbiters.
//
// A ring of N flip-flops holding a single 1 (the token). Reset places the
// token at master 1 (bit 0); every rising clock edge afterwards moves it to
// the next master, bit i to bit i+1 and the last bit back to bit 0, whether
// or not anyone requests. The token thus visits every master once every N
// cycles.
//
// Interface:
//   clk    rising-edge clock
//   rst_n  asynchronous active-low reset
//   token  one-hot token, bit i = master i+1 holds the highest priority
module ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] token
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) token <= N'(1);
    else        token <= (token << 1) | (token >> (N - 1));
  end

  // The ring must hold exactly one token.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(token));

endmodule
