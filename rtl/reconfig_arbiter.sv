// reconfig_arbiter: AHB bus arbiter with a run-time selectable scheme.
//
// Holds the three arbitration schemes side by side and lets the two-bit
// ARBITRATION input choose which one drives the grants:
//   00  static fixed priority   (master 1 first, master N last)
//   01  round robin             (grant only to the token holder)
//   10  modified round robin    (first requester at or after the token)
//   11  unassigned; this design falls back to static fixed priority.
// All three compute in parallel from the same requests; the two round robin
// schemes each keep their own ring counter, which moves one master per
// clock from master 1 at reset, so switching schemes takes effect in the
// same cycle and the token positions of both rings always agree.
// The default of four masters is the configuration evaluated; the scheme is
// written for up to sixteen.
//
// Interface:
//   clk, rst_n   clock (rising edge), asynchronous active-low reset
//   arbitration  scheme select (ahb_arb_pkg::arb_sel_e encoding)
//   req          bus requests, req[0] = master 1
//   grant        one-hot grant (or zero), combinational from req, the
//                select and the token register
//   token        round robin token position, for observation
module reconfig_arbiter
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   arbitration,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [N-1:0] token
);

  logic [N-1:0] grant_fixed, grant_rr, grant_mrr;
  logic [N-1:0] token_rr, token_mrr;

  fixed_priority_arbiter #(.N(N)) u_fixed (
    .req  (req),
    .grant(grant_fixed)
  );

  round_robin_arbiter #(.N(N)) u_rr (
    .clk  (clk),
    .rst_n(rst_n),
    .req  (req),
    .grant(grant_rr),
    .token(token_rr)
  );

  mrr_arbiter #(.N(N)) u_mrr (
    .clk  (clk),
    .rst_n(rst_n),
    .req  (req),
    .grant(grant_mrr),
    .token(token_mrr)
  );

  always_comb begin
    unique case (arb_sel_e'(arbitration))
      ARB_RR:  grant = grant_rr;
      ARB_MRR: grant = grant_mrr;
      default: grant = grant_fixed;  // ARB_FIXED and the unassigned code
    endcase
  end

  assign token = token_rr;

  initial begin
    assert (N >= 1 && N <= MAX_MASTERS)
      else $error("reconfig_arbiter: N=%0d outside 1..%0d", N, MAX_MASTERS);
  end

  // Bus rules: at most one master owns the bus, only a requester is granted,
  // and the two token rings never disagree.
  a_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_subset:  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
  a_tokens:  assert property (@(posedge clk) disable iff (!rst_n) token_rr == token_mrr);

endmodule
