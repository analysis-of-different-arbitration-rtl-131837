// tb_round_robin_arbiter: self-checking test of the round_robin_arbiter.
//
// A reference model in the testbench keeps its own token index (master 1
// after reset, one step per clock) and works out the expected grant from it
// and the requests. Requests are driven just after each falling edge and
// the combinational grant is checked before the next rising edge. Cycle 1
// is the first cycle after reset, in which the token is at master 1.
// Besides random traffic, two worked examples are timed:
//   - only master 2 requests: granted in cycle 2;
//   - masters 2 and 4 request together (1010) and each drops its request
//     once granted: master 4 is granted in cycle 4.
// A sixteen-master instance runs random traffic against the same model.
module tb_round_robin_arbiter;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [3:0]  req, grant, token;
  logic [15:0] req16, grant16, token16;
  int          tok;  // reference token index

  round_robin_arbiter #(.N(4))  dut   (.clk(clk), .rst_n(rst_n), .req(req),   .grant(grant),   .token(token));
  round_robin_arbiter #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .req(req16), .grant(grant16), .token(token16));

  always #5 clk = ~clk;

  // Reference grant: round robin grants the token holder only; modified
  // round robin grants the first requester at or after the token holder.
  function automatic logic [15:0] ref_grant(logic [15:0] r, int t, int n, bit modified);
    logic [15:0] g;
    g = '0;
    if (!modified) begin
      if (r[t]) g[t] = 1'b1;
    end else begin
      for (int k = 0; k < n; k++) begin
        if (g == '0 && r[(t + k) % n]) g[(t + k) % n] = 1'b1;
      end
    end
    return g;
  endfunction

  localparam bit MODIFIED = 0;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    req   = '0;
    req16 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tok   = 0;
  endtask

  // Requests given by 'start' from cycle 1; each master drops its request
  // in the cycle after it is granted. Returns the cycle master m was granted.
  task automatic timed(logic [3:0] start, int m, output int cycle);
    do_reset();
    req   = start;
    cycle = -1;
    for (int c = 1; c <= 12 && cycle < 0; c++) begin
      #1;
      if (grant[m]) cycle = c;
      req = req & ~grant;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    do_reset();
    // Random traffic, four masters, then sixteen.
    for (int c = 0; c < 300; c++) begin
      req = 4'($urandom);
      #1;
      checks++;
      if (grant !== 4'(ref_grant(16'(req), tok, 4, MODIFIED)) || token !== 4'(1 << tok)) begin
        failures++;
        $display("FAIL cycle %0d tok=%0d req=%b grant=%b token=%b", c, tok, req, grant, token);
      end
      @(negedge clk);
      tok = (tok + 1) % 4;
    end

    do_reset();
    for (int c = 0; c < 300; c++) begin
      req16 = 16'($urandom) & 16'($urandom);
      #1;
      checks++;
      if (grant16 !== ref_grant(req16, c % 16, 16, MODIFIED) || token16 !== 16'(1 << (c % 16))) begin
        failures++;
        $display("FAIL N=16 cycle %0d req=%h grant=%h token=%h", c, req16, grant16, token16);
      end
      @(negedge clk);
    end

    // Worked examples.
    timed(4'b0010, 1, cyc);
    checks++;
    if (cyc != 2) begin
      failures++;
      $display("FAIL master 2 alone granted in cycle %0d, expected 2", cyc);
    end
    timed(4'b1010, 3, cyc);
    checks++;
    if (cyc != 4) begin
      failures++;
      $display("FAIL masters 2+4: master 4 granted in cycle %0d, expected 4", cyc);
    end else $display("masters 2 and 4 requesting: master 4 granted in cycle %0d", cyc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
