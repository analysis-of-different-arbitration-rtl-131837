// tb_reconfig_arbiter: self-checking test of the reconfigurable arbiter.
//
// Random requests and a randomly changing ARBITRATION code are applied every
// cycle. A reference model keeps its own token index (master 1 after reset,
// one step per clock) and computes the expected grant for the selected
// scheme: 00 and the unassigned 11 fixed priority, 01 round robin, 10
// modified round robin. Each scheme is also run on the 1001 pattern of
// masters 1 and 4 for eight cycles: fixed priority must grant master 1
// every cycle, round robin master 1 and master 4 once each per four cycles,
// modified round robin every cycle.
module tb_reconfig_arbiter;

  int checks = 0, failures = 0;
  int seen [4];  // cycles checked per ARBITRATION code

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] arbitration;
  logic [3:0] req, grant, token;
  int         tok;

  reconfig_arbiter #(.N(4)) dut (
    .clk(clk), .rst_n(rst_n), .arbitration(arbitration),
    .req(req), .grant(grant), .token(token)
  );

  always #5 clk = ~clk;

  function automatic logic [3:0] ref_grant(logic [1:0] a, logic [3:0] r, int t);
    logic [3:0] g;
    g = '0;
    case (a)
      2'b01: if (r[t]) g[t] = 1'b1;
      2'b10: for (int k = 0; k < 4; k++) if (g == '0 && r[(t + k) % 4]) g[(t + k) % 4] = 1'b1;
      default: for (int i = 3; i >= 0; i--) if (r[i]) g = 4'b1 << i;
    endcase
    return g;
  endfunction

  task automatic step_check();
    #1;
    checks++;
    seen[arbitration]++;
    if (grant !== ref_grant(arbitration, req, tok) || token !== 4'(1 << tok)) begin
      failures++;
      $display("FAIL arb=%b tok=%0d req=%b grant=%b token=%b", arbitration, tok, req, grant, token);
    end
    @(negedge clk);
    tok = (tok + 1) % 4;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n1, n4;
    arbitration = 2'b00;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tok = 0;
    for (int c = 0; c < 400; c++) begin
      arbitration = 2'($urandom);
      req         = 4'($urandom);
      step_check();
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (seen[a] == 0) begin
        failures++;
        $display("FAIL code %0d never exercised", a);
      end
    end
    // HBUSREQ = 1001 under each scheme.
    for (int a = 0; a < 3; a++) begin
      arbitration = 2'(a);
      req = 4'b1001;
      n1 = 0;
      n4 = 0;
      for (int c = 0; c < 8; c++) begin
        #1;
        n1 += int'(grant[0]);
        n4 += int'(grant[3]);
        step_check();
      end
      checks++;
      if ((a == 0 && !(n1 == 8 && n4 == 0)) || (a == 1 && !(n1 == 2 && n4 == 2)) ||
          (a == 2 && (n1 + n4) != 8)) begin
        failures++;
        $display("FAIL 1001 pattern scheme %0d: master1 %0d, master4 %0d grants", a, n1, n4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
