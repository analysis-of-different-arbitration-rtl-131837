// tb_fixed_priority_arbiter: self-checking test of static fixed priority.
// All 16 request patterns of the four-master arbiter are applied and the
// grant is compared with the highest-priority (lowest-numbered) requester,
// worked out as the lowest set bit. Includes the 1001 pattern (masters 1
// and 4 both request, master 1 wins) and masters 2 and 4 (master 2 wins,
// then master 1 pre-empts master 4, then master 4 once alone).
module tb_fixed_priority_arbiter;

  int checks = 0, failures = 0;

  logic [3:0] req, grant;

  fixed_priority_arbiter #(.N(4)) dut (.req(req), .grant(grant));

  task automatic expect_grant(logic [3:0] r, logic [3:0] exp);
    req = r;
    #1;
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL req=%b grant=%b exp=%b", req, grant, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      logic [3:0] exp;
      exp = '0;
      for (int i = 3; i >= 0; i--) if (r[i]) exp = 4'b1 << i;
      expect_grant(4'(r), exp);
    end
    expect_grant(4'b1001, 4'b0001);  // masters 1 and 4
    expect_grant(4'b1010, 4'b0010);  // masters 2 and 4: master 2 first
    expect_grant(4'b1001, 4'b0001);  // master 1 arrives, master 2 done
    expect_grant(4'b1000, 4'b1000);  // master 4 alone at last
    expect_grant(4'b0000, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
