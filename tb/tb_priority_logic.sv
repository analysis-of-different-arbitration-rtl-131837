// tb_priority_logic: self-checking test of the priority encoder/decoder
// block. Four-input instance: every combination of enable and requests is
// applied and the one-hot output is compared with the lowest set request
// bit (x & -x), gated by the enable. Sixteen-input instance: random
// requests, same reference.
module tb_priority_logic;

  int checks = 0, failures = 0;

  logic        en4;
  logic [3:0]  req4, gnt4;
  logic        en16;
  logic [15:0] req16, gnt16;

  priority_logic #(.N(4))  dut4  (.en(en4),  .in_req(req4),  .out_gnt(gnt4));
  priority_logic #(.N(16)) dut16 (.en(en16), .in_req(req16), .out_gnt(gnt16));

  task automatic check4(logic [3:0] exp);
    checks++;
    if (gnt4 !== exp) begin
      failures++;
      $display("FAIL N=4 en=%b req=%b out=%b exp=%b", en4, req4, gnt4, exp);
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
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 16; r++) begin
        en4  = 1'(e);
        req4 = 4'(r);
        #1;
        check4(e ? (req4 & (~req4 + 4'd1)) : 4'b0000);
      end
    end
    // Worked example: only in[2] and in[3] requesting -> out[2].
    en4 = 1'b1; req4 = 4'b1100; #1; check4(4'b0100);

    for (int t = 0; t < 2000; t++) begin
      en16  = ($urandom % 4) != 0;
      req16 = 16'($urandom) & 16'($urandom);
      #1;
      checks++;
      if (gnt16 !== (en16 ? (req16 & (~req16 + 16'd1)) : 16'd0)) begin
        failures++;
        $display("FAIL N=16 en=%b req=%h out=%h", en16, req16, gnt16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
