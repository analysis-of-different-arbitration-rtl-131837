// tb_ring_counter: self-checking test of the token ring. After reset the
// token must be at bit 0 and then advance one bit per rising edge, wrapping
// from the last bit to bit 0 (1000 -> 0001 -> 0010 -> 0100 for four
// masters). A second reset in mid-run must bring it back to bit 0. A
// five-bit instance checks the wrap for a size that is not a power of two.
module tb_ring_counter;

  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] token;
  logic [4:0] token5;

  ring_counter #(.N(4)) dut  (.clk(clk), .rst_n(rst_n), .token(token));
  ring_counter #(.N(5)) dut5 (.clk(clk), .rst_n(rst_n), .token(token5));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      #1;
      checks++;
      if (token !== 4'(1 << (c % 4)) || token5 !== 5'(1 << (c % 5))) begin
        failures++;
        $display("FAIL cycle %0d token=%b token5=%b", c, token, token5);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(23);
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    checks++;
    if (token !== 4'b0001) begin
      failures++;
      $display("FAIL asynchronous reset token=%b", token);
    end
    @(negedge clk);
    rst_n = 1'b1;
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
