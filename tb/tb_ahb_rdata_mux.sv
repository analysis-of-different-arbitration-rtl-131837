// tb_ahb_rdata_mux: self-checking test of the rdata multiplexer. A random
// one-hot (or empty) address phase select is applied every cycle with new
// random data on every input; in the following cycle (the data phase) the
// output must be the data of the slave selected one cycle earlier, or zero
// when none was. Reset must clear the remembered select.
module tb_ahb_rdata_mux;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [3:0]  sel;
  logic [31:0] din [4];
  logic [31:0] dout;

  int          prev;  // index selected in the previous cycle, 4 = none

  ahb_rdata_mux #(.N_SLAVES(4), .DATA_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .hsel(sel), .hrdata_s(din), .hrdata(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 4'b0001;
    for (int i = 0; i < 4; i++) din[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (dout !== '0) begin
      failures++;
      $display("FAIL output not zero after reset: %h", dout);
    end
    prev = 4;
    for (int t = 0; t < 400; t++) begin
      int m;
      // New data and a new address phase select in every cycle; the output
      // must still follow last cycle's select.
      for (int i = 0; i < 4; i++) din[i] = $urandom;
      m   = $urandom % 5;
      sel = (m < 4) ? 4'(1 << m) : 4'b0000;
      #1;
      checks++;
      if (dout !== (prev < 4 ? din[prev] : 32'd0)) begin
        failures++;
        $display("FAIL cycle %0d prev=%0d dout=%h", t, prev, dout);
      end
      prev = m;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
