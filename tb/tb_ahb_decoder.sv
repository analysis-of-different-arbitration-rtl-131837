// tb_ahb_decoder: self-checking test of the address decoder. For random
// addresses and every transfer type, the select must be the one-hot code of
// the top two address bits for NONSEQ and SEQ transfers and zero for IDLE
// and BUSY. Each of the four slave regions must be hit.
module tb_ahb_decoder;
  import ahb_arb_pkg::*;

  int checks = 0, failures = 0;
  int hits [4];

  logic [31:0] haddr;
  htrans_e     htrans;
  logic [3:0]  hsel;

  ahb_decoder #(.N_SLAVES(4), .ADDR_W(32)) dut (.haddr(haddr), .htrans(htrans), .hsel(hsel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [3:0] exp;
      haddr  = $urandom;
      htrans = htrans_e'($urandom % 4);
      exp = (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ) ? 4'(1 << haddr[31:30]) : 4'b0000;
      if (exp != 0) hits[haddr[31:30]]++;
      #1;
      checks++;
      if (hsel !== exp) begin
        failures++;
        $display("FAIL haddr=%h htrans=%0d hsel=%b exp=%b", haddr, htrans, hsel, exp);
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (hits[s] == 0) begin
        failures++;
        $display("FAIL region %0d never hit", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
