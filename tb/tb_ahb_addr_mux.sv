// tb_ahb_addr_mux: self-checking test of the address and control
// multiplexer. Random addresses and controls for four masters and a random
// select that is one-hot or zero; the output must equal the selected
// master's address and control, or address zero and an IDLE transfer when
// nothing is selected.
module tb_ahb_addr_mux;
  import ahb_arb_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  sel;
  logic [31:0] haddr_m [4];
  ahb_ctrl_t   hctrl_m [4];
  logic [31:0] haddr;
  ahb_ctrl_t   hctrl;

  ahb_addr_mux #(.N_MASTERS(4), .ADDR_W(32)) dut (
    .sel(sel), .haddr_m(haddr_m), .hctrl_m(hctrl_m), .haddr(haddr), .hctrl(hctrl)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int m;
      for (int i = 0; i < 4; i++) begin
        haddr_m[i] = $urandom;
        hctrl_m[i] = ahb_ctrl_t'($urandom);
      end
      m   = $urandom % 5;  // 4 = no owner
      sel = (m < 4) ? 4'(1 << m) : 4'b0000;
      #1;
      checks++;
      if (m < 4 ? (haddr !== haddr_m[m] || hctrl !== hctrl_m[m])
                : (haddr !== '0 || hctrl !== AHB_CTRL_IDLE)) begin
        failures++;
        $display("FAIL sel=%b haddr=%h hctrl=%h", sel, haddr, hctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
