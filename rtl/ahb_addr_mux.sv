// ahb_addr_mux: address and control multiplexer of the shared AHB bus.
//
// Passes the address and control signals of the master that currently owns
// the bus on to all slaves. The owner is given by the arbiter's one-hot
// grant; the multiplexer is an AND-OR structure, so with no grant it drives
// address zero and an IDLE transfer, and no slave is asked to act. The
// address is the address phase of a transfer: it is valid in the cycle the
// master holds the grant, and its data phase follows one cycle later in the
// write and read data multiplexers. Selecting by the grant of the same cycle
// is this design's choice.
//
// Interface: purely combinational.
//   sel          one-hot owner of the address phase (the grant)
//   haddr_m      address of each master
//   hctrl_m      control (HTRANS, HWRITE, HSIZE) of each master
//   haddr, hctrl selected address and control, to the slaves and decoder
module ahb_addr_mux
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 4,
  parameter int unsigned ADDR_W    = 32
) (
  input  logic [N_MASTERS-1:0]   sel,
  input  logic [ADDR_W-1:0]      haddr_m [N_MASTERS],
  input  ahb_ctrl_t              hctrl_m [N_MASTERS],
  output logic [ADDR_W-1:0]      haddr,
  output ahb_ctrl_t              hctrl
);

  always_comb begin
    haddr = '0;
    hctrl = AHB_CTRL_IDLE;
    for (int i = 0; i < N_MASTERS; i++) begin
      haddr |= haddr_m[i] & {ADDR_W{sel[i]}};
      hctrl |= hctrl_m[i] & {$bits(ahb_ctrl_t){sel[i]}};
    end
  end

endmodule
