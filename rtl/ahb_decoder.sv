// ahb_decoder: address decoder of the shared AHB bus.
//
// Splits the address space into N_SLAVES equal regions by the top
// log2(N_SLAVES) address bits and asserts the one-hot select of the slave
// whose region holds the current address, but only while the address phase
// carries a transfer (HTRANS NONSEQ or SEQ). The equal-region address map is
// this design's choice.
//
// Interface: purely combinational.
//   haddr   address phase address
//   htrans  address phase transfer type
//   hsel    one-hot slave select, zero for IDLE or BUSY
module ahb_decoder
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned ADDR_W   = 32
) (
  input  logic [ADDR_W-1:0]   haddr,
  input  htrans_e             htrans,
  output logic [N_SLAVES-1:0] hsel
);

  localparam int unsigned SW = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  logic [SW-1:0] region;
  logic          active;

  assign region = (N_SLAVES > 1) ? haddr[ADDR_W-1 -: SW] : '0;
  assign active = (htrans == HTRANS_NONSEQ) || (htrans == HTRANS_SEQ);

  always_comb begin
    hsel = '0;
    if (active && 32'(region) < N_SLAVES) hsel[region] = 1'b1;
  end

endmodule
