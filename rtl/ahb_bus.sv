// ahb_bus: shared AHB bus with a reconfigurable arbiter.
//
// Several masters share one bus to several slaves. Each master raises its
// own request line; the arbiter grants the bus to one of them per cycle by
// the scheme chosen on the ARBITRATION input (static fixed priority, round
// robin or modified round robin, see reconfig_arbiter). The granted master's
// address and control pass through the address and control multiplexer to
// every slave and to the decoder, which selects one slave by address. One
// cycle later, in the data phase, the write data multiplexer passes the same
// master's write data to the slaves and the read data multiplexer returns
// the selected slave's read data to the masters.
//
// The arbiter with its three schemes, four masters, and the block structure
// (arbiter, address and control mux, write data mux, read data mux, decoder,
// four slaves) follow the document. The timing (grant valid in the cycle it
// is given and used as the address phase owner in that same cycle), zero
// wait states, the widths, the control signals and the equal-region address
// map are this design's choices.
//
// Interface (all single-clock, rising edge, asynchronous active-low reset):
//   arbitration  scheme select, 00 fixed, 01 round robin, 10 modified RR
//   hbusreq      request per master, bit 0 = master 1
//   hgrant       one-hot grant per master, combinational
//   token        round robin token position
//   haddr_m, hctrl_m, hwdata_m   per-master address, control, write data
//   haddr, hctrl  address phase on the bus, to the slaves
//   hsel          one-hot slave select (address phase)
//   hwdata        write data on the bus (data phase)
//   hrdata_s      per-slave read data (data phase)
//   hrdata        read data returned to the masters (data phase)
module ahb_bus
  import ahb_arb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 4,
  parameter int unsigned N_SLAVES  = 4,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned DATA_W    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           arbitration,
  // master side
  input  logic [N_MASTERS-1:0] hbusreq,
  output logic [N_MASTERS-1:0] hgrant,
  output logic [N_MASTERS-1:0] token,
  input  logic [ADDR_W-1:0]    haddr_m  [N_MASTERS],
  input  ahb_ctrl_t            hctrl_m  [N_MASTERS],
  input  logic [DATA_W-1:0]    hwdata_m [N_MASTERS],
  output logic [DATA_W-1:0]    hrdata,
  // slave side
  output logic [ADDR_W-1:0]    haddr,
  output ahb_ctrl_t            hctrl,
  output logic [N_SLAVES-1:0]  hsel,
  output logic [DATA_W-1:0]    hwdata,
  input  logic [DATA_W-1:0]    hrdata_s [N_SLAVES]
);

  logic [N_MASTERS-1:0] wdata_owner;

  reconfig_arbiter #(.N(N_MASTERS)) u_arbiter (
    .clk        (clk),
    .rst_n      (rst_n),
    .arbitration(arbitration),
    .req        (hbusreq),
    .grant      (hgrant),
    .token      (token)
  );

  ahb_addr_mux #(.N_MASTERS(N_MASTERS), .ADDR_W(ADDR_W)) u_addr_mux (
    .sel    (hgrant),
    .haddr_m(haddr_m),
    .hctrl_m(hctrl_m),
    .haddr  (haddr),
    .hctrl  (hctrl)
  );

  ahb_decoder #(.N_SLAVES(N_SLAVES), .ADDR_W(ADDR_W)) u_decoder (
    .haddr (haddr),
    .htrans(hctrl.htrans),
    .hsel  (hsel)
  );

  ahb_wdata_mux #(.N_MASTERS(N_MASTERS), .DATA_W(DATA_W)) u_wdata_mux (
    .clk     (clk),
    .rst_n   (rst_n),
    .sel     (hgrant),
    .hwdata_m(hwdata_m),
    .hwdata  (hwdata),
    .dsel    (wdata_owner)
  );

  ahb_rdata_mux #(.N_SLAVES(N_SLAVES), .DATA_W(DATA_W)) u_rdata_mux (
    .clk     (clk),
    .rst_n   (rst_n),
    .hsel    (hsel),
    .hrdata_s(hrdata_s),
    .hrdata  (hrdata)
  );

  // The write data owner is always last cycle's address phase owner.
  a_wowner: assert property (@(posedge clk) disable iff (!rst_n)
                             ##1 $past(rst_n) |-> wdata_owner == $past(hgrant));

endmodule
