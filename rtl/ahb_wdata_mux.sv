// ahb_wdata_mux: write data multiplexer of the shared AHB bus.
//
// On AHB the write data of a transfer follows its address by one cycle (the
// data phase). This multiplexer therefore registers the one-hot address
// phase owner on every rising clock edge and uses that registered owner to
// pass one master's write data on to the slaves. With no owner in the
// previous cycle the output is zero. Zero wait states are assumed: the data
// phase always completes in one cycle, so there is no stall input.
//
// Interface:
//   clk, rst_n  clock (rising edge), asynchronous active-low reset
//   sel         one-hot address phase owner (the grant)
//   hwdata_m    write data of each master
//   hwdata      write data of the data phase owner, to all slaves
//   dsel        the registered data phase owner, for observation
module ahb_wdata_mux #(
  parameter int unsigned N_MASTERS = 4,
  parameter int unsigned DATA_W    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] sel,
  input  logic [DATA_W-1:0]    hwdata_m [N_MASTERS],
  output logic [DATA_W-1:0]    hwdata,
  output logic [N_MASTERS-1:0] dsel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsel <= '0;
    else        dsel <= sel;
  end

  always_comb begin
    hwdata = '0;
    for (int i = 0; i < N_MASTERS; i++) hwdata |= hwdata_m[i] & {DATA_W{dsel[i]}};
  end

endmodule
