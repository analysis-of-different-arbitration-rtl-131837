// ahb_rdata_mux: read data multiplexer of the shared AHB bus.
//
// Slaves return read data in the data phase, one cycle after the address
// phase in which the decoder selected them. The multiplexer registers the
// decoder's one-hot slave select on every rising clock edge and uses it to
// pass that slave's read data back to the masters (all masters see the same
// read data; the one that owned the address phase takes it). With no slave
// selected in the previous cycle the output is zero. Zero wait states are
// assumed.
//
// Interface:
//   clk, rst_n  clock (rising edge), asynchronous active-low reset
//   hsel        one-hot slave select from the decoder (address phase)
//   hrdata_s    read data of each slave
//   hrdata      read data of the data phase slave, to all masters
module ahb_rdata_mux #(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned DATA_W   = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_SLAVES-1:0] hsel,
  input  logic [DATA_W-1:0]   hrdata_s [N_SLAVES],
  output logic [DATA_W-1:0]   hrdata
);

  logic [N_SLAVES-1:0] dsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsel <= '0;
    else        dsel <= hsel;
  end

  always_comb begin
    hrdata = '0;
    for (int i = 0; i < N_SLAVES; i++) hrdata |= hrdata_s[i] & {DATA_W{dsel[i]}};
  end

endmodule
