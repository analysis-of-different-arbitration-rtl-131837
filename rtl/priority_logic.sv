// priority_logic: priority encoder followed by a decoder, with an enable.
//
// This is the "priority logic" block of the modified round robin arbiter.
// The encoder finds the lowest-numbered asserted input (in_req[0] has the
// highest priority) and produces its index; the decoder turns that index
// back into a one-hot vector. The one-hot output is driven only while en is
// high; otherwise, or when no input is asserted, out_gnt is all zero. The
// modified round robin arbiter instantiates one of these per master, feeds
// each with the request vector rotated so that its own master comes first,
// and enables it with that master's token bit. The split into an encoder and
// a decoder and the enable follow the document; the use of the index
// (rather than a direct thermometer chain) is kept to mirror that split.
//
// Interface: purely combinational, no clock.
//   en       enable (token bit)
//   in_req   request inputs, in_req[0] highest priority
//   out_gnt  one-hot grant, all zero when en is low or nothing is requested
module priority_logic #(
  parameter int unsigned N = 4
) (
  input  logic         en,
  input  logic [N-1:0] in_req,
  output logic [N-1:0] out_gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] idx;    // encoder output
  logic          valid;  // some input is asserted

  // Priority encoder: scan from the lowest priority upwards so that the
  // highest-priority asserted input is the last one written.
  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_req[i]) begin
        idx   = IW'(i);
        valid = 1'b1;
      end
    end
  end

  // Decoder with enable.
  always_comb begin
    out_gnt = '0;
    if (en && valid) out_gnt[idx] = 1'b1;
  end

endmodule
