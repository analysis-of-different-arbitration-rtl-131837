// ahb_arb_pkg: types and constants shared by the arbiter and the AHB bus
// fabric.
//
// arb_sel_e is the encoding of the two-bit ARBITRATION input that selects the
// arbitration scheme at run time: 00 static fixed priority, 01 round robin,
// 10 modified round robin. Code 11 is not assigned a scheme; this design
// treats it as static fixed priority so that the bus is never left without an
// arbiter. ahb_ctrl_t bundles the address-phase control signals that travel
// with the address through the address and control multiplexer; which
// control signals there are, and their widths, follow common AHB practice
// and are this design's choice.
package ahb_arb_pkg;

  // Largest number of masters the reconfigurable arbiter is meant to serve.
  localparam int unsigned MAX_MASTERS = 16;

  typedef enum logic [1:0] {
    ARB_FIXED    = 2'b00,  // static fixed priority
    ARB_RR       = 2'b01,  // round robin (token ring)
    ARB_MRR      = 2'b10,  // modified round robin (token + priority logic)
    ARB_RESERVED = 2'b11   // unassigned, behaves as ARB_FIXED
  } arb_sel_e;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef struct packed {
    htrans_e    htrans;  // transfer type
    logic       hwrite;  // 1 = write, 0 = read
    logic [2:0] hsize;   // transfer size, log2 of bytes
  } ahb_ctrl_t;

  localparam ahb_ctrl_t AHB_CTRL_IDLE = '{htrans: HTRANS_IDLE, hwrite: 1'b0, hsize: 3'd0};

endpackage
