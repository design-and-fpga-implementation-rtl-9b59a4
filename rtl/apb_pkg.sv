// apb_pkg: constants and types shared by the APB bridge modules.
//
// The bridge's transfer sequencer is a 3-bit down ripple counter, so the
// codes of its three phases are consecutive down-count values: IDLE is
// 3'b111, SETUP 3'b110 and ACCESS 3'b101 (the s0, s1 and s2 of the design).
// A counter reloaded to all ones steps IDLE -> SETUP -> ACCESS with two
// decrements. The default widths are those of the 32-bit configuration:
// 32-bit data, an 8-entry write FIFO, a 5-bit address and three slaves.
package apb_pkg;

  // Phase codes held by the ripple-counter sequencer.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'b111,  // s0: no transfer on the bus
    PH_SETUP  = 3'b110,  // s1: PSEL high, PENABLE low
    PH_ACCESS = 3'b101   // s2: PSEL and PENABLE high until PREADY
  } apb_phase_e;

  localparam int unsigned DSIZE_DEFAULT  = 32;  // data width in bits
  localparam int unsigned ASIZE_DEFAULT  = 8;   // write FIFO depth in words
  localparam int unsigned AW_DEFAULT     = 5;   // APB address width
  localparam int unsigned NSLAVE_DEFAULT = 3;   // number of APB slaves

endpackage
