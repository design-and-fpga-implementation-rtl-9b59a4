// tb_apb_bridge_top_full: the same end-to-end sequence as tb_apb_bridge_top
// (see apb_top_test_body.svh), with the top at its default parameters:
// 32-bit data, an 8-word FIFO, a 5-bit address, three slaves and no wait
// states.
module tb_apb_bridge_top_full;
  localparam int unsigned WS = 0;

  `include "apb_top_test_body.svh"

  apb_bridge_top dut (.*);
endmodule
