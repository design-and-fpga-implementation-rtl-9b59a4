// tb_apb_bridge_top: end-to-end test of the bridge with its three slaves,
// with every slave inserting one wait state so that PREADY stalls happen
// on every transfer. The test sequence and its checks are described in
// apb_top_test_body.svh.
module tb_apb_bridge_top;
  localparam int unsigned WS = 1;

  `include "apb_top_test_body.svh"

  apb_bridge_top #(.WAIT_STATES(WS)) dut (.*);
endmodule
