// reset_controller: conditions the external APB reset for the bridge.
//
// PRESETn (active low) may come from a push button or another clock
// domain. It is applied to the bridge at once (asynchronous assertion) but
// released only after it has passed through STAGES flip-flops clocked by
// PCLK (synchronous release), so every flip-flop of the bridge leaves reset
// on the same clock edge and the release cannot violate recovery time.
//
// Interface: PCLK, PRESETn in; rst_n out, low while PRESETn is low and for
// STAGES rising PCLK edges after PRESETn rises.
// That a reset controller exists comes from the design; how it works is this
// design's choice.
module reset_controller #(
  parameter int unsigned STAGES = 2
) (
  input  logic PCLK,
  input  logic PRESETn,
  output logic rst_n
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) sync_q <= '0;
    else          sync_q <= (sync_q << 1) | STAGES'(1);
  end

  assign rst_n = sync_q[STAGES-1];

endmodule
