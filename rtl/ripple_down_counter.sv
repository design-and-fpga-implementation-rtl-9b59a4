// ripple_down_counter: asynchronous (ripple) down counter of toggle stages.
//
// Each stage is a D flip-flop whose D input is fed from its own inverted
// output, so it toggles on every rising edge of its clock. Stage 0 is
// clocked by clk; every later stage is clocked by the Q output of the stage
// before it. A rising Q means the lower stage has just wrapped from 0 to 1,
// so the count goes down by one per active clk edge: 111, 110, 101, ... 000,
// 111. Only stage 0 sits on the clock tree, which is the point of the
// structure: the clock drives one flip-flop load instead of WIDTH loads.
//
// Interface:
//   clk       clock of stage 0
//   preset_n  asynchronous, active low: forces every stage to 1 (count all
//             ones). It must come straight from a flip-flop so it is glitch
//             free.
//   en        stage 0 toggles on a rising clk edge only when en is high
//             (a multiplexer on D, not a gated clock)
//   q, qb     count and its bitwise complement
//
// Power-up: every stage also has an initial value of 1, so the counter
// starts at all ones on an FPGA even before the first preset. A stage other
// than stage 0 is only clocked by the stage before it, so this keeps a
// preset that is already low at power-up from depending on an edge.
//
// Timing: the count settles WIDTH flip-flop delays after the clk edge,
// passing through intermediate codes (110 -> 111 -> 101) while it ripples,
// so q must only be sampled by logic clocked by the next clk edge.
// The ripple structure and the down direction follow the three-bit
// counter the design is built around; the enable, the preset and the
// all-ones start value are this design's choices.
module ripple_down_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             preset_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] qb
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic stage_q = 1'b1;  // power-up value (FPGA flip-flop init)
    if (i == 0) begin : g_first
      always_ff @(posedge clk or negedge preset_n) begin
        if (!preset_n)  stage_q <= 1'b1;
        else if (en)    stage_q <= ~stage_q;
      end
    end else begin : g_next
      // clocked by the previous stage's Q
      always_ff @(posedge g_stage[i-1].stage_q or negedge preset_n) begin
        if (!preset_n) stage_q <= 1'b1;
        else           stage_q <= ~stage_q;
      end
    end
    assign q[i]  = stage_q;
    assign qb[i] = ~stage_q;
  end

endmodule
