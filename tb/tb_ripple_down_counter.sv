// tb_ripple_down_counter: self-checking test of the 3-bit down ripple
// counter. A reference count (all ones after preset, minus one modulo 8 on
// every clock edge with en high) is compared with q and qb after each edge,
// with en driven at random. The asynchronous preset is also pulsed between
// clock edges and must force 3'b111 at once. A full wrap 000 -> 111 is
// required to have happened.
module tb_ripple_down_counter;
  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         preset_n = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] q, qb;
  logic [W-1:0] ref_q;
  int           checks = 0, failures = 0, wraps = 0;

  ripple_down_counter #(.WIDTH(W)) dut (.clk(clk), .preset_n(preset_n), .en(en), .q(q), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== ref_q || qb !== ~ref_q) begin
      failures++;
      $display("FAIL %s: q=%b qb=%b expected %b", what, q, qb, ref_q);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '1;
    #1 check("power-up value");
    #1 preset_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("held in preset");
    @(negedge clk) preset_n = 1'b1;
    // plain counting, enable always high: 111,110,...,000,111
    en = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk);
      ref_q = ref_q - 1'b1;
      if (ref_q == '1) wraps++;
      #1 check("count");
    end
    // random enable
    for (int i = 0; i < 500; i++) begin
      @(negedge clk) en = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) begin
        ref_q = ref_q - 1'b1;
        if (ref_q == '1) wraps++;
      end
      #1 check("random enable");
      // occasional asynchronous preset in the middle of a cycle
      if ($urandom_range(0, 30) == 0) begin
        #2 preset_n = 1'b0;
        ref_q = '1;
        #1 check("async preset");
        @(negedge clk) begin
          en = 1'b0;
          preset_n = 1'b1;
        end
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
