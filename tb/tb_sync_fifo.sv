// tb_sync_fifo: self-checking test of the write FIFO at its 8 x 32-bit
// default size. Random pushes and pops are compared against a queue model:
// rdata, empty, full, count and the overflow flag are checked every cycle.
// The test requires that the FIFO was seen full, that an overflow was
// signalled and that it was drained to empty again.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 32, DEPTH = 8, COUNT_W = 16;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0]   wdata = '0, rdata;
  logic               empty, full, overflow;
  logic [COUNT_W-1:0] count;
  logic [WIDTH-1:0]   model[$];
  int                 checks = 0, failures = 0;
  int                 n_full = 0, n_overflow = 0, n_empty_after = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      // phases that favour filling, then draining
      bias = ((i / 200) % 2 == 0) ? 75 : 25;
      @(negedge clk);
      // check the outputs against the model before this cycle's edge
      expect_eq("empty", empty, model.size() == 0);
      expect_eq("full", full, model.size() == DEPTH);
      expect_eq("count", count, model.size());
      if (model.size() != 0) expect_eq("rdata", rdata, model[0]);
      push  = ($urandom_range(0, 99) < bias);
      pop   = ($urandom_range(0, 99) >= bias);
      wdata = $urandom;
      #1;
      expect_eq("overflow", overflow, push && model.size() == DEPTH && !pop);
      if (model.size() == DEPTH) n_full++;
      if (overflow) n_overflow++;
      @(posedge clk);
      begin
        bit did_pop;
        did_pop = pop && model.size() != 0;
        if (did_pop) void'(model.pop_front());
        if (push && (model.size() < DEPTH)) model.push_back(wdata);
        if (did_pop && model.size() == 0 && n_full > 0) n_empty_after++;
      end
    end
    checks++;
    if (n_full == 0 || n_overflow == 0 || n_empty_after == 0) begin
      failures++;
      $display("FAIL coverage: full=%0d overflow=%0d drained=%0d", n_full, n_overflow, n_empty_after);
    end
    $display("full seen %0d, overflow %0d, drained %0d", n_full, n_overflow, n_empty_after);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
