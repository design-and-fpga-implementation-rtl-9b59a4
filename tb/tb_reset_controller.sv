// tb_reset_controller: checks the reset conditioning. rst_n must fall at
// once (between clock edges) when PRESETn falls, stay low while PRESETn is
// low, and rise exactly on the second rising PCLK edge after PRESETn rises.
// Release is tried at random points within the clock period.
module tb_reset_controller;
  logic PCLK = 1'b0, PRESETn = 1'b1, rst_n;
  int   checks = 0, failures = 0;

  reset_controller #(.STAGES(2)) dut (.PCLK(PCLK), .PRESETn(PRESETn), .rst_n(rst_n));

  always #5 PCLK = ~PCLK;

  task automatic expect_rst(input logic exp, input string what);
    checks++;
    if (rst_n !== exp) begin
      failures++;
      $display("FAIL %s: rst_n=%b expected %b at %0t", what, rst_n, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge PCLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge PCLK);
    #1 expect_rst(1'b1, "released after power-up");
    for (int n = 0; n < 50; n++) begin
      // assert in the middle of a cycle: takes effect immediately
      #($urandom_range(1, 3));
      PRESETn = 1'b0;
      #1 expect_rst(1'b0, "asynchronous assertion");
      repeat ($urandom_range(1, 4)) @(posedge PCLK);
      #1 expect_rst(1'b0, "held while PRESETn low");
      #($urandom_range(1, 3));
      PRESETn = 1'b1;
      #1 expect_rst(1'b0, "not yet released");
      @(posedge PCLK);
      #1 expect_rst(1'b0, "still low after first edge");
      @(posedge PCLK);
      #1 expect_rst(1'b1, "released on second edge");
      repeat ($urandom_range(0, 3)) @(posedge PCLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
