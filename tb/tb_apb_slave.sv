// tb_apb_slave: drives APB write and read transfers into the register-bank
// slave, with two wait states, and checks them against a model of its
// eight registers. For every transfer it checks that PREADY stays low for
// exactly WAIT_STATES ACCESS cycles, that a write updates sout, that reads
// return the model's value and that PRDATA is zero while PSEL is low.
module tb_apb_slave;
  localparam int unsigned DSIZE = 32, REG_AW = 3, WS = 2;

  logic              PCLK = 1'b0, PRESETn = 1'b1;
  logic              PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [REG_AW-1:0] PADDR = '0;
  logic [DSIZE-1:0]  PWDATA = '0, PRDATA, sout;
  logic              PREADY;
  logic [DSIZE-1:0]  model [2**REG_AW];
  logic [DSIZE-1:0]  last_written;
  int                checks = 0, failures = 0;

  apb_slave #(.DSIZE(DSIZE), .REG_AW(REG_AW), .WAIT_STATES(WS)) dut (.*);

  always #5 PCLK = ~PCLK;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic transfer(input logic wr, input logic [REG_AW-1:0] a, input logic [DSIZE-1:0] d);
    int waits;
    @(negedge PCLK);            // SETUP
    PSEL = 1'b1; PENABLE = 1'b0; PWRITE = wr; PADDR = a; PWDATA = d;
    @(negedge PCLK);            // ACCESS
    PENABLE = 1'b1;
    waits = 0;
    while (!PREADY) begin
      @(negedge PCLK);
      waits++;
    end
    expect_eq("wait states", waits, WS);
    if (!wr) expect_eq("read data", PRDATA, model[a]);
    @(posedge PCLK);
    if (wr) begin
      model[a] = d;
      last_written = d;
    end
    @(negedge PCLK);
    PSEL = 1'b0; PENABLE = 1'b0;
    #1;
    expect_eq("sout", sout, last_written);
    expect_eq("PRDATA idle", PRDATA, 0);
  endtask

  initial begin
    repeat (20000) @(posedge PCLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    last_written = '0;
    #1 PRESETn = 1'b0;
    repeat (2) @(posedge PCLK);
    @(negedge PCLK) PRESETn = 1'b1;
    for (int i = 0; i < 8; i++) transfer(1'b0, REG_AW'(i), '0);   // reset values
    for (int i = 0; i < 300; i++)
      transfer(1'($urandom_range(0, 1)), REG_AW'($urandom_range(0, 7)), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
