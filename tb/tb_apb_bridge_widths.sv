// tb_apb_bridge_widths: runs the complete bridge at the two other data
// widths it is meant for: 8 bits (the width of the FPGA board build, whose
// slave output drives eight LEDs) and 64 bits. For each width the test
// writes a word to every register of every slave, checks each slave's sout
// after each write, reads all 32 addresses back (unmapped ones read zero)
// and checks the wait-free transfer time of 4 cycles per write.
// On the 8-bit build the first word written is 8'b1101_1001.
module tb_apb_bridge_widths;
  localparam int unsigned AW = 5, NSLAVE = 3;

  logic PCLK = 1'b0, PRESETn = 1'b1;
  int   checks = 0, failures = 0;

  always #5 PCLK = ~PCLK;

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---- 8-bit and 64-bit instances, driven by the same host sequence ----
  logic          wr8 = 1'b0, rd8 = 1'b0, wr64 = 1'b0, rd64 = 1'b0;
  logic [7:0]    wd8 = '0;
  logic [63:0]   wd64 = '0;
  logic [AW-1:0] addr = '0;
  logic [7:0]    rdata8;
  logic [63:0]   rdata64;
  logic          rv8, rv64, empty8, empty64;
  logic [NSLAVE-1:0][7:0]  sout8;
  logic [NSLAVE-1:0][63:0] sout64;

  apb_bridge_top #(.DSIZE(8)) u8 (
    .PCLK(PCLK), .PRESETn(PRESETn), .apb_write(wr8), .apb_read(rd8),
    .apb_write_data(wd8), .PADDRESS(addr), .apb_read_data(rdata8), .read_valid(rv8),
    .read_busy(), .empty(empty8), .full(), .wr_overflow(), .fifo_count(),
    .PADDR(), .PWRITE(), .PSEL(), .PENABLE(), .PREADY(), .seq_out(), .seq_qb(),
    .sout(sout8));

  apb_bridge_top #(.DSIZE(64)) u64 (
    .PCLK(PCLK), .PRESETn(PRESETn), .apb_write(wr64), .apb_read(rd64),
    .apb_write_data(wd64), .PADDRESS(addr), .apb_read_data(rdata64), .read_valid(rv64),
    .read_busy(), .empty(empty64), .full(), .wr_overflow(), .fifo_count(),
    .PADDR(), .PWRITE(), .PSEL(), .PENABLE(), .PREADY(), .seq_out(), .seq_qb(),
    .sout(sout64));

  logic [7:0]  ref8  [4][8];
  logic [63:0] ref64 [4][8];

  initial begin
    repeat (20000) @(posedge PCLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) for (int r = 0; r < 8; r++) begin
      ref8[s][r] = '0; ref64[s][r] = '0;
    end
    #1 PRESETn = 1'b0;
    repeat (3) @(posedge PCLK);
    @(negedge PCLK) PRESETn = 1'b1;
    repeat (3) @(posedge PCLK);

    // writes: one at a time, each must reach sout 3 cycles after acceptance
    for (int a = 0; a < 24; a++) begin
      @(negedge PCLK);
      addr = AW'(a);
      wd8  = (a == 1) ? 8'b1101_1001 : 8'($urandom);
      wd64 = {$urandom, $urandom};
      wr8 = 1'b1; wr64 = 1'b1;
      ref8[a / 8][a % 8]  = wd8;
      ref64[a / 8][a % 8] = wd64;
      @(posedge PCLK);
      @(negedge PCLK) begin wr8 = 1'b0; wr64 = 1'b0; end
      repeat (2) @(posedge PCLK);
      #1;
      // two cycles after acceptance the slave still shows its previous word
      expect_eq("sout8 not before 3 cycles", sout8[a / 8], (a % 8 == 0) ? 8'h00 : ref8[a / 8][a % 8 - 1]);
      expect_eq("sout64 not before 3 cycles", sout64[a / 8], (a % 8 == 0) ? 64'h0 : ref64[a / 8][a % 8 - 1]);
      @(posedge PCLK);
      #1;
      expect_eq("sout8", sout8[a / 8], wd8);
      expect_eq("sout64", sout64[a / 8], wd64);
      repeat (2) @(posedge PCLK);
    end
    // read-back of every address, unmapped included
    for (int a = 0; a < 32; a++) begin
      @(negedge PCLK);
      addr = AW'(a);
      rd8 = 1'b1; rd64 = 1'b1;
      @(negedge PCLK) begin rd8 = 1'b0; rd64 = 1'b0; end
      while (!rv8) @(negedge PCLK);
      expect_eq("read8", rdata8, ref8[a / 8][a % 8]);
      expect_eq("read64 valid together", rv64, 1'b1);
      expect_eq("read64", rdata64, ref64[a / 8][a % 8]);
      @(negedge PCLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
