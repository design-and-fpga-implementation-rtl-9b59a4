// apb_top_test_body.svh: end-to-end test sequence for apb_bridge_top,
// shared by the testbenches that run the top at different wait-state
// settings. The including module defines WS (the slaves' wait states) and
// instantiates the top, named dut, on the signals declared here.
//
// Sequence:
//  1. reset; a write of 32'hCCCC_AAE0 to address 5'b00001 (slave 0,
//     register 1) must reach slave 0's sout 3 + WS cycles after the write
//     is accepted;
//  2. a read of the same address must return it, with read_valid high
//     4 + WS cycles after the read request is accepted;
//  3. a burst of 24 writes to random addresses, pushed back to back, must
//     fill the FIFO and overflow; the FIFO must drain one word every
//     4 + WS cycles (4 for an unmapped address); accepted writes to each slave must end up on sout;
//  4. every one of the 32 addresses is read back and compared with a
//     reference memory (unmapped addresses read zero);
//  5. reset is applied in the middle of a burst: the FIFO must empty and
//     every slave output must clear.
// Mechanism counters (FIFO full, overflow, PREADY wait, unmapped access,
// reads, writes per slave, reset during traffic) must all be non-zero.

localparam int unsigned DSIZE = 32, ASIZE = 8, AW = 5, NSLAVE = 3;

logic                         PCLK = 1'b0, PRESETn = 1'b1;
logic                         apb_write = 1'b0, apb_read = 1'b0;
logic [DSIZE-1:0]             apb_write_data = '0;
logic [AW-1:0]                PADDRESS = '0;
logic [DSIZE-1:0]             apb_read_data;
logic                         read_valid, read_busy, empty, full, wr_overflow;
logic [15:0]                  fifo_count;
logic [AW-1:0]                PADDR;
logic                         PWRITE, PENABLE, PREADY;
logic [NSLAVE-1:0]            PSEL;
logic [2:0]                   seq_out, seq_qb;
logic [NSLAVE-1:0][DSIZE-1:0] sout;

logic [DSIZE-1:0] refmem [4][8];      // index 3: unmapped, stays zero
logic [DSIZE-1:0] ref_sout [NSLAVE];
int               checks = 0, failures = 0, cyc = 0;
int               n_full = 0, n_overflow = 0, n_wait = 0, n_unmapped = 0;
int               n_reads = 0, n_reset = 0;
int               n_wr_slave [NSLAVE];

always #5 PCLK = ~PCLK;
always @(posedge PCLK) cyc++;

task automatic expect_eq(input string what, input longint got, input longint exp);
  checks++;
  if (got != exp) begin
    failures++;
    $display("FAIL %s: got %0h expected %0h at cycle %0d", what, got, exp, cyc);
  end
endtask

// bus-side mechanism counters, sampled mid-cycle
always @(negedge PCLK) if (PRESETn) begin
  if (full) n_full++;
  if (PENABLE && !PREADY) n_wait++;
  if (PENABLE && PREADY && PSEL == '0) n_unmapped++;
  if (PENABLE && PREADY && PWRITE && PSEL != '0) n_wr_slave[PADDR[4:3]]++;
end

task automatic do_reset();
  @(negedge PCLK) PRESETn = 1'b0;
  repeat (3) @(posedge PCLK);
  @(negedge PCLK) PRESETn = 1'b1;
  repeat (3) @(posedge PCLK);   // two-stage reset release
  for (int s = 0; s < 4; s++) for (int r = 0; r < 8; r++) refmem[s][r] = '0;
  for (int s = 0; s < NSLAVE; s++) ref_sout[s] = '0;
endtask

// one-cycle write request; returns 1 if the bridge accepted it
task automatic host_write(input logic [AW-1:0] a, input logic [DSIZE-1:0] d, output bit accepted);
  @(negedge PCLK);
  apb_write = 1'b1; PADDRESS = a; apb_write_data = d;
  #1 accepted = !wr_overflow;
  @(posedge PCLK);
  if (accepted) begin
    if (a[4:3] < NSLAVE) begin
      refmem[a[4:3]][a[2:0]] = d;
      ref_sout[a[4:3]] = d;
    end
  end else n_overflow++;
  @(negedge PCLK) apb_write = 1'b0;
endtask

task automatic wait_idle();
  int guard = 0;
  while (!(empty && !read_busy && seq_out == 3'b111 && !PENABLE) && guard < 1000) begin
    @(posedge PCLK);
    guard++;
  end
  repeat (3) @(posedge PCLK);
endtask

// read one address, checking the result and the cycles it took
task automatic host_read(input logic [AW-1:0] a, input bit check_latency);
  int start;
  @(negedge PCLK);
  apb_read = 1'b1; PADDRESS = a;
  @(posedge PCLK);
  start = cyc;
  @(negedge PCLK) apb_read = 1'b0;
  while (!read_valid && cyc - start < 100) @(negedge PCLK);
  if (check_latency) expect_eq("read latency", cyc - start, 4 + WS);
  expect_eq("read data", apb_read_data, refmem[a[4:3]][a[2:0]]);
  n_reads++;
  @(posedge PCLK);
endtask

task automatic check_souts();
  for (int s = 0; s < NSLAVE; s++) expect_eq($sformatf("sout%0d", s), sout[s], ref_sout[s]);
endtask

initial begin
  repeat (100000) @(posedge PCLK);
  failures++;
  $display("FAIL watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  bit ok;
  int t0, pops, last_pop, cnt_prev;
  logic [AW-1:0] burst_addr[$];
  logic [AW-1:0] prev_addr;
  for (int s = 0; s < NSLAVE; s++) n_wr_slave[s] = 0;
  #1 PRESETn = 1'b0;            // before the first clock edge
  repeat (3) @(posedge PCLK);
  @(negedge PCLK) PRESETn = 1'b1;
  repeat (3) @(posedge PCLK);
  for (int s = 0; s < 4; s++) for (int r = 0; r < 8; r++) refmem[s][r] = '0;
  for (int s = 0; s < NSLAVE; s++) ref_sout[s] = '0;
  check_souts();

  // 1. single write to address 00001, latency to slave output
  host_write(5'b00001, 32'hCCCC_AAE0, ok);
  expect_eq("single write accepted", ok, 1);
  t0 = cyc;
  while (sout[0] != 32'hCCCC_AAE0 && cyc - t0 < 100) @(posedge PCLK);
  expect_eq("write latency", cyc - t0, 3 + WS);
  check_souts();
  wait_idle();

  // 2. read it back
  host_read(5'b00001, 1'b1);

  // 3. burst of back-to-back writes
  wait_idle();
  @(negedge PCLK);
  for (int i = 0; i < 24; i++) begin
    logic [AW-1:0] a;
    a = (i < 4) ? AW'(i * 8 + i) : AW'($urandom);    // first four: every slave index
    apb_write = 1'b1; PADDRESS = a; apb_write_data = $urandom;
    #1 ok = !wr_overflow;
    @(posedge PCLK);
    if (ok) begin
      burst_addr.push_back(a);
      if (a[4:3] < NSLAVE) begin
        refmem[a[4:3]][a[2:0]] = apb_write_data;
        ref_sout[a[4:3]] = apb_write_data;
      end
    end else n_overflow++;
    @(negedge PCLK);
  end
  apb_write = 1'b0;
  expect_eq("FIFO full after burst", full, 1);
  // drain rate: one word leaves every 4 + WS cycles (4 for an unmapped
  // address, which no slave stalls)
  pops = 0; last_pop = -1; cnt_prev = int'(fifo_count);
  prev_addr = '0;
  while (burst_addr.size() > int'(fifo_count)) prev_addr = burst_addr.pop_front();
  while (!empty && pops < 20) begin
    @(negedge PCLK);
    if (int'(fifo_count) < cnt_prev) begin
      if (last_pop >= 0)
        expect_eq("drain interval", cyc - last_pop, 4 + ((prev_addr[4:3] < NSLAVE) ? WS : 0));
      last_pop = cyc;
      prev_addr = burst_addr.pop_front();
      pops++;
    end
    cnt_prev = int'(fifo_count);
  end
  expect_eq("drained words", pops, ASIZE);
  wait_idle();
  check_souts();

  // 4. read back every address
  for (int a = 0; a < 32; a++) host_read(AW'(a), 1'b0);

  // 5. reset in the middle of a burst
  @(negedge PCLK);
  for (int i = 0; i < 6; i++) begin
    apb_write = 1'b1; PADDRESS = AW'(i); apb_write_data = $urandom;
    @(negedge PCLK);
  end
  apb_write = 1'b0;
  expect_eq("FIFO holds words before reset", empty, 0);
  do_reset();
  n_reset++;
  expect_eq("FIFO empty after reset", empty, 1);
  expect_eq("count zero after reset", fifo_count, 0);
  check_souts();
  host_read(5'b00000, 1'b1);

  checks++;
  if (n_full == 0 || n_overflow == 0 || (WS > 0 && n_wait == 0) || n_unmapped == 0 ||
      n_reads == 0 || n_reset == 0 || n_wr_slave[0] == 0 || n_wr_slave[1] == 0 || n_wr_slave[2] == 0) begin
    failures++;
    $display("FAIL a mechanism never happened");
  end
  $display("full=%0d overflow=%0d wait=%0d unmapped=%0d reads=%0d reset=%0d writes=%0d/%0d/%0d",
           n_full, n_overflow, n_wait, n_unmapped, n_reads, n_reset,
           n_wr_slave[0], n_wr_slave[1], n_wr_slave[2]);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
