// tb_apb_bridge: self-checking test of the bridge on its own, at its
// default size (32-bit data, 8-word FIFO, 5-bit address, three slaves).
//
// The testbench plays the three slaves itself: each holds eight words,
// returns the addressed one on PRDATA and inserts a random number of wait
// states (0 to 2) by holding PREADY low. A host process issues random
// writes and reads, in bursts long enough to fill the FIFO. A bus monitor,
// sampling in the middle of each cycle, checks:
//   - every write on the bus is the next accepted host write, in order,
//     with the select the address decodes to;
//   - reads return the slave model's word (zero for an unmapped address)
//     and every accepted read completes;
//   - SETUP is one cycle, followed by ACCESS; ACCESS ends on PREADY;
//   - the sequencer steps 111 -> 110 -> 101 and qb is its complement;
//   - a transfer starts one cycle after an accepted write on an idle bus,
//     and back-to-back transfers start 4 cycles apart plus wait states;
//   - fifo_count, empty and full follow a count of pushes and pops.
// It counts FIFO-full cycles, overflows, wait states, unmapped accesses,
// reads and writes to each slave, and fails if any never happened.
module tb_apb_bridge;
  import apb_pkg::*;
  localparam int unsigned DSIZE = 32, ASIZE = 8, AW = 5, NSLAVE = 3;

  logic                         PCLK = 1'b0, rst_n = 1'b1;
  logic                         apb_write = 1'b0, apb_read = 1'b0;
  logic [DSIZE-1:0]             apb_write_data = '0;
  logic [AW-1:0]                PADDRESS = '0;
  logic [DSIZE-1:0]             apb_read_data;
  logic                         read_valid, read_busy, empty, full, wr_overflow;
  logic [15:0]                  fifo_count;
  logic [AW-1:0]                PADDR;
  logic                         PWRITE, PENABLE, PREADY;
  logic [NSLAVE-1:0]            PSEL;
  logic [DSIZE-1:0]             PWDATA;
  logic [NSLAVE-1:0][DSIZE-1:0] PRDATA;
  logic [NSLAVE-1:0]            PREADY_S;
  logic [2:0]                   seq_out, seq_qb;

  apb_bridge #(.DSIZE(DSIZE), .ASIZE(ASIZE), .AW(AW), .NSLAVE(NSLAVE)) dut (.*);

  always #5 PCLK = ~PCLK;

  // ---------------- slave models ----------------
  logic [DSIZE-1:0] smem [NSLAVE][8];
  int               wait_left;
  logic             ready_now;

  always_comb begin
    for (int s = 0; s < NSLAVE; s++) begin
      PRDATA[s]   = smem[s][PADDR[2:0]];
      PREADY_S[s] = ready_now;
    end
  end

  // ---------------- bookkeeping ----------------
  typedef struct packed { logic [AW-1:0] addr; logic [DSIZE-1:0] data; } wr_t;
  wr_t  exp_wr[$];
  int   checks = 0, failures = 0;
  int   model_count = 0;
  int   n_full = 0, n_overflow = 0, n_wait = 0, n_unmapped = 0, n_reads = 0;
  int   n_wr_slave [NSLAVE];
  int   n_b2b = 0, n_idle_start = 0;
  int   reads_req = 0, reads_done = 0;
  int   cyc = 0, last_done_cyc = -100, expect_setup_cyc = -100;
  logic last_done_had_work = 1'b0;
  logic [2:0] prev_seq = 3'b111;
  logic       prev_setup = 1'b0;
  logic       prev_empty = 1'b1;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at cycle %0d", what, got, exp, cyc);
    end
  endtask

  function automatic logic [NSLAVE-1:0] decode(input logic [AW-1:0] a);
    return (a[4:3] < NSLAVE) ? NSLAVE'(1) << a[4:3] : '0;
  endfunction

  initial begin
    repeat (200000) @(posedge PCLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus monitor (mid-cycle) ----------------
  always @(negedge PCLK) if (rst_n) begin
    #1;
    cyc++;
    expect_eq("qb", seq_qb, 3'(~seq_out));
    checks++;
    if (!(seq_out inside {3'b111, 3'b110, 3'b101})) begin
      failures++; $display("FAIL illegal sequencer code %b", seq_out);
    end
    if (prev_setup) expect_eq("SETUP followed by ACCESS", seq_out, 3'b101);
    expect_eq("PENABLE", PENABLE, seq_out == 3'b101);
    if (seq_out == 3'b110) begin
      // SETUP: check the start time, the select and, for writes, the order
      expect_eq("PSEL in SETUP", PSEL, decode(PADDR));
      if (last_done_had_work) begin
        expect_eq("back-to-back spacing", cyc - last_done_cyc, 3);
        n_b2b++;
      end
      // a read starts only once every accepted write has left the FIFO
      if (!PWRITE) expect_eq("read waits for FIFO to drain", prev_empty, 1);
      if (PWRITE) begin
        checks++;
        if (exp_wr.size() == 0) begin
          failures++; $display("FAIL unexpected write at cycle %0d", cyc);
        end else begin
          wr_t e;
          e = exp_wr.pop_front();
          expect_eq("write address", PADDR, e.addr);
          expect_eq("write data", PWDATA, e.data);
        end
        model_count--;
      end
      if (decode(PADDR) == '0) n_unmapped++;
    end
    if (seq_out == 3'b101) begin
      expect_eq("PSEL in ACCESS", PSEL, decode(PADDR));
      if (!PREADY) n_wait++;
      if (PREADY) begin
        last_done_cyc = cyc;
        last_done_had_work = (model_count > 0);
        if (PWRITE && decode(PADDR) != '0) begin
          smem[PADDR[4:3]][PADDR[2:0]] = PWDATA;   // takes effect at the edge
          n_wr_slave[PADDR[4:3]]++;
        end
      end
    end else begin
      last_done_had_work = (cyc - last_done_cyc <= 2) ? last_done_had_work : 1'b0;
    end
    // a write accepted on an idle bridge starts one cycle later
    if (cyc == expect_setup_cyc) begin
      expect_eq("start latency", seq_out, 3'b110);
      expect_eq("start is a write", PWRITE, 1);
      n_idle_start++;
    end
    prev_setup = (seq_out == 3'b110);
    prev_empty = empty;
    // FIFO status against the model
    if (full) n_full++;
    expect_eq("fifo_count", fifo_count, model_count);
    expect_eq("empty", empty, model_count == 0);
    expect_eq("full", full, model_count == ASIZE);
  end

  // slave wait states: a fresh random count (0 to 2) for every ACCESS
  // phase, decided at the start of each cycle so PREADY is steady at edges
  logic in_access = 1'b0;
  always @(negedge PCLK) begin
    if (seq_out == 3'b101) begin
      if (!in_access) wait_left = $urandom_range(0, 2);
      in_access = 1'b1;
      ready_now = (wait_left == 0);
      if (!ready_now) wait_left--;
    end else begin
      in_access = 1'b0;
      ready_now = 1'b0;
    end
  end

  // read results
  logic [AW-1:0] rd_addr_q[$];
  always @(posedge PCLK) if (rst_n && read_valid) begin
    logic [AW-1:0] a;
    a = rd_addr_q.pop_front();
    reads_done++;
    checks++;
    if (decode(a) == '0) begin
      if (apb_read_data != 0) begin failures++; $display("FAIL unmapped read %h", apb_read_data); end
    end else if (apb_read_data != smem[a[4:3]][a[2:0]]) begin
      failures++;
      $display("FAIL read of %b: got %h expected %h", a, apb_read_data, smem[a[4:3]][a[2:0]]);
    end
  end

  // ---------------- host ----------------
  initial begin
    for (int s = 0; s < NSLAVE; s++) begin
      n_wr_slave[s] = 0;
      for (int r = 0; r < 8; r++) smem[s][r] = $urandom;
    end
    wait_left = 0;
    ready_now = 1'b0;
    #1 rst_n = 1'b0;    // before the first clock edge
    repeat (3) @(posedge PCLK);
    @(negedge PCLK) rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int burst;
      burst = ((i / 300) % 2 == 0) ? 70 : 15;   // alternate heavy and light traffic
      @(negedge PCLK);
      #2;
      apb_write      = ($urandom_range(0, 99) < burst);
      apb_read       = ($urandom_range(0, 99) < 5) && !read_busy;
      apb_write_data = $urandom;
      PADDRESS       = AW'($urandom);
      #1;
      expect_eq("overflow only when full", wr_overflow, wr_overflow && full);
      if (apb_write && seq_out == 3'b111 && empty && !read_busy && cyc - last_done_cyc != 1)
        expect_setup_cyc = cyc + 2;
      @(posedge PCLK);
      if (apb_write && !wr_overflow) begin
        exp_wr.push_back('{addr: PADDRESS, data: apb_write_data});
        model_count++;
      end
      if (apb_write && wr_overflow) n_overflow++;
      if (apb_read) begin
        rd_addr_q.push_back(PADDRESS);
        reads_req++;
      end
    end
    @(negedge PCLK) begin apb_write = 1'b0; apb_read = 1'b0; end
    repeat (200) @(posedge PCLK);
    expect_eq("all writes issued", exp_wr.size(), 0);
    expect_eq("all reads returned", reads_done, reads_req);
    checks++;
    if (n_full == 0 || n_overflow == 0 || n_wait == 0 || n_unmapped == 0 || reads_done == 0 ||
        n_b2b == 0 || n_idle_start == 0 || n_wr_slave[0] == 0 || n_wr_slave[1] == 0 || n_wr_slave[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("full=%0d overflow=%0d wait=%0d unmapped=%0d reads=%0d b2b=%0d idle_start=%0d writes=%0d/%0d/%0d",
             n_full, n_overflow, n_wait, n_unmapped, reads_done, n_b2b, n_idle_start,
             n_wr_slave[0], n_wr_slave[1], n_wr_slave[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
