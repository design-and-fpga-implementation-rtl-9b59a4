// apb_bridge: APB master that turns host write/read requests into APB
// transfers, with a write FIFO and a ripple-counter transfer sequencer.
//
// Host side. A one-cycle apb_write pulse pushes {PADDRESS, apb_write_data}
// into an ASIZE-deep FIFO (dropped, with wr_overflow high for that cycle,
// when the FIFO is full). A one-cycle apb_read pulse records PADDRESS as a
// pending read (ignored while read_busy is high). Writes are issued first:
// a read starts only once the FIFO is empty, so a read always sees every
// write that was accepted before it. When a read completes, apb_read_data
// is loaded with the slave's PRDATA and read_valid is high for one cycle.
//
// Sequencer. The phase of the bus is the count of a 3-bit down ripple
// counter (ripple_down_counter): 3'b111 IDLE, 3'b110 SETUP, 3'b101 ACCESS.
// In IDLE, with work waiting, the counter is enabled for one clock and
// steps to SETUP, the FIFO is popped (or the pending read taken) and
// PADDR, PWRITE and PWDATA are registered. SETUP always steps on to
// ACCESS. ACCESS holds until the selected slave raises PREADY; then a
// flip-flop drives the counter's asynchronous preset for one cycle, which
// returns it to IDLE (the preset cycle is an extra IDLE cycle in which no
// transfer may start, because the counter cannot step while preset).
//
// APB side. PSEL (one-hot over NSLAVE slaves, from apb_addr_decoder) is
// high in SETUP and ACCESS, PENABLE in ACCESS. An address no slave decodes
// still runs SETUP and ACCESS with no PSEL; it completes at once and reads
// as zero. PRDATA and PREADY of the selected slave are multiplexed in.
//
// Timing: a transfer with no wait states takes 4 PCLK cycles from the IDLE
// cycle that starts it to the next IDLE cycle that may start another
// (start, SETUP, ACCESS, preset); each wait state adds one. PSEL and
// PENABLE are decoded from the counter, which passes through 3'b111 for a
// flip-flop delay while rippling from SETUP to ACCESS, so they are only
// valid at PCLK edges, as APB slaves sample them.
//
// The FIFO, the 3-bit down ripple counter with the codes 111/110/101, the
// signal names of the host side, 32-bit data, a 5-bit address and three
// slave selects follow the design. The host handshake, write-before-read
// ordering, storing the address with the data, the preset return to IDLE
// and the unmapped-address behaviour are this design's choices.
module apb_bridge
  import apb_pkg::*;
#(
  parameter int unsigned DSIZE   = DSIZE_DEFAULT,
  parameter int unsigned ASIZE   = ASIZE_DEFAULT,
  parameter int unsigned AW      = AW_DEFAULT,
  parameter int unsigned NSLAVE  = NSLAVE_DEFAULT,
  parameter int unsigned COUNT_W = 16
) (
  input  logic                          PCLK,
  input  logic                          rst_n,
  // host side
  input  logic                          apb_write,
  input  logic                          apb_read,
  input  logic [DSIZE-1:0]              apb_write_data,
  input  logic [AW-1:0]                 PADDRESS,
  output logic [DSIZE-1:0]              apb_read_data,
  output logic                          read_valid,
  output logic                          read_busy,
  output logic                          empty,
  output logic                          full,
  output logic                          wr_overflow,
  output logic [COUNT_W-1:0]            fifo_count,
  // APB side
  output logic [AW-1:0]                 PADDR,
  output logic                          PWRITE,
  output logic                          PENABLE,
  output logic [NSLAVE-1:0]             PSEL,
  output logic [DSIZE-1:0]              PWDATA,
  input  logic [NSLAVE-1:0][DSIZE-1:0]  PRDATA,
  input  logic [NSLAVE-1:0]             PREADY_S,
  output logic                          PREADY,
  // sequencer state, for observation
  output logic [2:0]                    seq_out,
  output logic [2:0]                    seq_qb
);

  localparam int unsigned FW = AW + DSIZE;  // FIFO word: address and data

  // ---------------- write FIFO ----------------
  logic [FW-1:0] fifo_rdata;
  logic          fifo_pop;

  sync_fifo #(.WIDTH(FW), .DEPTH(ASIZE), .COUNT_W(COUNT_W)) u_fifo (
    .clk     (PCLK),
    .rst_n   (rst_n),
    .push    (apb_write),
    .wdata   ({PADDRESS, apb_write_data}),
    .pop     (fifo_pop),
    .rdata   (fifo_rdata),
    .empty   (empty),
    .full    (full),
    .overflow(wr_overflow),
    .count   (fifo_count)
  );

  // ---------------- ripple-counter sequencer ----------------
  apb_phase_e phase;
  logic       seq_ready;   // registered preset_n of the counter
  logic       step;
  logic       start_wr, start_rd, done;

  ripple_down_counter #(.WIDTH(3)) u_seq (
    .clk     (PCLK),
    .preset_n(seq_ready),
    .en      (step),
    .q       (seq_out),
    .qb      (seq_qb)
  );

  assign phase = apb_phase_e'(seq_out);

  // ---------------- pending read ----------------
  logic          rd_pending;
  logic [AW-1:0] rd_addr;
  assign read_busy = rd_pending;

  assign start_wr = (phase == PH_IDLE) && seq_ready && !empty;
  assign start_rd = (phase == PH_IDLE) && seq_ready && empty && rd_pending;
  assign step     = start_wr || start_rd || (phase == PH_SETUP);
  assign fifo_pop = start_wr;

  // ---------------- address decode and slave multiplexing ----------------
  logic [NSLAVE-1:0] dec_sel;
  logic              dec_hit;
  logic              in_transfer;
  logic [DSIZE-1:0]  prdata_sel;

  apb_addr_decoder #(.AW(AW), .NSLAVE(NSLAVE)) u_dec (
    .addr  (PADDR),
    .sel   (dec_sel),
    .hit   (dec_hit),
    .offset()
  );

  assign in_transfer = (phase == PH_SETUP) || (phase == PH_ACCESS);
  assign PSEL        = in_transfer ? dec_sel : '0;
  assign PENABLE     = (phase == PH_ACCESS);
  assign PREADY      = dec_hit ? |(PREADY_S & dec_sel) : 1'b1;

  always_comb begin
    prdata_sel = '0;
    for (int unsigned s = 0; s < NSLAVE; s++) begin
      if (dec_sel[s]) prdata_sel |= PRDATA[s];
    end
  end

  assign done = (phase == PH_ACCESS) && PREADY;

  // ---------------- registers ----------------
  always_ff @(posedge PCLK or negedge rst_n) begin
    if (!rst_n) begin
      seq_ready     <= 1'b0;
      PADDR         <= '0;
      PWRITE        <= 1'b0;
      PWDATA        <= '0;
      rd_pending    <= 1'b0;
      rd_addr       <= '0;
      apb_read_data <= '0;
      read_valid    <= 1'b0;
    end else begin
      // preset the counter back to IDLE for one cycle after ACCESS ends,
      // or if it ever holds a code that is not a phase; the preset is never
      // longer than one cycle, so it always ends in a fresh falling edge
      seq_ready  <= !(seq_ready &&
                      (done || !(phase inside {PH_IDLE, PH_SETUP, PH_ACCESS})));
      read_valid <= 1'b0;

      if (start_wr) begin
        PADDR  <= fifo_rdata[FW-1 -: AW];
        PWDATA <= fifo_rdata[DSIZE-1:0];
        PWRITE <= 1'b1;
      end else if (start_rd) begin
        PADDR  <= rd_addr;
        PWRITE <= 1'b0;
      end

      if (done && !PWRITE) begin
        apb_read_data <= dec_hit ? prdata_sel : '0;
        read_valid    <= 1'b1;
        rd_pending    <= 1'b0;
      end else if (apb_read && !rd_pending) begin
        rd_pending <= 1'b1;
        rd_addr    <= PADDRESS;
      end
    end
  end

  // ---------------- APB protocol rules ----------------
  // Checked at each PCLK edge against the previous cycle:
  //  - SETUP lasts exactly one cycle and is followed by ACCESS;
  //  - while ACCESS waits for PREADY, address, direction and data hold;
  //  - the counter only ever holds one of the three phase codes.
  logic             prev_setup, prev_wait;
  logic [AW-1:0]    prev_paddr;
  logic             prev_pwrite;
  logic [DSIZE-1:0] prev_pwdata;

  always_ff @(posedge PCLK or negedge rst_n) begin
    if (!rst_n) begin
      prev_setup  <= 1'b0;
      prev_wait   <= 1'b0;
      prev_paddr  <= '0;
      prev_pwrite <= 1'b0;
      prev_pwdata <= '0;
    end else begin
      a_setup_then_access: assert (!prev_setup || phase == PH_ACCESS)
        else $error("apb_bridge: SETUP not followed by ACCESS");
      a_stable_in_wait: assert (!prev_wait || (phase == PH_ACCESS &&
          PADDR == prev_paddr && PWRITE == prev_pwrite && PWDATA == prev_pwdata))
        else $error("apb_bridge: transfer changed while waiting for PREADY");
      a_legal_phase: assert (phase inside {PH_IDLE, PH_SETUP, PH_ACCESS})
        else $error("apb_bridge: sequencer holds an illegal code");
      prev_setup  <= (phase == PH_SETUP);
      prev_wait   <= (phase == PH_ACCESS) && !PREADY;
      prev_paddr  <= PADDR;
      prev_pwrite <= PWRITE;
      prev_pwdata <= PWDATA;
    end
  end

endmodule
