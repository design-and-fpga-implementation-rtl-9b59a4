// apb_bridge_top: complete APB subsystem, the bridge with its slaves.
//
// A host (on a real chip, the AHB or ASB side of the system) issues write
// and read requests on the bridge's host port. The reset controller turns
// the external PRESETn into a reset that is released in step with PCLK.
// apb_bridge buffers writes in its FIFO and runs each request as an APB
// transfer, sequenced by its 3-bit down ripple counter, to one of NSLAVE
// register-bank slaves chosen by the top address bits. Every slave drives
// the last word written to it on its sout output.
//
// Interface: PCLK and PRESETn (active low); the host port (apb_write,
// apb_read, apb_write_data, PADDRESS in; apb_read_data, read_valid,
// read_busy, empty, full, wr_overflow, fifo_count out); the APB bus itself
// (PADDR, PWRITE, PSEL, PENABLE, PREADY), the sequencer count (seq_out,
// seq_qb) and the slaves' outputs (sout) brought out for observation.
//
// Timing: see apb_bridge; with WAIT_STATES = 0 each transfer occupies the
// bus for 4 PCLK cycles, each wait state adds one.
// The defaults (32-bit data, 8-word FIFO, 5-bit address, three slaves)
// follow the design; the wait-state parameter is this design's addition,
// used to exercise PREADY.
module apb_bridge_top
  import apb_pkg::*;
#(
  parameter int unsigned DSIZE       = DSIZE_DEFAULT,
  parameter int unsigned ASIZE       = ASIZE_DEFAULT,
  parameter int unsigned AW          = AW_DEFAULT,
  parameter int unsigned NSLAVE      = NSLAVE_DEFAULT,
  parameter int unsigned COUNT_W     = 16,
  parameter int unsigned WAIT_STATES = 0,
  localparam int unsigned SEL_W      = (NSLAVE > 1) ? $clog2(NSLAVE) : 1,
  localparam int unsigned REG_AW     = AW - SEL_W
) (
  input  logic                          PCLK,
  input  logic                          PRESETn,
  // host port
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
  // APB bus, for observation
  output logic [AW-1:0]                 PADDR,
  output logic                          PWRITE,
  output logic [NSLAVE-1:0]             PSEL,
  output logic                          PENABLE,
  output logic                          PREADY,
  output logic [2:0]                    seq_out,
  output logic [2:0]                    seq_qb,
  // slave outputs
  output logic [NSLAVE-1:0][DSIZE-1:0]  sout
);

  logic                         rst_n;
  logic [DSIZE-1:0]             pwdata;
  logic [NSLAVE-1:0][DSIZE-1:0] prdata;
  logic [NSLAVE-1:0]            pready_s;

  reset_controller #(.STAGES(2)) u_rst (
    .PCLK   (PCLK),
    .PRESETn(PRESETn),
    .rst_n  (rst_n)
  );

  apb_bridge #(
    .DSIZE(DSIZE), .ASIZE(ASIZE), .AW(AW), .NSLAVE(NSLAVE), .COUNT_W(COUNT_W)
  ) u_bridge (
    .PCLK          (PCLK),
    .rst_n         (rst_n),
    .apb_write     (apb_write),
    .apb_read      (apb_read),
    .apb_write_data(apb_write_data),
    .PADDRESS      (PADDRESS),
    .apb_read_data (apb_read_data),
    .read_valid    (read_valid),
    .read_busy     (read_busy),
    .empty         (empty),
    .full          (full),
    .wr_overflow   (wr_overflow),
    .fifo_count    (fifo_count),
    .PADDR         (PADDR),
    .PWRITE        (PWRITE),
    .PENABLE       (PENABLE),
    .PSEL          (PSEL),
    .PWDATA        (pwdata),
    .PRDATA        (prdata),
    .PREADY_S      (pready_s),
    .PREADY        (PREADY),
    .seq_out       (seq_out),
    .seq_qb        (seq_qb)
  );

  for (genvar s = 0; s < NSLAVE; s++) begin : g_slave
    apb_slave #(.DSIZE(DSIZE), .REG_AW(REG_AW), .WAIT_STATES(WAIT_STATES)) u_slave (
      .PCLK   (PCLK),
      .PRESETn(rst_n),
      .PSEL   (PSEL[s]),
      .PENABLE(PENABLE),
      .PWRITE (PWRITE),
      .PADDR  (PADDR[REG_AW-1:0]),
      .PWDATA (pwdata),
      .PRDATA (prdata[s]),
      .PREADY (pready_s[s]),
      .sout   (sout[s])
    );
  end

endmodule
