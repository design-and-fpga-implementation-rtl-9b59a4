// apb_slave: APB register-bank slave with a parallel data output.
//
// The slave holds 2**REG_AW registers of DSIZE bits. A write transfer
// (PSEL, PENABLE, PWRITE and PREADY high) stores PWDATA in the register
// PADDR selects and also copies it to sout, the slave's output port (the
// value a peripheral would drive onto its pins). A read transfer returns the
// addressed register on PRDATA; PRDATA is zero while the slave is not
// selected.
//
// Timing: the slave inserts WAIT_STATES wait cycles in every ACCESS phase by
// holding PREADY low; with WAIT_STATES = 0 PREADY is high and every
// transfer takes the minimum two APB cycles (SETUP, ACCESS).
// The PREADY handshake follows the APB protocol; the register bank, the
// sout output and the wait-state count are this design's choices, standing
// for a simple peripheral.
module apb_slave #(
  parameter int unsigned DSIZE       = 32,
  parameter int unsigned REG_AW      = 3,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic              PCLK,
  input  logic              PRESETn,
  input  logic              PSEL,
  input  logic              PENABLE,
  input  logic              PWRITE,
  input  logic [REG_AW-1:0] PADDR,
  input  logic [DSIZE-1:0]  PWDATA,
  output logic [DSIZE-1:0]  PRDATA,
  output logic              PREADY,
  output logic [DSIZE-1:0]  sout
);

  localparam int unsigned WW = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic [DSIZE-1:0] regs [2**REG_AW];
  logic [WW-1:0]    wait_cnt;
  logic             access, wr_en;

  assign access = PSEL && PENABLE;
  assign PREADY = (wait_cnt == WW'(WAIT_STATES));
  assign wr_en  = access && PWRITE && PREADY;
  assign PRDATA = PSEL ? regs[PADDR] : '0;

  // wait-state counter: counts ACCESS cycles, clears when the transfer ends
  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn)                   wait_cnt <= '0;
    else if (access && !PREADY)     wait_cnt <= wait_cnt + 1'b1;
    else if (access)                wait_cnt <= '0;
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      sout <= '0;
      for (int unsigned r = 0; r < 2**REG_AW; r++) regs[r] <= '0;
    end else if (wr_en) begin
      regs[PADDR] <= PWDATA;
      sout        <= PWDATA;
    end
  end

endmodule
