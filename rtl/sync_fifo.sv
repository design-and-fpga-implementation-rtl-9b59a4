// sync_fifo: single-clock first-in first-out buffer for pending writes.
//
// DEPTH words of WIDTH bits are held in a register array with a write
// pointer (wp) and a read pointer (rp) that wrap at DEPTH, plus an
// occupancy counter from which empty and full are derived. Reads are
// show-ahead: rdata always presents the oldest word, and a pop removes it.
//
// Interface (all on the rising edge of clk, rst_n asynchronous active low):
//   push, wdata  write one word; ignored when full (overflow pulses high
//                for that cycle instead)
//   pop          discard the oldest word; ignored when empty
//   rdata        oldest word, valid while empty is low
//   count        number of words held, COUNT_W bits wide
// A push and a pop in the same cycle both take effect when the FIFO holds
// between 1 and DEPTH-1 words, and when full a pop also frees room for a
// simultaneous push.
// The 8-entry, 32-bit array, the two pointers, the counter and the
// empty/full flags follow the design; the 16-bit counter width is kept from
// it; show-ahead reads and the overflow flag are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned COUNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push,
  input  logic [WIDTH-1:0]   wdata,
  input  logic               pop,
  output logic [WIDTH-1:0]   rdata,
  output logic               empty,
  output logic               full,
  output logic               overflow,
  output logic [COUNT_W-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] fifo_mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty    = (count == '0);
  assign full     = (count == COUNT_W'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign overflow = push && !do_push;
  assign rdata    = fifo_mem[rp];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= next_ptr(wp);
      if (do_pop)  rp <= next_ptr(rp);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // storage has no reset: a word is only read after it was written
  always_ff @(posedge clk) begin
    if (do_push) fifo_mem[wp] <= wdata;
  end

endmodule
