// apb_addr_decoder: turns an APB address into one-hot slave selects.
//
// The top SEL_W address bits name the slave (SEL_W = clog2(NSLAVE)), the
// remaining low bits are the register offset inside that slave. With the
// default 5-bit address and three slaves, PADDR[4:3] = 0, 1, 2 select slave
// 0, 1, 2 and PADDR[2:0] picks one of eight registers; PADDR[4:3] = 3 is
// unmapped and selects nothing (hit goes low). offset carries the low bits.
// Purely combinational. The 5-bit address and the three selects PSEL0..2
// follow the design; the split of the address into slave and offset bits is
// this design's choice.
module apb_addr_decoder #(
  parameter int unsigned AW     = 5,
  parameter int unsigned NSLAVE = 3,
  localparam int unsigned SEL_W = (NSLAVE > 1) ? $clog2(NSLAVE) : 1
) (
  input  logic [AW-1:0]     addr,
  output logic [NSLAVE-1:0] sel,
  output logic              hit,
  output logic [AW-SEL_W-1:0] offset
);

  logic [SEL_W-1:0] idx;
  assign idx    = addr[AW-1 -: SEL_W];
  assign offset = addr[AW-SEL_W-1:0];

  always_comb begin
    sel = '0;
    for (int unsigned s = 0; s < NSLAVE; s++) begin
      if (idx == SEL_W'(s)) sel[s] = 1'b1;
    end
  end

  assign hit = |sel;

endmodule
