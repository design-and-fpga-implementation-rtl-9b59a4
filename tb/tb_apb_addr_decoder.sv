// tb_apb_addr_decoder: exhaustive check of the address decoder at its
// default size (5-bit address, three slaves). For every address the
// expected one-hot select is worked out from the top two bits (0, 1, 2
// select slaves 0, 1, 2; 3 is unmapped) and compared with sel, hit and the
// 3-bit offset.
module tb_apb_addr_decoder;
  localparam int unsigned AW = 5, NSLAVE = 3;

  logic [AW-1:0]     addr;
  logic [NSLAVE-1:0] sel;
  logic              hit;
  logic [2:0]        offset;
  int                checks = 0, failures = 0;

  apb_addr_decoder #(.AW(AW), .NSLAVE(NSLAVE)) dut (.addr(addr), .sel(sel), .hit(hit), .offset(offset));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      logic [NSLAVE-1:0] exp_sel;
      addr = AW'(a);
      #1;
      case (a / 8)
        0:       exp_sel = 3'b001;
        1:       exp_sel = 3'b010;
        2:       exp_sel = 3'b100;
        default: exp_sel = 3'b000;
      endcase
      checks++;
      if (sel !== exp_sel || hit !== (exp_sel != 0) || offset !== 3'(a % 8)) begin
        failures++;
        $display("FAIL addr=%b sel=%b hit=%b offset=%0d, expected sel=%b", addr, sel, hit, offset, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
