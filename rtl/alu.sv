// alu: combinational 16-bit ALU. ALUop selects the function:
//   0 a AND b, 1 a OR b, 2 a + b, 6 a - b, 7 set-on-less-than
// (result 1 if a < b as two's-complement numbers, else 0). Any other ALUop
// gives a zero result. Zero is high when the result is all zeros; for a
// BEQ the ALU subtracts and Zero then means the two registers are equal.
// The function codes follow the datapath's ALUop table; the signed
// comparison for set-on-less-than and the zero result for unused codes are
// this design's choices.
module alu
  import dp_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [ALUOP_W-1:0] aluop,
  output logic [WIDTH-1:0]   result,
  output logic               zero
);
  always_comb begin
    unique case (aluop)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = WIDTH'($signed(a) < $signed(b));
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
