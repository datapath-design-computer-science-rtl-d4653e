// adder16: combinational two's-complement adder, y = a + b modulo 2**WIDTH.
// The datapath uses two of them: one forms PC + 2, the other adds the
// shifted branch offset to PC + 2. No carry in or out is used by the
// datapath, so none is provided. Purely combinational, no clock.
module adder16 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
