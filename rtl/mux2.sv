// mux2: two-input multiplexer, y = sel ? d1 : d0. The datapath uses it at
// 16 bits (next-PC select, ALU B-input select) and at 4 bits (destination
// register select). Combinational, no clock.
module mux2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
