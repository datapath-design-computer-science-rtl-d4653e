// pc_register: the program counter, a WIDTH-bit register loaded with d on
// every rising clock edge. A high clr clears it to address 0 at once,
// without waiting for a clock edge, like the clear input of a discrete
// register; clr is released synchronously by the surrounding logic or
// testbench. There is no load enable: in a single-cycle machine the PC
// takes its next value on every clock.
module pc_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
