// shift_left1: logical shift left by one place (multiply by 2), dropping
// the top bit and filling bit 0 with zero. It converts the sign-extended
// branch offset, counted in 2-byte instructions, into a byte distance.
// The input's top bit is shifted out and so unused. Combinational, no clock.
module shift_left1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  always_comb out = {in[WIDTH-2:0], 1'b0};
endmodule
