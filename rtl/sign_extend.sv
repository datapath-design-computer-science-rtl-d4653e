// sign_extend: widens a two's-complement field to a full word by copying
// its top bit into every new upper bit. In the datapath it turns the 4-bit
// offset (instruction bits 3..0) into a 16-bit value in -8..+7.
// Combinational, no clock.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
