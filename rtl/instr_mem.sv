// instr_mem: instruction memory of 2**(ADDR_W-1) 16-bit instructions.
// The read address is a byte address, as the PC steps by 2 from one
// instruction to the next; bit 0 is ignored and bits ADDR_W-1..1 pick the
// word. Reading is combinational: the instruction appears in the same
// cycle as its address. The program is placed in memory before it runs
// through a separate load port (prog_we, prog_addr, prog_data), written on
// the rising clock edge; this port stands for the programmer loading the
// memory and is this design's own choice. Contents are not cleared by reset.
// Bit 0 of both addresses is unused by design (instructions are 2 bytes).
module instr_mem #(
  parameter int unsigned ADDR_W = 8,   // byte-address width seen by the memory
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] instr,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [DATA_W-1:0] prog_data
);
  localparam int unsigned DEPTH = 2 ** (ADDR_W - 1);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[ADDR_W-1:1]] <= prog_data;
  end

  always_comb instr = mem[addr[ADDR_W-1:1]];
endmodule
