// datapath16: a single-cycle 16-bit MIPS-style datapath without its control
// unit. Every clock cycle it fetches the instruction at the PC, splits it
// into opcode (bits 15..12), Rs (11..8), Rt (7..4) and Rd/offset (3..0),
// reads Rs and Rt, runs the ALU, writes the ALU result back when RegWrite
// is high, and loads the PC with PC + 2, or with PC + 2 + 2*offset when
// Branch is high and the ALU's Zero output is high (a taken BEQ).
// The control lines Branch, RegWrite, RegDst, ALUSrc and ALUop are inputs:
// they would come from an instruction decoder, which is not part of this
// design, and the opcode field is brought out for it. There is no data
// memory either: the ALU result (the LW/SW address) and Read data 2 (the SW
// store value) are brought out for one, and the value written back is always
// the ALU result. reset clears the PC to 0 and the registers to 0 (register
// 1 to 1). The load port writes the instruction memory before a program runs.
module datapath16
  import dp_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 8
) (
  input  logic                   clk,
  input  logic                   reset,
  // control lines
  input  logic                   branch,
  input  logic                   regwrite,
  input  logic                   regdst,
  input  logic                   alusrc,
  input  logic [ALUOP_W-1:0]     aluop,
  // instruction memory load port
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-1:0] prog_addr,
  input  logic [WORD_W-1:0]      prog_data,
  // observation and decoder/data-memory side
  output logic [WORD_W-1:0]      pc,
  output logic [WORD_W-1:0]      instr,
  output logic [3:0]             opcode,
  output logic [REG_ADDR_W-1:0]  write_reg,
  output logic [WORD_W-1:0]      read_data1,
  output logic [WORD_W-1:0]      read_data2,
  output logic [WORD_W-1:0]      alu_result,
  output logic                   zero,
  output logic                   take_branch
);
  instr_t            fields;

  always_comb begin
    fields = instr_t'(instr);
    opcode = fields.opcode;
  end

  fetch_unit #(.IMEM_ADDR_W(IMEM_ADDR_W)) u_fetch (
    .clk(clk), .reset(reset), .branch(branch), .zero(zero),
    .offset(fields.rd), .pc(pc), .pc_plus2(),
    .branch_target(), .take_branch(take_branch), .instr(instr),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  reg_alu_unit u_regalu (
    .clk(clk), .reset(reset), .rs(fields.rs), .rt(fields.rt), .rd(fields.rd),
    .regwrite(regwrite), .regdst(regdst), .alusrc(alusrc), .aluop(aluop),
    .write_data(alu_result), .write_reg(write_reg),
    .read_data1(read_data1), .read_data2(read_data2), .alu_b(),
    .alu_result(alu_result), .zero(zero)
  );
endmodule
