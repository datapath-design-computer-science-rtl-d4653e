// dp_pkg: widths and ALU operation codes shared by the 16-bit single-cycle
// datapath. Words, the PC and register contents are 16 bits; register
// numbers and the branch/memory offset are 4-bit fields of an instruction.
// The ALUop codes are those of the datapath's ALU function table
// (0 AND, 1 OR, 2 add, 6 subtract, 7 set-on-less-than); the 4-bit width of
// the ALUop bus is the one drawn on the ALU.
package dp_pkg;
  localparam int unsigned WORD_W     = 16;  // data, PC and instruction width
  localparam int unsigned REG_ADDR_W = 4;   // Rs, Rt, Rd field width
  localparam int unsigned OFFSET_W   = 4;   // offset field, instruction bits 3..0
  localparam int unsigned ALUOP_W    = 4;   // ALUop bus width
  localparam int unsigned INSTR_BYTES = 2;  // PC step between instructions

  typedef enum logic [ALUOP_W-1:0] {
    ALU_AND = 4'd0,
    ALU_OR  = 4'd1,
    ALU_ADD = 4'd2,
    ALU_SUB = 4'd6,
    ALU_SLT = 4'd7
  } alu_op_e;

  // Field layout of a 16-bit instruction: opcode, Rs, Rt, Rd/offset.
  typedef struct packed {
    logic [3:0]            opcode;
    logic [REG_ADDR_W-1:0] rs;
    logic [REG_ADDR_W-1:0] rt;
    logic [REG_ADDR_W-1:0] rd;   // also the 4-bit offset of BEQ, LW and SW
  } instr_t;
endpackage
