// fetch_unit: instruction fetch and branch-address logic of the single-cycle
// datapath. The PC addresses the instruction memory, whose output is the
// current instruction. One adder forms PC + 2, the address of the next
// instruction in sequence. For a BEQ, the 4-bit offset is sign-extended,
// shifted left by one (words to bytes) and added to PC + 2 by a second
// adder. A 2-way multiplexer picks the branch target when Branch AND Zero
// are both high, otherwise PC + 2, and the PC loads that value on the rising
// clock edge. So next PC = PC + 2 + 2*offset for a taken branch, else PC + 2.
// reset clears the PC to 0 immediately. The instruction memory sees the low
// IMEM_ADDR_W bits of the 16-bit PC; its load port is passed through.
// Since the PC starts at 0 and only ever moves by even amounts, it is always
// even; an assertion checks this.
module fetch_unit
  import dp_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 8
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   branch,
  input  logic                   zero,
  input  logic [OFFSET_W-1:0]    offset,
  output logic [WORD_W-1:0]      pc,
  output logic [WORD_W-1:0]      pc_plus2,
  output logic [WORD_W-1:0]      branch_target,
  output logic                   take_branch,
  output logic [WORD_W-1:0]      instr,
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-1:0] prog_addr,
  input  logic [WORD_W-1:0]      prog_data
);
  logic [WORD_W-1:0] pc_next, offset_ext, offset_x2;

  pc_register #(.WIDTH(WORD_W)) u_pc (
    .clk(clk), .clr(reset), .d(pc_next), .q(pc)
  );

  instr_mem #(.ADDR_W(IMEM_ADDR_W), .DATA_W(WORD_W)) u_imem (
    .clk(clk), .addr(pc[IMEM_ADDR_W-1:0]), .instr(instr),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  adder16 #(.WIDTH(WORD_W)) u_add_pc2 (
    .a(pc), .b(WORD_W'(INSTR_BYTES)), .y(pc_plus2)
  );

  sign_extend #(.IN_W(OFFSET_W), .OUT_W(WORD_W)) u_sext (
    .in(offset), .out(offset_ext)
  );

  shift_left1 #(.WIDTH(WORD_W)) u_shl (
    .in(offset_ext), .out(offset_x2)
  );

  adder16 #(.WIDTH(WORD_W)) u_add_br (
    .a(pc_plus2), .b(offset_x2), .y(branch_target)
  );

  always_comb take_branch = branch & zero;

  mux2 #(.WIDTH(WORD_W)) u_pc_mux (
    .d0(pc_plus2), .d1(branch_target), .sel(take_branch), .y(pc_next)
  );

  pc_even: assert property (@(posedge clk) disable iff (reset) pc[0] == 1'b0)
    else $error("PC is odd: %h", pc);
endmodule
