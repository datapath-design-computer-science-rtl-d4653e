// reg_alu_unit: register file and ALU of the single-cycle datapath.
// Rs and Rt address the two read ports; Read data 1 drives ALU input A.
// ALU input B is Read data 2 when ALUSrc = 0 (R-type) or the sign-extended
// 4-bit offset when ALUSrc = 1 (LW/SW address = Rs + offset). The offset is
// the same instruction field as Rd. The write register is Rd when
// RegDst = 0 (R-type) and Rt when RegDst = 1 (a load writes Rt). When
// RegWrite is high, write_data is stored into the write register on the
// rising clock edge. Everything else is combinational, so the ALU result
// and Zero are valid in the same cycle as the register numbers. reset
// clears the registers (register 1 becomes 1). write_data is an input so
// that the enclosing datapath decides what is written back.
module reg_alu_unit
  import dp_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  logic [REG_ADDR_W-1:0] rs,
  input  logic [REG_ADDR_W-1:0] rt,
  input  logic [REG_ADDR_W-1:0] rd,
  input  logic                  regwrite,
  input  logic                  regdst,
  input  logic                  alusrc,
  input  logic [ALUOP_W-1:0]    aluop,
  input  logic [WORD_W-1:0]     write_data,
  output logic [REG_ADDR_W-1:0] write_reg,
  output logic [WORD_W-1:0]     read_data1,
  output logic [WORD_W-1:0]     read_data2,
  output logic [WORD_W-1:0]     alu_b,
  output logic [WORD_W-1:0]     alu_result,
  output logic                  zero
);
  logic [WORD_W-1:0] offset_ext;

  mux2 #(.WIDTH(REG_ADDR_W)) u_regdst_mux (
    .d0(rd), .d1(rt), .sel(regdst), .y(write_reg)
  );

  regfile #(.ADDR_W(REG_ADDR_W), .WIDTH(WORD_W)) u_rf (
    .clk(clk), .rst(reset), .we(regwrite),
    .raddr1(rs), .raddr2(rt), .waddr(write_reg), .wdata(write_data),
    .rdata1(read_data1), .rdata2(read_data2)
  );

  sign_extend #(.IN_W(OFFSET_W), .OUT_W(WORD_W)) u_sext (
    .in(rd), .out(offset_ext)
  );

  mux2 #(.WIDTH(WORD_W)) u_alusrc_mux (
    .d0(read_data2), .d1(offset_ext), .sel(alusrc), .y(alu_b)
  );

  alu #(.WIDTH(WORD_W)) u_alu (
    .a(read_data1), .b(alu_b), .aluop(aluop), .result(alu_result), .zero(zero)
  );
endmodule
