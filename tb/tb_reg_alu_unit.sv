// tb_reg_alu_unit: drives the register file / ALU unit with the four bench
// tests (ALU result fed back as the write data, as in the full datapath):
//   1: ALUop 2, Rs 1, Rt 1, Rd 6, write, RegDst 0, ALUSrc 0 -> 1+1 = 2 into r6
//   2: ALUop 2, Rs 6, Rt 6, Rd 3, write, RegDst 0, ALUSrc 0 -> 2+2 = 4 into r3
//   3: ALUop 2, Rs 6, Rt 1, Rd 7, no write, RegDst 1, ALUSrc 1 -> 2+7 = 9
//      (a SW: address 9, store value r1 = 1)
//   4: ALUop 2, Rs 3, Rt 6, Rd 5, write, RegDst 1, ALUSrc 1 -> 4+5 = 9 into r6
// then random operations checked against a reference register array.
module tb_reg_alu_unit;
  logic        clk = 0, reset, regwrite, regdst, alusrc, zero;
  logic [3:0]  rs, rt, rd, aluop, write_reg;
  logic [15:0] rd1, rd2, alu_b, alu_result;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  reg_alu_unit dut (
    .clk(clk), .reset(reset), .rs(rs), .rt(rt), .rd(rd),
    .regwrite(regwrite), .regdst(regdst), .alusrc(alusrc), .aluop(aluop),
    .write_data(alu_result), .write_reg(write_reg),
    .read_data1(rd1), .read_data2(rd2), .alu_b(alu_b),
    .alu_result(alu_result), .zero(zero)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_alu(logic [3:0] o, logic [15:0] x, logic [15:0] y);
    case (o)
      4'd0: return x & y;
      4'd1: return x | y;
      4'd2: return x + y;
      4'd6: return x - y;
      4'd7: return ($signed(x) < $signed(y)) ? 16'd1 : 16'd0;
      default: return 16'd0;
    endcase
  endfunction

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  // apply one operation, check the combinational outputs, clock it, update model
  task automatic op(input logic [3:0] o, input logic [3:0] s, input logic [3:0] t,
                    input logic [3:0] d, input logic w, input logic dst, input logic src);
    logic [15:0] bval, e;
    logic [3:0]  wr;
    @(negedge clk);
    aluop = o; rs = s; rt = t; rd = d; regwrite = w; regdst = dst; alusrc = src;
    #1;
    bval = src ? {{12{d[3]}}, d} : model[t];
    e    = ref_alu(o, model[s], bval);
    wr   = dst ? t : d;
    expect_eq(rd1, model[s], "Read data 1");
    expect_eq(rd2, model[t], "Read data 2");
    expect_eq(alu_result, e, $sformatf("ALU result op %0d", o));
    expect_eq(16'(zero), 16'(e == 0), "Zero");
    expect_eq(16'(write_reg), 16'(wr), "write register");
    @(posedge clk);
    if (w) model[wr] = e;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    regwrite = 0; regdst = 0; alusrc = 0; aluop = 0; rs = 0; rt = 0; rd = 0;
    reset = 1; #1;
    for (int r = 0; r < 16; r++) model[r] = (r == 1) ? 16'd1 : 16'd0;
    @(negedge clk);
    reset = 0;
    op(4'd2, 4'd1, 4'd1, 4'd6, 1'b1, 1'b0, 1'b0);
    expect_eq(model[6], 16'd2, "test 1 result");
    op(4'd2, 4'd6, 4'd6, 4'd3, 1'b1, 1'b0, 1'b0);
    expect_eq(model[3], 16'd4, "test 2 result");
    op(4'd2, 4'd6, 4'd1, 4'd7, 1'b0, 1'b1, 1'b1);
    expect_eq(alu_result, 16'd9, "test 3 address");
    expect_eq(rd2, 16'd1, "test 3 store value");
    op(4'd2, 4'd3, 4'd6, 4'd5, 1'b1, 1'b1, 1'b1);
    expect_eq(model[6], 16'd9, "test 4 result");
    // read back r6 after test 4 through the datapath
    op(4'd2, 4'd6, 4'd0, 4'd0, 1'b0, 1'b0, 1'b0);
    expect_eq(alu_result, 16'd9, "r6 after test 4");
    for (int i = 0; i < 400; i++) begin
      logic [3:0] o;
      case ($urandom % 5)
        0: o = 4'd0; 1: o = 4'd1; 2: o = 4'd2; 3: o = 4'd6; default: o = 4'd7;
      endcase
      op(o, 4'($urandom), 4'($urandom), 4'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
