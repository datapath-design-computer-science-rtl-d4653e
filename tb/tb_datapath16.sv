// tb_datapath16: end-to-end test of the whole datapath at its default sizes.
// The datapath has no decoder, so this testbench plays that part: it gives
// the opcode field its own test encoding (below) and drives Branch,
// RegWrite, RegDst, ALUSrc and ALUop from the fetched opcode, as a control
// unit would. A reference model executes the same program instruction by
// instruction and every cycle the PC, both register reads, the write
// register, the ALU result, Zero and the branch decision are compared.
// The program starts with the four register/ALU bench tests written as
// instructions, then a directed BEQ taken and not taken, then random
// instructions fill the rest of the memory, after a counting loop closed
// by a backward branch. Each mechanism (R-type write,
// load-style write to Rt, store with no write, every ALU function, BEQ taken
// and not taken, reset) is counted; one that never happens is a failure.
//
// Test opcode encoding (bits 15..12): 0 AND, 1 OR, 2 ADD, 3 SUB, 4 SLT,
// 8 LW, 9 SW, A BEQ; anything else does nothing but advance the PC.
module tb_datapath16;
  import dp_pkg::*;

  localparam int AW    = 8;
  localparam int WORDS = 2 ** (AW - 1);
  localparam int CYCLES = 3000;

  logic        clk = 0, reset;
  logic        branch, regwrite, regdst, alusrc;
  logic [3:0]  aluop, opcode, write_reg;
  logic        prog_we, zero, take_branch;
  logic [AW-1:0] prog_addr;
  logic [15:0] prog_data, pc, instr, read_data1, read_data2, alu_result;

  datapath16 dut (
    .clk(clk), .reset(reset), .branch(branch), .regwrite(regwrite),
    .regdst(regdst), .alusrc(alusrc), .aluop(aluop),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .opcode(opcode), .write_reg(write_reg),
    .read_data1(read_data1), .read_data2(read_data2),
    .alu_result(alu_result), .zero(zero), .take_branch(take_branch)
  );

  always #5 clk = ~clk;

  // test control unit
  always_comb begin
    branch = 1'b0; regwrite = 1'b0; regdst = 1'b0; alusrc = 1'b0; aluop = 4'd0;
    case (opcode)
      4'h0: begin regwrite = 1'b1; aluop = ALU_AND; end
      4'h1: begin regwrite = 1'b1; aluop = ALU_OR;  end
      4'h2: begin regwrite = 1'b1; aluop = ALU_ADD; end
      4'h3: begin regwrite = 1'b1; aluop = ALU_SUB; end
      4'h4: begin regwrite = 1'b1; aluop = ALU_SLT; end
      4'h8: begin regwrite = 1'b1; regdst = 1'b1; alusrc = 1'b1; aluop = ALU_ADD; end
      4'h9: begin regdst = 1'b1; alusrc = 1'b1; aluop = ALU_ADD; end
      4'hA: begin branch = 1'b1; aluop = ALU_SUB; end
      default: ;
    endcase
  end

  // reference model state
  logic [15:0] mem [WORDS];
  logic [15:0] regs [16];
  logic [15:0] ref_pc;
  int checks = 0, failures = 0;
  int n_rtype = 0, n_load = 0, n_store = 0, n_taken = 0, n_not_taken = 0,
      n_slt_true = 0, n_reset = 0, n_backward = 0;
  int n_fn [5] = '{default: 0};

  function automatic logic [15:0] enc(logic [3:0] o, logic [3:0] s, logic [3:0] t, logic [3:0] d);
    return {o, s, t, d};
  endfunction

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s at PC %h: %h expected %h", what, ref_pc, got, e);
    end
  endtask

  task automatic ref_reset();
    ref_pc = 16'h0000;
    for (int r = 0; r < 16; r++) regs[r] = (r == 1) ? 16'd1 : 16'd0;
  endtask

  initial begin
    repeat (CYCLES + 2 * WORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0;
    reset = 1;
    // directed part: the four bench tests, then BEQ not taken and taken
    mem[0] = enc(4'h2, 4'd1, 4'd1, 4'd6);   // ADD r6 = r1 + r1     -> 2
    mem[1] = enc(4'h2, 4'd6, 4'd6, 4'd3);   // ADD r3 = r6 + r6     -> 4
    mem[2] = enc(4'h9, 4'd6, 4'd1, 4'd7);   // SW  r1 -> [r6 + 7]   addr 9
    mem[3] = enc(4'h8, 4'd3, 4'd6, 4'd5);   // LW  r6 <- [r3 + 5]   addr 9
    mem[4] = enc(4'hA, 4'd6, 4'd3, 4'd2);   // BEQ r6, r3 (9 vs 4): not taken
    mem[5] = enc(4'hA, 4'd6, 4'd6, 4'd1);   // BEQ r6, r6: taken, skips mem[6]
    mem[6] = enc(4'h2, 4'd1, 4'd1, 4'd9);   // skipped
    mem[7] = enc(4'h4, 4'd3, 4'd6, 4'd8);   // SLT r8 = (4 < 9)     -> 1
    mem[8] = enc(4'h3, 4'd3, 4'd6, 4'd10);  // SUB r10 = 4 - 9      -> -5
    mem[9] = enc(4'h0, 4'd10, 4'd6, 4'd11); // AND
    mem[10] = enc(4'h1, 4'd10, 4'd6, 4'd12);// OR
    // counting loop: r13 += 1 until r13 == r3 (4), closed by a backward BEQ
    mem[11] = enc(4'h2, 4'd13, 4'd1, 4'd13);// ADD r13 = r13 + r1
    mem[12] = enc(4'hA, 4'd13, 4'd3, 4'd1); // BEQ r13, r3: exit to mem[14]
    mem[13] = enc(4'hA, 4'd0, 4'd0, 4'hD);  // BEQ r0, r0, -3: back to mem[11]
    // random part; its branches only go forward, so no endless loop forms
    for (int w = 14; w < WORDS; w++) begin
      logic [3:0] o;
      case ($urandom % 10)
        0: o = 4'h0; 1: o = 4'h1; 2: o = 4'h2; 3: o = 4'h3; 4: o = 4'h4;
        5: o = 4'h8; 6: o = 4'h9; 7, 8: o = 4'hA; default: o = 4'($urandom);
      endcase
      mem[w] = enc(o, 4'($urandom), 4'($urandom), 4'($urandom));
      if (o == 4'hA) mem[w][3] = 1'b0;
    end
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(2 * w); prog_data = mem[w];
    end
    @(negedge clk);
    prog_we = 0;
    ref_reset();
    reset = 0;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic [15:0] ins, a, b, res, nxt;
      logic [3:0]  o, s, t, d, wr;
      logic        we, br;
      // a reset in the middle of the run
      if (cyc == CYCLES / 2) begin
        reset = 1; #1; reset = 0;
        ref_reset();
        n_reset++;
      end
      #1;
      ins = mem[ref_pc[AW-1:1]];
      {o, s, t, d} = ins;
      a = regs[s];
      b = (o == 4'h8 || o == 4'h9) ? {{12{d[3]}}, d} : regs[t];
      we = 1'b0; br = 1'b0; wr = d; res = 16'd0;
      case (o)
        4'h0: begin res = a & b; we = 1'b1; n_fn[0]++; n_rtype++; end
        4'h1: begin res = a | b; we = 1'b1; n_fn[1]++; n_rtype++; end
        4'h2: begin res = a + b; we = 1'b1; n_fn[2]++; n_rtype++; end
        4'h3: begin res = a - b; we = 1'b1; n_fn[3]++; n_rtype++; end
        4'h4: begin
          res = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0; we = 1'b1;
          n_fn[4]++; n_rtype++; if (res == 16'd1) n_slt_true++;
        end
        4'h8: begin res = a + b; we = 1'b1; wr = t; n_load++; end
        4'h9: begin res = a + b; wr = t; n_store++; end
        4'hA: begin res = a - b; br = (res == 16'd0);
          if (br) n_taken++; else n_not_taken++;
          if (br && d[3]) n_backward++;
        end
        default: res = a & b;
      endcase
      nxt = br ? ref_pc + 16'd2 + {{11{d[3]}}, d, 1'b0} : ref_pc + 16'd2;

      expect_eq(pc, ref_pc, "PC");
      expect_eq(instr, ins, "instruction");
      expect_eq(read_data1, a, "Read data 1");
      expect_eq(read_data2, regs[t], "Read data 2");
      expect_eq(alu_result, res, "ALU result");
      expect_eq(16'(zero), 16'(res == 16'd0), "Zero");
      expect_eq(16'(take_branch), 16'(br), "branch taken");
      if (o == 4'h8 || o == 4'h9 || o == 4'h0 || o == 4'h1 || o == 4'h2 || o == 4'h3 || o == 4'h4)
        expect_eq(16'(write_reg), 16'(wr), "write register");

      @(posedge clk);
      if (we) regs[wr] = res;
      ref_pc = nxt;
      @(negedge clk);
    end

    checks++;
    if (n_rtype == 0 || n_load == 0 || n_store == 0 || n_taken == 0 ||
        n_not_taken == 0 || n_slt_true == 0 || n_reset == 0 || n_backward == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    for (int f = 0; f < 5; f++) begin
      checks++;
      if (n_fn[f] == 0) begin failures++; $display("FAIL ALU function %0d never used", f); end
    end
    $display("counts: rtype=%0d load=%0d store=%0d beq_taken=%0d beq_not_taken=%0d backward=%0d slt_true=%0d reset=%0d",
             n_rtype, n_load, n_store, n_taken, n_not_taken, n_backward, n_slt_true, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
