// tb_fetch_unit: drives the fetch and branch-address unit like the bench
// exercises on it. First it loads a small program and steps the PC from
// reset through six instructions (PC = 0, 2, 4, ...), checking the fetched
// words. Then it repeats the branch sequence: offset 3 taken from PC 0
// gives 8; Zero = 0 (registers not equal) gives PC + 2 = A; Branch = 0 gives
// C; taken branches with offsets C, 5, 2, 9 give 6, 12, 18, C (hex).
// Finally random Branch/Zero/offset values are checked against
// next = (Branch & Zero) ? PC + 2 + 2*sext(offset) : PC + 2.
// One PC update per clock edge is checked throughout.
module tb_fetch_unit;
  logic        clk = 0, reset, branch, zero;
  logic [3:0]  offset;
  logic [15:0] pc, pc_plus2, branch_target, instr, prog_data;
  logic        take_branch, prog_we;
  logic [7:0]  prog_addr;
  logic [15:0] program_words [128];
  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0;

  fetch_unit dut (
    .clk(clk), .reset(reset), .branch(branch), .zero(zero), .offset(offset),
    .pc(pc), .pc_plus2(pc_plus2), .branch_target(branch_target),
    .take_branch(take_branch), .instr(instr),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  // one clock with the given controls; checks the PC that results
  task automatic step(input logic b, input logic z, input logic [3:0] off, input logic [15:0] e);
    branch = b; zero = z; offset = off;
    @(negedge clk);
    expect_eq(pc, e, $sformatf("PC after B=%b Z=%b off=%h", b, z, off));
    expect_eq(instr, program_words[pc[7:1]], "fetched instruction");
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    branch = 0; zero = 0; offset = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    reset = 1;
    for (int w = 0; w < 128; w++) begin
      program_words[w] = 16'($urandom);
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(2 * w); prog_data = program_words[w];
    end
    @(negedge clk);
    prog_we = 0;
    expect_eq(pc, 16'h0000, "PC held at 0 by reset");
    reset = 0;
    expect_eq(instr, program_words[0], "instruction at address 0");
    // sequential fetch of the first six instructions
    for (int i = 1; i < 6; i++) step(1'b0, 1'b0, 4'h0, 16'(2 * i));
    // the branch sequence
    reset = 1; #1; reset = 0;
    expect_eq(pc, 16'h0000, "PC cleared by reset");
    step(1'b1, 1'b1, 4'h3, 16'h0008);
    step(1'b1, 1'b0, 4'h3, 16'h000A);
    step(1'b0, 1'b1, 4'h3, 16'h000C);
    step(1'b1, 1'b1, 4'hC, 16'h0006);
    step(1'b1, 1'b1, 4'h5, 16'h0012);
    step(1'b1, 1'b1, 4'h2, 16'h0018);
    step(1'b1, 1'b1, 4'h9, 16'h000C);
    // random
    for (int i = 0; i < 300; i++) begin
      logic b, z;
      logic [3:0] off;
      logic [15:0] e;
      int so;
      b = 1'($urandom); z = 1'($urandom); off = 4'($urandom);
      so = off[3] ? int'(off) - 16 : int'(off);
      e = (b && z) ? 16'(int'(pc) + 2 + 2 * so) : 16'(int'(pc) + 2);
      if (b && z) taken++; else not_taken++;
      step(b, z, off, e);
    end
    checks++;
    if (taken == 0 || not_taken == 0) begin failures++; $display("FAIL branch cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
