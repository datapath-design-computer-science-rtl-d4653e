// tb_instr_mem: loads a whole memory image through the load port, then reads
// it back at byte addresses (even and odd) and compares with a copy kept in
// the testbench; also checks that a later load changes only its own word.
module tb_instr_mem;
  localparam int AW = 8;
  localparam int DEPTH = 2 ** (AW - 1);
  logic          clk = 0;
  logic [AW-1:0] addr, prog_addr;
  logic [15:0]   instr, prog_data;
  logic          prog_we;
  logic [15:0]   image [DEPTH];
  int checks = 0, failures = 0;

  instr_mem dut (
    .clk(clk), .addr(addr), .instr(instr),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; addr = 0; prog_addr = 0; prog_data = 0;
    for (int w = 0; w < DEPTH; w++) begin
      image[w] = 16'($urandom);
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(2 * w); prog_data = image[w];
    end
    @(negedge clk);
    prog_we = 0;
    for (int b = 0; b < 2 * DEPTH; b++) begin
      addr = AW'(b); #1;
      checks++;
      if (instr !== image[b / 2]) begin
        failures++;
        $display("FAIL addr %h: %h expected %h", addr, instr, image[b / 2]);
      end
    end
    // overwrite word 5 and check it and its neighbours
    @(negedge clk);
    prog_we = 1; prog_addr = AW'(10); prog_data = 16'hBEEF; image[5] = 16'hBEEF;
    @(negedge clk);
    prog_we = 0;
    for (int w = 4; w <= 6; w++) begin
      addr = AW'(2 * w); #1;
      checks++;
      if (instr !== image[w]) begin failures++; $display("FAIL reload word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
