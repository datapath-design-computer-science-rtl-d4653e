// tb_regfile: checks the reset values (all 0 except register 1 = 1), then
// runs random writes and reads on both ports against a reference array,
// including writes with RegWrite low, which must change nothing, and a
// register written and read in the same cycle (old value until the edge).
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [3:0]  ra1, ra2, wa;
  logic [15:0] wd, rd1, rd2;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  regfile dut (
    .clk(clk), .rst(rst), .we(we), .raddr1(ra1), .raddr2(ra2),
    .waddr(wa), .wdata(wd), .rdata1(rd1), .rdata2(rd2)
  );

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); ra2 = 4'(15 - r); #1;
      checks += 2;
      if (rd1 !== model[r])      begin failures++; $display("FAIL r%0d port1 %h exp %h", r, rd1, model[r]); end
      if (rd2 !== model[15 - r]) begin failures++; $display("FAIL r%0d port2 %h exp %h", 15 - r, rd2, model[15 - r]); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    rst = 1; #1;
    for (int r = 0; r < 16; r++) model[r] = (r == 1) ? 16'd1 : 16'd0;
    @(negedge clk);
    rst = 0;
    check_reads();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 4'($urandom);
      wd = 16'($urandom);
      ra1 = wa; ra2 = 4'($urandom); #1;
      checks++;
      if (rd1 !== model[wa]) begin failures++; $display("FAIL read before write r%0d", wa); end
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL after write r%0d %h exp %h", ra1, rd1, model[ra1]); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL port2 r%0d %h exp %h", ra2, rd2, model[ra2]); end
    end
    @(negedge clk);
    we = 0;
    check_reads();
    // reset again in the middle of operation
    rst = 1; #1; rst = 0;
    for (int r = 0; r < 16; r++) model[r] = (r == 1) ? 16'd1 : 16'd0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
