// tb_pc_register: checks that clr forces the PC to 0 without a clock edge,
// that the register holds between edges and loads d on each rising edge.
module tb_pc_register;
  logic        clk = 0, clr;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  pc_register dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic [15:0] e, input string what);
    checks++;
    if (q !== e) begin failures++; $display("FAIL %s: q=%h expected %h", what, q, e); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; d = 16'h5A5A;
    @(negedge clk);
    @(negedge clk);
    expect_q(16'h5A5A, "load");
    #1 clr = 1; #1;
    expect_q(16'h0000, "asynchronous clear");
    @(negedge clk);
    expect_q(16'h0000, "held clear");
    clr = 0;
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v;
      logic [15:0] prev;
      prev = q;
      v = 16'($urandom);
      d = v;
      #2 expect_q(prev, "no change before the edge");
      @(negedge clk);
      expect_q(v, "load on edge");
      d = ~v; #1;
      expect_q(v, "hold between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
