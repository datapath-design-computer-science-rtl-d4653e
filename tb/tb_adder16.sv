// tb_adder16: checks the 16-bit adder on corner values and random operands
// against a sum computed in 32-bit integer arithmetic and reduced mod 2**16.
module tb_adder16;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  adder16 dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [15:0] x, input logic [15:0] z);
    int unsigned ref_sum;
    a = x; b = z; #1;
    ref_sum = (int'(x) + int'(z)) % 65536;
    checks++;
    if (y !== 16'(ref_sum)) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, z, y, 16'(ref_sum));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0002);
    check(16'h0006, 16'h0002);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h0008, 16'hFFF8);
    for (int i = 0; i < 200; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
