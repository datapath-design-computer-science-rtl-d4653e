// tb_shift_left1: compares the shifter with multiplication by two modulo
// 2**16, for corner values and random inputs.
module tb_shift_left1;
  logic [15:0] in, out;
  int checks = 0, failures = 0;

  shift_left1 dut (.in(in), .out(out));

  task automatic check(input logic [15:0] v);
    in = v; #1;
    checks++;
    if (out !== 16'((int'(v) * 2) % 65536)) begin
      failures++;
      $display("FAIL %h << 1 = %h", v, out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0003); check(16'hFFFC); check(16'h8001); check(16'h0000);
    for (int i = 0; i < 100; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
