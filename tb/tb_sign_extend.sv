// tb_sign_extend: applies all sixteen 4-bit offsets and compares the 16-bit
// result with the integer value of the offset read as two's complement
// (-8..+7).
module tb_sign_extend;
  logic [3:0]  in;
  logic [15:0] out;
  int checks = 0, failures = 0;

  sign_extend dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int expected;
      in = 4'(v); #1;
      expected = (v < 8) ? v : v - 16;
      checks++;
      if (out !== 16'(expected)) begin
        failures++;
        $display("FAIL sext(%h) = %h, expected %h", in, out, 16'(expected));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
