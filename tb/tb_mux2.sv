// tb_mux2: checks the multiplexer at 16 bits (next-PC and ALU-B selects) and
// at 4 bits (destination register select) with random data, both selects.
module tb_mux2;
  logic [15:0] a0, a1, ay;
  logic [3:0]  b0, b1, by;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(16)) dut16 (.d0(a0), .d1(a1), .sel(sel), .y(ay));
  mux2 #(.WIDTH(4))  dut4  (.d0(b0), .d1(b1), .sel(sel), .y(by));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      a0 = 16'($urandom); a1 = 16'($urandom);
      b0 = 4'($urandom);  b1 = 4'($urandom);
      if (i < 2) begin a0 = 16'h1234; a1 = 16'hABCD; b0 = 4'h6; b1 = 4'h9; end
      sel = i[0]; #1;
      checks += 2;
      if (ay !== (i[0] ? a1 : a0)) begin failures++; $display("FAIL mux16 sel=%b", sel); end
      if (by !== (i[0] ? b1 : b0)) begin failures++; $display("FAIL mux4 sel=%b", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
