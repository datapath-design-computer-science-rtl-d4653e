// tb_alu: checks each ALUop of the function table (0 AND, 1 OR, 2 add,
// 6 subtract, 7 signed set-on-less-than), the zero result of unused codes,
// and the Zero flag, on corner and random operands, against results
// computed here with integer arithmetic.
module tb_alu;
  logic [15:0] a, b, result;
  logic [3:0]  op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .aluop(op), .result(result), .zero(zero));

  function automatic logic [15:0] reference(logic [3:0] o, logic [15:0] x, logic [15:0] y);
    int sx, sy;
    sx = (x[15]) ? int'(x) - 65536 : int'(x);
    sy = (y[15]) ? int'(y) - 65536 : int'(y);
    case (o)
      4'd0: return x & y;
      4'd1: return x | y;
      4'd2: return 16'((int'(x) + int'(y)) % 65536);
      4'd6: return 16'((int'(x) - int'(y) + 65536) % 65536);
      4'd7: return (sx < sy) ? 16'd1 : 16'd0;
      default: return 16'd0;
    endcase
  endfunction

  task automatic check(input logic [3:0] o, input logic [15:0] x, input logic [15:0] y);
    logic [15:0] e;
    op = o; a = x; b = y; #1;
    e = reference(o, x, y);
    checks += 2;
    if (result !== e) begin failures++; $display("FAIL op %0d %h %h: %h exp %h", o, x, y, result, e); end
    if (zero !== (e == 16'd0)) begin failures++; $display("FAIL zero op %0d %h %h", o, x, y); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(4'd2, 16'd1, 16'd1);          // 1 + 1 = 2
    check(4'd6, 16'd4, 16'd4);          // equal registers: Zero
    check(4'd6, 16'd3, 16'd5);          // negative difference
    check(4'd7, 16'hFFFF, 16'd1);       // -1 < 1
    check(4'd7, 16'd1, 16'hFFFF);       // 1 < -1 is false
    check(4'd7, 16'h7FFF, 16'h8000);    // largest positive vs most negative
    check(4'd0, 16'hF0F0, 16'h0FF0);
    check(4'd1, 16'hF000, 16'h000F);
    check(4'd2, 16'hFFFF, 16'd1);       // wraps to zero
    for (int o = 0; o < 16; o++)
      for (int i = 0; i < 40; i++) check(4'(o), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
