// regfile: 2**ADDR_W registers of WIDTH bits with two combinational read
// ports (Read register 1/2 -> Read data 1/2) and one write port. When
// we (RegWrite) is high, wdata is written into register waddr on the rising
// clock edge; a read of that register shows the new value from the next
// cycle on. A high rst clears every register at once, except register 1,
// which is set to 1, so that a program has a nonzero value to start from.
// Every register, register 0 included, can be written.
module regfile #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned WIDTH  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [ADDR_W-1:0] raddr1,
  input  logic [ADDR_W-1:0] raddr2,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata1,
  output logic [WIDTH-1:0]  rdata2
);
  localparam int unsigned NREGS = 2 ** ADDR_W;

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= (i == 1) ? WIDTH'(1) : '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = regs[raddr1];
    rdata2 = regs[raddr2];
  end
endmodule
