// Register file: 32 registers of 32 bits, two read ports and one write port.
//
// RD1 and RD2 give the registers addressed by A1 and A2 combinationally, so
// both source operands are available within the cycle. A3/WD3 write one
// register at the rising clock edge when we3 (RegWrite) is high. Register
// x0 always reads as zero and ignores writes, as RV32I requires. The port
// set follows the processor's block diagram; clearing every register on
// reset (active high, asynchronous) is this design's own choice, so that a
// program finds known values.
// Interface: clk, reset, we3, a1, a2, a3, wd3 in; rd1, rd2 out.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     we3,
  input  logic [$clog2(NREGS)-1:0] a1,
  input  logic [$clog2(NREGS)-1:0] a2,
  input  logic [$clog2(NREGS)-1:0] a3,
  input  logic [WIDTH-1:0]         wd3,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  assign rd1 = (a1 == '0) ? '0 : regs[a1];
  assign rd2 = (a2 == '0) ? '0 : regs[a2];

endmodule
