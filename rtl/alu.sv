// Arithmetic Logic Unit.
//
// Computes result = a OP b for the operation chosen by alu_control: add,
// subtract, and, or, xor, set-less-than (signed and unsigned) and the three
// shifts, whose amount is b[4:0]. Zero is high when the result is 0; the
// Control Unit uses it to decide branches (SUB for beq/bne, SLT for
// blt/bge, SLTU for bltu/bgeu). Add, subtract, and, or and the comparisons
// are the operations the processor description names; xor and the shifts
// complete the RV32I register and immediate instructions.
// Interface: a (SrcA), b (SrcB), alu_control in; result, zero out.
// Timing: combinational.
module alu
  import rv32i_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctrl_e        alu_control,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  localparam int unsigned SW = $clog2(WIDTH);

  logic [SW-1:0] shamt;
  assign shamt = b[SW-1:0];

  always_comb begin
    unique case (alu_control)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_SLT:  result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: result = {{(WIDTH-1){1'b0}}, a < b};
      ALU_SLL:  result = a << shamt;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = WIDTH'($signed(a) >>> shamt);
      default:  result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
