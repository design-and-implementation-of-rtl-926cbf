// ALU Decoder of the Control Unit.
//
// Chooses the ALU operation from ALUOp, funct3 (Instr[14:12]), bit 5 of
// funct7 (Instr[30]) and bit 5 of the opcode:
//   ALUOp 0 (lw, sw)  -> ADD, for the address base + offset
//   ALUOp 1 (branch)  -> SUB for beq/bne, SLT for blt/bge, SLTU for bltu/bgeu
//   ALUOp 2 (R and I) -> by funct3: 000 ADD (SUB when R-type and Instr[30]),
//                        001 SLL, 010 SLT, 011 SLTU, 100 XOR,
//                        101 SRL (SRA when Instr[30]), 110 OR, 111 AND
// Opcode bit 5 separates sub (R-type) from addi, whose Instr[30] is an
// immediate bit. The use of the three instruction fields follows the
// processor description; the branch compares other than SUB are this
// design's choice, made so that all six branches need only the Zero flag.
// Interface: alu_op, funct3, funct7b5, op_b5 in; alu_control out.
// Timing: combinational.
module alu_decoder
  import rv32i_pkg::*;
(
  input  alu_op_e     alu_op,
  input  logic [2:0]  funct3,
  input  logic        funct7b5,
  input  logic        op_b5,
  output alu_ctrl_e   alu_control
);

  always_comb begin
    alu_control = ALU_ADD;
    unique case (alu_op)
      ALUOP_ADD: alu_control = ALU_ADD;
      ALUOP_BRANCH: begin
        unique case (funct3[2:1])
          2'b10:   alu_control = ALU_SLT;   // blt, bge
          2'b11:   alu_control = ALU_SLTU;  // bltu, bgeu
          default: alu_control = ALU_SUB;   // beq, bne
        endcase
      end
      ALUOP_FUNCT: begin
        unique case (funct3)
          3'b000:  alu_control = (op_b5 && funct7b5) ? ALU_SUB : ALU_ADD;
          3'b001:  alu_control = ALU_SLL;
          3'b010:  alu_control = ALU_SLT;
          3'b011:  alu_control = ALU_SLTU;
          3'b100:  alu_control = ALU_XOR;
          3'b101:  alu_control = funct7b5 ? ALU_SRA : ALU_SRL;
          3'b110:  alu_control = ALU_OR;
          default: alu_control = ALU_AND;
        endcase
      end
      default: alu_control = ALU_ADD;
    endcase
  end

endmodule
