// Main Decoder of the Control Unit.
//
// Turns the opcode into the datapath's high-level controls:
//   op        RegWrite ImmSrc ALUSrc MemWrite ResultSrc Branch ALUOp Jump
//   lw   03      1      I(0)    1       0      MEM(1)     0    ADD(0)  0
//   sw   23      0      S(1)    1       1        -        0    ADD(0)  0
//   R    33      1       -      0       0      ALU(0)     0   FUNCT(2) 0
//   I    13      1      I(0)    1       0      ALU(0)     0   FUNCT(2) 0
//   br   63      0      B(2)    0       0        -        1   BR(1)   0
//   jal  6f      1      J(3)    -       0      PC4(2)     0     -     1
// Don't-care entries are driven as 0. The lw, sw, I-type, branch and jal rows
// match the recorded control waveform of the design; the R-type row follows
// the same scheme. Any other opcode gives all-zero controls, so it writes
// neither a register nor memory (this design's choice).
// Interface: op in; control outputs. Timing: combinational.
module main_decoder
  import rv32i_pkg::*;
(
  input  logic [6:0]  op,
  output logic        reg_write,
  output imm_src_e    imm_src,
  output logic        alu_src,
  output logic        mem_write,
  output result_src_e result_src,
  output logic        branch,
  output logic        jump,
  output alu_op_e     alu_op
);

  always_comb begin
    reg_write  = 1'b0;
    imm_src    = IMM_I;
    alu_src    = 1'b0;
    mem_write  = 1'b0;
    result_src = RES_ALU;
    branch     = 1'b0;
    jump       = 1'b0;
    alu_op     = ALUOP_ADD;
    unique case (op)
      OP_LOAD: begin
        reg_write  = 1'b1;
        alu_src    = 1'b1;
        result_src = RES_MEM;
      end
      OP_STORE: begin
        imm_src   = IMM_S;
        alu_src   = 1'b1;
        mem_write = 1'b1;
      end
      OP_REG: begin
        reg_write = 1'b1;
        alu_op    = ALUOP_FUNCT;
      end
      OP_IMM: begin
        reg_write = 1'b1;
        alu_src   = 1'b1;
        alu_op    = ALUOP_FUNCT;
      end
      OP_BRANCH: begin
        imm_src = IMM_B;
        branch  = 1'b1;
        alu_op  = ALUOP_BRANCH;
      end
      OP_JAL: begin
        reg_write  = 1'b1;
        imm_src    = IMM_J;
        result_src = RES_PC4;
        jump       = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
