// Control Unit: Main Decoder, ALU Decoder and the next-PC decision.
//
// The Main Decoder looks at the opcode, the ALU Decoder at ALUOp, funct3 and
// Instr[30]. PCSrc selects the branch/jump target instead of PC+4:
//   PCSrc = Jump | (Branch & (Zero ^ invert)),  invert = funct3[0] ^ funct3[2]
// With the compare the ALU Decoder picks, Zero is high when beq, bge and
// bgeu hold, and low when bne, blt and bltu hold; invert flips the test for
// the second group. The split into two decoders and the signal set (op,
// funct3, funct7 bit, Zero in; PCSrc, ResultSrc, MemWrite, ALUControl,
// ALUSrc, ImmSrc, RegWrite out) follow the processor description; the PCSrc
// formula is this design's own.
// Interface: op, funct3, funct7b5, zero in; controls out. Combinational.
module control_unit
  import rv32i_pkg::*;
(
  input  logic [6:0]  op,
  input  logic [2:0]  funct3,
  input  logic        funct7b5,
  input  logic        zero,
  output logic        pc_src,
  output result_src_e result_src,
  output logic        mem_write,
  output alu_ctrl_e   alu_control,
  output logic        alu_src,
  output imm_src_e    imm_src,
  output logic        reg_write
);

  alu_op_e alu_op;
  logic    branch;
  logic    jump;
  logic    invert;

  main_decoder u_main_dec (
    .op         (op),
    .reg_write  (reg_write),
    .imm_src    (imm_src),
    .alu_src    (alu_src),
    .mem_write  (mem_write),
    .result_src (result_src),
    .branch     (branch),
    .jump       (jump),
    .alu_op     (alu_op)
  );

  alu_decoder u_alu_dec (
    .alu_op      (alu_op),
    .funct3      (funct3),
    .funct7b5    (funct7b5),
    .op_b5       (op[5]),
    .alu_control (alu_control)
  );

  assign invert = funct3[0] ^ funct3[2];
  assign pc_src = jump | (branch & (zero ^ invert));

endmodule
