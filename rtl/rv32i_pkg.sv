// Shared types and constants of the single-cycle RV32I core.
//
// The control signals that travel between the Main Decoder, the ALU Decoder,
// the immediate extender, the ALU and the datapath multiplexers are defined
// here as enums, so that every module agrees on one encoding.
//
// Encodings that follow the design's waveform record: ALUControl ADD=5,
// SUB=A, OR=3, AND=2; ImmSrc I=0, S=1, B=2, J=3; ResultSrc ALU=0, MEM=1,
// PC+4=2; ALUOp 0 (address add), 1 (branch compare), 2 (from funct3/funct7).
// The remaining ALUControl codes (SLL, SLT, XOR, SRL, SRA, SLTU) are this
// design's own choice.
package rv32i_pkg;

  // Major opcodes (Instr[6:0]) of the instructions the core executes.
  localparam logic [6:0] OP_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OP_IMM    = 7'b0010011;  // addi, slti, ..., srai
  localparam logic [6:0] OP_STORE  = 7'b0100011;  // sw
  localparam logic [6:0] OP_REG    = 7'b0110011;  // add, sub, ..., and
  localparam logic [6:0] OP_BRANCH = 7'b1100011;  // beq ... bgeu
  localparam logic [6:0] OP_JAL    = 7'b1101111;  // jal

  typedef enum logic [3:0] {
    ALU_SLL  = 4'h0,
    ALU_SLT  = 4'h1,
    ALU_AND  = 4'h2,
    ALU_OR   = 4'h3,
    ALU_XOR  = 4'h4,
    ALU_ADD  = 4'h5,
    ALU_SRL  = 4'h6,
    ALU_SRA  = 4'h7,
    ALU_SLTU = 4'h8,
    ALU_SUB  = 4'hA
  } alu_ctrl_e;

  typedef enum logic [1:0] {
    IMM_I = 2'd0,
    IMM_S = 2'd1,
    IMM_B = 2'd2,
    IMM_J = 2'd3
  } imm_src_e;

  typedef enum logic [1:0] {
    RES_ALU = 2'b00,
    RES_MEM = 2'b01,
    RES_PC4 = 2'b10
  } result_src_e;

  typedef enum logic [1:0] {
    ALUOP_ADD    = 2'd0,
    ALUOP_BRANCH = 2'd1,
    ALUOP_FUNCT  = 2'd2
  } alu_op_e;

endpackage
