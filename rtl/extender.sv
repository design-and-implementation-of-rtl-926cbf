// Immediate extender (ImmExt).
//
// Gathers the immediate bits that each instruction format scatters over
// Instr[31:7] and sign-extends them to 32 bits:
//   I (ImmSrc 0): Instr[31:20]
//   S (ImmSrc 1): Instr[31:25], Instr[11:7]
//   B (ImmSrc 2): Instr[31], Instr[7], Instr[30:25], Instr[11:8], then 0
//   J (ImmSrc 3): Instr[31], Instr[19:12], Instr[20], Instr[30:21], then 0
// The bit positions follow the RV32I formats. Every immediate is sign-extended,
// as RV32I defines (sltiu too compares against the sign-extended value);
// there is no zero-extending mode.
// Interface: instr = Instr[31:7], imm_src in; imm_ext out. Combinational.
module extender
  import rv32i_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_src_e    imm_src,
  output logic [31:0] imm_ext
);

  always_comb begin
    unique case (imm_src)
      IMM_I: imm_ext = {{20{instr[31]}}, instr[31:20]};
      IMM_S: imm_ext = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B: imm_ext = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_J: imm_ext = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm_ext = '0;
    endcase
  end

endmodule
