// Instruction encoders for the processor testbenches.
//
// Each function returns the 32-bit RV32I machine word of one instruction,
// built field by field from the base-ISA formats, so that test programs can
// be written as readable assembly inside a testbench.
package rv32i_asm_pkg;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction

  function automatic logic [31:0] i_type(logic [11:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd);
    return {imm, rs1, f3, rd, 7'b0010011};
  endfunction

  function automatic logic [31:0] lw(logic [4:0] rd, logic [11:0] imm, logic [4:0] rs1);
    return {imm, rs1, 3'b010, rd, 7'b0000011};
  endfunction

  function automatic logic [31:0] sw(logic [4:0] rs2, logic [11:0] imm, logic [4:0] rs1);
    return {imm[11:5], rs2, rs1, 3'b010, imm[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] branch(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2,
                                         logic [12:0] off);
    return {off[12], off[10:5], rs2, rs1, f3, off[4:1], off[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] jal(logic [4:0] rd, logic [20:0] off);
    return {off[20], off[10:1], off[11], off[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, logic [11:0] imm);
    return i_type(imm, rs1, 3'b000, rd);
  endfunction

endpackage
