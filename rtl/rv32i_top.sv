// Single-cycle RV32I processor.
//
// Every instruction is fetched, decoded, executed and written back in one
// clock cycle. The PC addresses the instruction memory; the Control Unit
// decodes the instruction; the register file supplies RD1/RD2; the
// extender builds ImmExt; the ALU works on SrcA = RD1 and SrcB = RD2 or
// ImmExt; the data memory is read or written at ALUResult; the result
// multiplexer writes ALUResult, ReadData or PC+4 back; and at the clock
// edge the PC takes PC+4 or PCTarget = PC + ImmExt. The wiring follows the
// processor's block diagram. It runs 28 RV32I instructions: the ten
// register-register ones, the nine immediate ALU ones, lw, sw, the six
// branches and jal (jalr, lui, auipc and sub-word loads/stores would need
// paths this datapath does not have).
// Interface: clk, reset (active high, asynchronous, PC and registers to 0);
// the PC, instruction, ALU result, store data, MemWrite and write-back value
// are brought out for observation. Timing: one instruction per clock; the
// register file, data memory and PC update at the rising edge. An assertion
// flags a PC that is not word aligned, since there is no misaligned-fetch
// exception.
module rv32i_top
  import rv32i_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 2048,
  parameter string       IMEM_FILE  = "rtl/sample_program.hex",
  parameter string       DMEM_FILE  = "rtl/sample_data.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic [31:0] alu_result,
  output logic [31:0] write_data,
  output logic        mem_write,
  output logic [31:0] result
);

  // Control
  logic        pc_src, alu_src, reg_write, zero;
  result_src_e result_src;
  alu_ctrl_e   alu_control;
  imm_src_e    imm_src;

  // Datapath
  logic [31:0] pc_next, pc_plus4, pc_target;
  logic [31:0] imm_ext, src_a, src_b, read_data;

  // Fetch
  pc_reg #(.WIDTH(32)) u_pc (
    .clk(clk), .reset(reset), .pc_next(pc_next), .pc(pc)
  );

  adder #(.WIDTH(32)) u_pc_plus4 (.a(pc), .b(32'd4), .y(pc_plus4));
  adder #(.WIDTH(32)) u_pc_target (.a(pc), .b(imm_ext), .y(pc_target));

  mux2 #(.WIDTH(32)) u_pc_mux (
    .d0(pc_plus4), .d1(pc_target), .s(pc_src), .y(pc_next)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_FILE)) u_imem (
    .addr(pc), .rd(instr)
  );

  // Decode
  control_unit u_ctrl (
    .op          (instr[6:0]),
    .funct3      (instr[14:12]),
    .funct7b5    (instr[30]),
    .zero        (zero),
    .pc_src      (pc_src),
    .result_src  (result_src),
    .mem_write   (mem_write),
    .alu_control (alu_control),
    .alu_src     (alu_src),
    .imm_src     (imm_src),
    .reg_write   (reg_write)
  );

  reg_file #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk(clk), .reset(reset), .we3(reg_write),
    .a1(instr[19:15]), .a2(instr[24:20]), .a3(instr[11:7]),
    .wd3(result), .rd1(src_a), .rd2(write_data)
  );

  extender u_ext (.instr(instr[31:7]), .imm_src(imm_src), .imm_ext(imm_ext));

  // Execute
  mux2 #(.WIDTH(32)) u_srcb_mux (
    .d0(write_data), .d1(imm_ext), .s(alu_src), .y(src_b)
  );

  alu #(.WIDTH(32)) u_alu (
    .a(src_a), .b(src_b), .alu_control(alu_control),
    .result(alu_result), .zero(zero)
  );

  // Memory
  data_mem #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DMEM_FILE)) u_dmem (
    .clk(clk), .we(mem_write), .a(alu_result), .wd(write_data), .rd(read_data)
  );

  // Write-back
  mux3 #(.WIDTH(32)) u_result_mux (
    .d0(alu_result), .d1(read_data), .d2(pc_plus4), .s(result_src), .y(result)
  );

  // The core has no instruction-address-misaligned exception: a program must
  // only branch or jump to word-aligned addresses.
  pc_word_aligned: assert property (@(posedge clk) disable iff (reset) pc[1:0] == 2'b00)
    else $error("PC %h is not word aligned", pc);

endmodule
