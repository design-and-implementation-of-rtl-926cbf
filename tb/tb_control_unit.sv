// Testbench for control_unit: the next-PC decision for all six branches with
// Zero high and low and for jal, plus the full control word of each of the
// seven instructions of the sample program.
module tb_control_unit;
  import rv32i_pkg::*;
  logic [6:0]  op;
  logic [2:0]  funct3;
  logic        funct7b5, zero;
  logic        pc_src, mem_write, alu_src, reg_write;
  result_src_e result_src;
  alu_ctrl_e   alu_control;
  imm_src_e    imm_src;
  int checks = 0, failures = 0;

  control_unit dut (.op(op), .funct3(funct3), .funct7b5(funct7b5), .zero(zero),
                    .pc_src(pc_src), .result_src(result_src), .mem_write(mem_write),
                    .alu_control(alu_control), .alu_src(alu_src), .imm_src(imm_src),
                    .reg_write(reg_write));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit take;
    funct7b5 = 1'b0;
    // branches: Zero is the result of SUB (beq/bne) or SLT/SLTU (the others)
    for (int f3 = 0; f3 < 8; f3++) begin
      if (f3 == 2 || f3 == 3) continue;
      for (int z = 0; z < 2; z++) begin
        op = 7'h63; funct3 = 3'(f3); zero = 1'(z); #1;
        case (f3)
          0: take = (z == 1);  // beq: equal
          1: take = (z == 0);  // bne
          4: take = (z == 0);  // blt: slt gave 1
          5: take = (z == 1);  // bge: slt gave 0
          6: take = (z == 0);  // bltu
          default: take = (z == 1);  // bgeu
        endcase
        check(pc_src == take, $sformatf("branch f3=%0d zero=%0d pc_src=%0d", f3, z, pc_src));
        check(!reg_write && !mem_write && imm_src == IMM_B && !alu_src, "branch controls");
      end
    end
    for (int z = 0; z < 2; z++) begin
      op = 7'h6f; funct3 = 3'($urandom); zero = 1'(z); #1;
      check(pc_src && reg_write && result_src == RES_PC4 && imm_src == IMM_J, "jal");
    end
    // lw t1,0(x0)
    op = 7'h03; funct3 = 3'd2; zero = 1'b0; #1;
    check(!pc_src && reg_write && alu_src && !mem_write && result_src == RES_MEM &&
          imm_src == IMM_I && alu_control == ALU_ADD, "lw");
    // ori t3,x0,4
    op = 7'h13; funct3 = 3'd6; #1;
    check(!pc_src && reg_write && alu_src && result_src == RES_ALU && alu_control == ALU_OR, "ori");
    // and t4,t2,x0 with a zero result
    op = 7'h33; funct3 = 3'd7; zero = 1'b1; #1;
    check(!pc_src && reg_write && !alu_src && alu_control == ALU_AND, "and");
    // sub
    op = 7'h33; funct3 = 3'd0; funct7b5 = 1'b1; #1;
    check(alu_control == ALU_SUB, "sub");
    // addi with Instr[30] set by a negative immediate stays an add
    op = 7'h13; #1;
    check(alu_control == ALU_ADD, "addi negative");
    // sw t3,8(x9)
    op = 7'h23; funct3 = 3'd2; funct7b5 = 1'b0; zero = 1'b1; #1;
    check(!pc_src && !reg_write && mem_write && alu_src && imm_src == IMM_S, "sw");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
