// Testbench for alu_decoder: every combination of ALUOp, funct3, Instr[30]
// and opcode bit 5 is compared with the instruction each combination means.
module tb_alu_decoder;
  import rv32i_pkg::*;
  alu_op_e     alu_op;
  logic [2:0]  funct3;
  logic        funct7b5, op_b5;
  alu_ctrl_e   alu_control;
  int checks = 0, failures = 0;

  alu_decoder dut (.alu_op(alu_op), .funct3(funct3), .funct7b5(funct7b5), .op_b5(op_b5),
                   .alu_control(alu_control));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ctrl_e e;
    string mn;
    for (int ao = 0; ao < 3; ao++)
      for (int f3 = 0; f3 < 8; f3++)
        for (int f7 = 0; f7 < 2; f7++)
          for (int ob = 0; ob < 2; ob++) begin
            alu_op = alu_op_e'(ao); funct3 = 3'(f3); funct7b5 = 1'(f7); op_b5 = 1'(ob);
            #1;
            if (ao == 0) e = ALU_ADD;                 // lw / sw address
            else if (ao == 1) begin                   // branches
              if (f3 == 0 || f3 == 1)      e = ALU_SUB;  // beq bne
              else if (f3 == 4 || f3 == 5) e = ALU_SLT;  // blt bge
              else if (f3 == 6 || f3 == 7) e = ALU_SLTU; // bltu bgeu
              else e = alu_control;                      // no such branch
            end else begin
              // ob=1: R-type (add/sub...), ob=0: I-type (addi...)
              if (f3 == 0)      e = (ob == 1 && f7 == 1) ? ALU_SUB : ALU_ADD;
              else if (f3 == 1) e = ALU_SLL;
              else if (f3 == 2) e = ALU_SLT;
              else if (f3 == 3) e = ALU_SLTU;
              else if (f3 == 4) e = ALU_XOR;
              else if (f3 == 5) e = (f7 == 1) ? ALU_SRA : ALU_SRL;
              else if (f3 == 6) e = ALU_OR;
              else              e = ALU_AND;
            end
            checks++;
            if (alu_control !== e) begin
              failures++;
              $display("FAIL: aluop=%0d f3=%0d f7b5=%0d opb5=%0d got %h expected %h",
                       ao, f3, f7, ob, alu_control, e);
            end
          end
    // codes printed for the seven-instruction program: lw/sw 5, branch A, ori 3, and 2
    alu_op = ALUOP_ADD; #1; checks++; if (alu_control != 4'h5) failures++;
    alu_op = ALUOP_BRANCH; funct3 = 3'd1; #1; checks++; if (alu_control != 4'hA) failures++;
    alu_op = ALUOP_FUNCT; funct3 = 3'd6; op_b5 = 0; #1; checks++; if (alu_control != 4'h3) failures++;
    alu_op = ALUOP_FUNCT; funct3 = 3'd7; op_b5 = 1; #1; checks++; if (alu_control != 4'h2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
