// Testbench for main_decoder: the control word of each opcode is compared
// with the decoder table (lw, sw, R-type, I-type, branch, jal), and every
// other opcode must write neither a register nor memory and never branch.
module tb_main_decoder;
  import rv32i_pkg::*;
  logic [6:0]  op;
  logic        reg_write, alu_src, mem_write, branch, jump;
  imm_src_e    imm_src;
  result_src_e result_src;
  alu_op_e     alu_op;
  int checks = 0, failures = 0;

  main_decoder dut (.op(op), .reg_write(reg_write), .imm_src(imm_src), .alu_src(alu_src),
                    .mem_write(mem_write), .result_src(result_src), .branch(branch),
                    .jump(jump), .alu_op(alu_op));

  // Expected {reg_write, imm_src, alu_src, mem_write, result_src, branch, alu_op, jump}
  // with '?' positions masked out.
  task automatic expect_ctl(logic [6:0] opc, logic [10:0] want, logic [10:0] care, string name);
    logic [10:0] got;
    op = opc; #1;
    got = {reg_write, 2'(imm_src), alu_src, mem_write, 2'(result_src), branch, 2'(alu_op), jump};
    checks++;
    if ((got & care) !== (want & care)) begin
      failures++;
      $display("FAIL: %s got %b expected %b (mask %b)", name, got, want, care);
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
    //                        RW IS AS MW RS B  AO J
    expect_ctl(7'h03, 11'b1_00_1_0_01_0_00_0, 11'b1_11_1_1_11_1_11_1, "lw");
    expect_ctl(7'h23, 11'b0_01_1_1_00_0_00_0, 11'b1_11_1_1_00_1_11_1, "sw");
    expect_ctl(7'h33, 11'b1_00_0_0_00_0_10_0, 11'b1_00_1_1_11_1_11_1, "R-type");
    expect_ctl(7'h13, 11'b1_00_1_0_00_0_10_0, 11'b1_11_1_1_11_1_11_1, "I-type");
    expect_ctl(7'h63, 11'b0_10_0_0_00_1_01_0, 11'b1_11_1_1_00_1_11_1, "branch");
    expect_ctl(7'h6f, 11'b1_11_0_0_10_0_00_1, 11'b1_11_0_1_11_1_00_1, "jal");
    for (int o = 0; o < 128; o++) begin
      if (o inside {'h03, 'h23, 'h33, 'h13, 'h63, 'h6f}) continue;
      op = 7'(o); #1;
      checks++;
      if (reg_write || mem_write || branch || jump) begin
        failures++;
        $display("FAIL: unused opcode %h has side effects", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
