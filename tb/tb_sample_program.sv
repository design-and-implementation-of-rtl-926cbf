// Runs the seven-instruction sample program held in the instruction memory's
// default contents, at the core's default sizes, against the data memory's
// default contents (0x30303030, 0x20202020, 0x40404040, 0 at 0, 4, 8, 12).
//
// Pass 1 runs the program word for word. Its third word, 0x00639463,
// encodes bne x7,x6,+8; x7 != x6, so the branch is taken and skips ori:
//   lw t1,0(x0) -> t1 = 0x30303030      lw t2,4(x0) -> t2 = 0x20202020
//   bne taken   -> PC 8 -> 16           and t4,t2,x0 -> t4 = 0
//   sw t3,8(x9) -> M[8] = t3 = 0        jal t1,8 -> t1 = 28, PC 24 -> 32
// Pass 2 replaces the third word with beq x7,x6,+8 (0x00638463), resets and
// runs again: the branch falls through, so ori sets t3 = 4, sw stores 4 at
// byte address 8, jal links t1 = 28 and jumps to 32. Each pass must finish
// in exactly one clock per executed instruction.
module tb_sample_program;
  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] pc, instr, alu_result, write_data, result;
  logic        mem_write;
  int checks = 0, failures = 0;

  rv32i_top dut (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr), .alu_result(alu_result),
    .write_data(write_data), .mem_write(mem_write), .result(result)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs from reset until the PC reaches 32, returning the cycle count and
  // the PC sequence.
  task automatic run(output int cycles, output logic [31:0] trace [8]);
    cycles = 0;
    reset = 1'b1;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    while (pc != 32'd32 && cycles < 50) begin
      if (cycles < 8) trace[cycles] = pc;
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          cycles;
    logic [31:0] trace [8];
    logic [31:0] exp1 [5];
    logic [31:0] exp2 [7];
    exp1 = '{32'd0, 32'd4, 32'd8, 32'd16, 32'd20};
    exp2 = '{32'd0, 32'd4, 32'd8, 32'd12, 32'd16, 32'd20, 32'd24};
    // ---- pass 1: the program as stored (bne)
    run(cycles, trace);
    check(cycles == 6, $sformatf("pass 1 took %0d cycles, expected 6", cycles));
    for (int i = 0; i < 5; i++) check(trace[i] == exp1[i], $sformatf("pass 1 PC[%0d] = %h", i, trace[i]));
    check(dut.u_rf.regs[6]  == 32'd28,        "pass 1 t1 = return address 28");
    check(dut.u_rf.regs[7]  == 32'h20202020,  "pass 1 t2 = M[4]");
    check(dut.u_rf.regs[28] == 32'h0,         "pass 1 t3 untouched (ori skipped)");
    check(dut.u_rf.regs[29] == 32'h0,         "pass 1 t4 = t2 & x0");
    check(dut.u_dmem.ram[2] == 32'h0,         "pass 1 M[8] = t3 = 0");
    check(dut.u_dmem.ram[0] == 32'h30303030,  "pass 1 M[0] unchanged");
    // ---- pass 2: beq in place of bne
    dut.u_imem.rom[2] = 32'h00638463;
    run(cycles, trace);
    check(cycles == 7, $sformatf("pass 2 took %0d cycles, expected 7", cycles));
    for (int i = 0; i < 7; i++) check(trace[i] == exp2[i], $sformatf("pass 2 PC[%0d] = %h", i, trace[i]));
    check(dut.u_rf.regs[6]  == 32'd28,        "pass 2 t1 = return address 28");
    check(dut.u_rf.regs[7]  == 32'h20202020,  "pass 2 t2 = M[4]");
    check(dut.u_rf.regs[28] == 32'h4,         "pass 2 t3 = 4");
    check(dut.u_rf.regs[29] == 32'h0,         "pass 2 t4 = t2 & x0");
    check(dut.u_dmem.ram[2] == 32'h4,         "pass 2 M[8] = t3 = 4");
    check(dut.u_dmem.ram[1] == 32'h20202020,  "pass 2 M[4] unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
