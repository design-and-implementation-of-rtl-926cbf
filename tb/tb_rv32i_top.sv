// End-to-end testbench for rv32i_top at its default sizes.
//
// A test program is assembled in the testbench and placed in the
// instruction memory before reset is released: a counted loop (backward
// branch), then 220 pseudo-random instructions covering all 28 supported
// instructions, with forward branches and jumps, loads and stores around a
// base register, writes to x0 and store-then-load pairs, and finally a
// jump-to-self. An instruction-set model in the testbench executes the same
// program; every cycle the core's PC and, after the edge, all 32 registers
// are compared with the model, every store is compared as it happens, and
// at the end the data memory words the program can reach are compared.
// One instruction must retire per clock: the model advances one instruction
// per cycle, so the PC comparison also checks the one-cycle latency.
// Each mechanism is counted (every instruction, taken and not-taken
// branches, a backward branch, a write to x0, a load of a stored word); one
// that never happens counts as a failure.
module tb_rv32i_top;
  import rv32i_asm_pkg::*;

  localparam int NPROG = 256;
  localparam int BODY  = 220;

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

  // ---------------------------------------------------------------- model
  logic [31:0] prog [NPROG];
  logic [31:0] x [32];
  logic [31:0] mem [2048];
  bit          stored [2048];
  logic [31:0] mpc;

  // mechanism counters
  typedef enum int {
    M_ADD, M_SUB, M_SLL, M_SLT, M_SLTU, M_XOR, M_SRL, M_SRA, M_OR, M_AND,
    M_ADDI, M_SLTI, M_SLTIU, M_XORI, M_ORI, M_ANDI, M_SLLI, M_SRLI, M_SRAI,
    M_LW, M_SW, M_BEQ, M_BNE, M_BLT, M_BGE, M_BLTU, M_BGEU, M_JAL,
    M_TAKEN, M_NOT_TAKEN, M_BACKWARD, M_X0_WRITE, M_LOAD_STORED, M_COUNT
  } mech_e;
  int count [M_COUNT];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @pc=%h: %s", mpc, what);
    end
  endtask

  function automatic logic [31:0] sext(logic [31:0] v, int bits);
    return (v[bits-1]) ? (v | (32'hffff_ffff << bits)) : (v & ~(32'hffff_ffff << bits));
  endfunction

  // Executes one instruction on the model. Returns 1 and the store address
  // and data when the instruction is a store.
  task automatic step(output bit is_store, output logic [31:0] st_addr, output logic [31:0] st_data);
    logic [31:0] w, a, b, imm, res, npc;
    logic [4:0]  rd;
    logic [2:0]  f3;
    bit          wr, take;
    int          m;
    w = prog[mpc[9:2]];
    rd = w[11:7]; f3 = w[14:12];
    a = (w[19:15] == 0) ? 32'd0 : x[w[19:15]];
    b = (w[24:20] == 0) ? 32'd0 : x[w[24:20]];
    npc = mpc + 4; wr = 0; res = '0; is_store = 0; st_addr = '0; st_data = '0; m = -1;
    case (w[6:0])
      7'h33: begin
        wr = 1;
        case (f3)
          3'd0: begin res = w[30] ? a - b : a + b; m = w[30] ? M_SUB : M_ADD; end
          3'd1: begin res = a << b[4:0]; m = M_SLL; end
          3'd2: begin res = ($signed(a) < $signed(b)) ? 1 : 0; m = M_SLT; end
          3'd3: begin res = (a < b) ? 1 : 0; m = M_SLTU; end
          3'd4: begin res = a ^ b; m = M_XOR; end
          3'd5: begin res = w[30] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0]; m = w[30] ? M_SRA : M_SRL; end
          3'd6: begin res = a | b; m = M_OR; end
          default: begin res = a & b; m = M_AND; end
        endcase
      end
      7'h13: begin
        wr = 1; imm = sext({20'd0, w[31:20]}, 12);
        case (f3)
          3'd0: begin res = a + imm; m = M_ADDI; end
          3'd1: begin res = a << w[24:20]; m = M_SLLI; end
          3'd2: begin res = ($signed(a) < $signed(imm)) ? 1 : 0; m = M_SLTI; end
          3'd3: begin res = (a < imm) ? 1 : 0; m = M_SLTIU; end
          3'd4: begin res = a ^ imm; m = M_XORI; end
          3'd5: begin res = w[30] ? 32'($signed(a) >>> w[24:20]) : a >> w[24:20]; m = w[30] ? M_SRAI : M_SRLI; end
          3'd6: begin res = a | imm; m = M_ORI; end
          default: begin res = a & imm; m = M_ANDI; end
        endcase
      end
      7'h03: begin
        wr = 1; imm = sext({20'd0, w[31:20]}, 12);
        res = mem[11'((a + imm) >> 2)];
        if (stored[11'((a + imm) >> 2)]) count[M_LOAD_STORED]++;
        m = M_LW;
      end
      7'h23: begin
        imm = sext({20'd0, w[31:25], w[11:7]}, 12);
        is_store = 1; st_addr = a + imm; st_data = b;
        mem[11'(st_addr >> 2)] = b; stored[11'(st_addr >> 2)] = 1;
        m = M_SW;
      end
      7'h63: begin
        imm = sext({19'd0, w[31], w[7], w[30:25], w[11:8], 1'b0}, 13);
        case (f3)
          3'd0: begin take = (a == b); m = M_BEQ; end
          3'd1: begin take = (a != b); m = M_BNE; end
          3'd4: begin take = ($signed(a) < $signed(b)); m = M_BLT; end
          3'd5: begin take = ($signed(a) >= $signed(b)); m = M_BGE; end
          3'd6: begin take = (a < b); m = M_BLTU; end
          default: begin take = (a >= b); m = M_BGEU; end
        endcase
        if (take) begin
          npc = mpc + imm; count[M_TAKEN]++;
          if (imm[31]) count[M_BACKWARD]++;
        end else count[M_NOT_TAKEN]++;
      end
      7'h6f: begin
        imm = sext({11'd0, w[31], w[19:12], w[20], w[30:21], 1'b0}, 21);
        wr = 1; res = mpc + 4; npc = mpc + imm; m = M_JAL;
      end
      default: ;
    endcase
    if (m >= 0) count[m]++;
    if (wr && rd == 0) count[M_X0_WRITE]++;
    if (wr && rd != 0) x[rd] = res;
    mpc = npc;
  endtask

  // -------------------------------------------------------------- program
  function automatic logic [4:0] rreg();
    return 5'($urandom_range(30, 0));  // x31 is the memory base register
  endfunction

  function automatic logic [11:0] mem_off();
    return 12'(int'($urandom_range(70, 0)) * 4 - 64);  // base 64 -> bytes 0..280
  endfunction

  task automatic build_program();
    int n = 0;
    logic [2:0] bf3 [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
    for (int i = 0; i < NPROG; i++) prog[i] = 32'h0;
    prog[n++] = addi(5'd31, 5'd0, 12'd64);                 // memory base
    prog[n++] = lw(5'd2, 12'd0, 5'd0);                     // 0x30303030
    prog[n++] = lw(5'd3, 12'd4, 5'd0);                     // 0x20202020
    prog[n++] = addi(5'd4, 5'd0, 12'hfff);                 // -1
    prog[n++] = addi(5'd1, 5'd0, 12'd3);                   // loop counter
    prog[n++] = addi(5'd1, 5'd1, 12'hfff);                 // loop: x1 -= 1
    prog[n++] = branch(3'd1, 5'd1, 5'd0, 13'h1ffc);         // bne x1,x0,loop
    for (int k = 0; k < BODY && n < NPROG - 6; k++) begin
      int kind = (k < 28) ? k : int'($urandom_range(27, 0));
      logic [4:0] rd = rreg(), rs1 = rreg(), rs2 = rreg();
      if (k % 23 == 5) rd = 5'd0;
      case (kind)
        0:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd0, rd);   // add
        1:  prog[n++] = r_type(7'h20, rs2, rs1, 3'd0, rd);   // sub
        2:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd1, rd);   // sll
        3:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd2, rd);   // slt
        4:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd3, rd);   // sltu
        5:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd4, rd);   // xor
        6:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd5, rd);   // srl
        7:  prog[n++] = r_type(7'h20, rs2, rs1, 3'd5, rd);   // sra
        8:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd6, rd);   // or
        9:  prog[n++] = r_type(7'h00, rs2, rs1, 3'd7, rd);   // and
        10: prog[n++] = i_type(12'($urandom), rs1, 3'd0, rd);   // addi
        11: prog[n++] = i_type(12'($urandom), rs1, 3'd2, rd);   // slti
        12: prog[n++] = i_type(12'($urandom), rs1, 3'd3, rd);   // sltiu
        13: prog[n++] = i_type(12'($urandom), rs1, 3'd4, rd);   // xori
        14: prog[n++] = i_type(12'($urandom), rs1, 3'd6, rd);   // ori
        15: prog[n++] = i_type(12'($urandom), rs1, 3'd7, rd);   // andi
        16: prog[n++] = i_type({7'h00, 5'($urandom)}, rs1, 3'd1, rd);  // slli
        17: prog[n++] = i_type({7'h00, 5'($urandom)}, rs1, 3'd5, rd);  // srli
        18: prog[n++] = i_type({7'h20, 5'($urandom)}, rs1, 3'd5, rd);  // srai
        19: prog[n++] = lw(rd, mem_off(), 5'd31);
        20: begin                                           // sw, often read back
          logic [11:0] off = mem_off();
          prog[n++] = sw(rs2, off, 5'd31);
          if ($urandom_range(1, 0) == 1) prog[n++] = lw(rd, off, 5'd31);
        end
        27: prog[n++] = jal(rd, 21'd8);
        default: begin                                      // one of six branches
          logic [2:0] f3 = bf3[kind - 21];
          if ($urandom_range(3, 0) == 0) rs2 = rs1;          // equal operands
          prog[n++] = branch(f3, rs1, rs2, ($urandom_range(1, 0) == 1) ? 13'd8 : 13'd12);
        end
      endcase
    end
    prog[n++] = 32'h0000_0013;                            // nop (addi x0,x0,0)
    prog[n++] = 32'h0000_0013;
    prog[n]   = jal(5'd0, 21'd0);                         // stop: jump to self
  endtask

  // ----------------------------------------------------------------- run
  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          st;
    logic [31:0] sa, sd, stop_pc;
    int          cycles;
    cycles = 0;
    reset = 1'b1;
    for (int i = 0; i < M_COUNT; i++) count[i] = 0;
    for (int i = 0; i < 32; i++) x[i] = '0;
    for (int i = 0; i < 2048; i++) begin mem[i] = '0; stored[i] = 0; end
    mem[0] = 32'h30303030; mem[1] = 32'h20202020; mem[2] = 32'h40404040;
    build_program();
    #1;
    for (int i = 0; i < NPROG; i++) dut.u_imem.rom[i] = prog[i];
    for (int i = 0; i < NPROG; i++) if (prog[i] == jal(5'd0, 21'd0)) stop_pc = 32'(i * 4);
    mpc = 32'h0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    while (cycles < 2000) begin
      check(pc == mpc, $sformatf("pc %h, model %h", pc, mpc));
      check(instr == prog[mpc[9:2]], "fetched word");
      step(st, sa, sd);
      check(mem_write == st, "MemWrite");
      if (st) check(alu_result == sa && write_data == sd,
                    $sformatf("store %h to %h, model %h to %h", write_data, alu_result, sd, sa));
      @(posedge clk); #1;
      cycles++;
      for (int r = 0; r < 32; r++)
        check(dut.u_rf.regs[r] == x[r] || r == 0, $sformatf("x%0d = %h, model %h", r, dut.u_rf.regs[r], x[r]));
      if (mpc == stop_pc) break;
      @(negedge clk);
    end
    check(mpc == stop_pc, "program reached its end");
    @(negedge clk);
    check(pc == stop_pc, "jump to self holds");
    for (int i = 0; i < 96; i++)
      check(dut.u_dmem.ram[i] == mem[i], $sformatf("data word %0d = %h, model %h", i, dut.u_dmem.ram[i], mem[i]));
    for (int i = 0; i < M_COUNT; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("  %-14s %0d", e.name(), count[i]);
      check(count[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("instructions retired: %0d in %0d cycles", cycles, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
