// Testbench for extender: random instruction words in each format. The
// expected immediate is found by decoding the fields into a signed integer
// (sign bit weighted -2^k, other bits summed) rather than by concatenation.
module tb_extender;
  import rv32i_pkg::*;
  logic [31:0] ins;
  imm_src_e    imm_src;
  logic [31:0] imm_ext;
  int checks = 0, failures = 0;

  extender dut (.instr(ins[31:7]), .imm_src(imm_src), .imm_ext(imm_ext));

  // Value of the immediate whose bit k sits at instruction bit pos[k];
  // pos[k] < 0 means the bit is always 0. The top bit carries weight -2^top.
  function automatic int value(logic [31:0] w, int pos[21], int top);
    int v = 0;
    for (int k = 0; k <= top; k++) begin
      if (pos[k] >= 0 && w[pos[k]]) v += (k == top) ? -(1 << k) : (1 << k);
    end
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos_i[21], pos_s[21], pos_b[21], pos_j[21];
    int expv, top;
    for (int k = 0; k < 21; k++) begin
      pos_i[k] = -1; pos_s[k] = -1; pos_b[k] = -1; pos_j[k] = -1;
    end
    for (int k = 0; k < 12; k++) pos_i[k] = 20 + k;
    for (int k = 0; k < 5; k++)  pos_s[k] = 7 + k;
    for (int k = 5; k < 12; k++) pos_s[k] = 20 + k;
    for (int k = 1; k < 5; k++)  pos_b[k] = 7 + k;
    for (int k = 5; k < 11; k++) pos_b[k] = 20 + k;
    pos_b[11] = 7; pos_b[12] = 31;
    for (int k = 1; k < 11; k++) pos_j[k] = 20 + k;
    pos_j[11] = 20;
    for (int k = 12; k < 20; k++) pos_j[k] = k;
    pos_j[20] = 31;
    for (int n = 0; n < 2000; n++) begin
      ins = $urandom;
      if (n < 8) ins = (n[0]) ? 32'hffff_ffff : 32'h0000_0000;
      imm_src = imm_src_e'(n % 4);
      #1;
      unique case (n % 4)
        0: begin expv = value(ins, pos_i, 11); top = 11; end
        1: begin expv = value(ins, pos_s, 11); top = 11; end
        2: begin expv = value(ins, pos_b, 12); top = 12; end
        default: begin expv = value(ins, pos_j, 20); top = 20; end
      endcase
      checks++;
      if ($signed(imm_ext) != expv) begin
        failures++;
        $display("FAIL: src=%0d instr=%h imm=%h expected %0d", n % 4, ins, imm_ext, expv);
      end
    end
    // Immediates of the seven-instruction program
    ins = 32'h00639463; imm_src = IMM_B; #1; checks++;
    if (imm_ext != 32'd8) begin failures++; $display("FAIL: branch offset %h", imm_ext); end
    ins = 32'h0080036f; imm_src = IMM_J; #1; checks++;
    if (imm_ext != 32'd8) begin failures++; $display("FAIL: jal offset %h", imm_ext); end
    ins = 32'h01c4a423; imm_src = IMM_S; #1; checks++;
    if (imm_ext != 32'd8) begin failures++; $display("FAIL: sw offset %h", imm_ext); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
