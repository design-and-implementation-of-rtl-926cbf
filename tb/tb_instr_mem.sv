// Testbench for instr_mem with its default contents: the seven program words
// must read back at byte addresses 0..24, the low two address bits must not
// matter, and every word past the program must read 0.
module tb_instr_mem;
  logic [31:0] addr, rd;
  int checks = 0, failures = 0;

  localparam logic [31:0] PROG [7] = '{32'h00002303, 32'h00402383, 32'h00639463,
                                       32'h00406e13, 32'h0003feb3, 32'h01c4a423,
                                       32'h0080036f};

  instr_mem dut (.addr(addr), .rd(rd));

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
    #1;
    for (int i = 0; i < 7; i++) begin
      for (int lo = 0; lo < 4; lo++) begin
        addr = 32'(i * 4 + lo); #1;
        check(rd == PROG[i], $sformatf("word %0d (+%0d) = %h", i, lo, rd));
      end
    end
    for (int i = 7; i < 256; i++) begin
      addr = 32'(i * 4); #1;
      check(rd == 32'h0, $sformatf("word %0d empty, got %h", i, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
