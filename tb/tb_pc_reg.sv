// Testbench for pc_reg: checks the asynchronous reset to 0 and that the
// register takes pc_next at each rising edge and holds it between edges.
module tb_pc_reg;
  logic        clk = 1'b0;
  logic        reset;
  logic [31:0] pc_next, pc;
  int checks = 0, failures = 0;

  pc_reg #(.WIDTH(32)) dut (.clk(clk), .reset(reset), .pc_next(pc_next), .pc(pc));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    reset = 1'b1; pc_next = 32'h1234_5678;
    #1; check(pc == 32'h0, "reset clears pc");
    @(posedge clk); #1; check(pc == 32'h0, "reset holds pc at 0 across an edge");
    reset = 1'b0;
    for (int i = 0; i < 100; i++) begin
      v = $urandom;
      pc_next = v;
      @(posedge clk); #1;
      check(pc == v, $sformatf("pc loads %h", v));
      pc_next = ~v;
      #3; check(pc == v, "pc holds between edges");
    end
    // asynchronous reset in the middle of a cycle
    pc_next = 32'hdead_beec;
    @(negedge clk); reset = 1'b1; #1;
    check(pc == 32'h0, "asynchronous reset");
    reset = 1'b0;
    @(posedge clk); #1; check(pc == 32'hdead_beec, "runs after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
