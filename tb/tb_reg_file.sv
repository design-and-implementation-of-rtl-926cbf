// Testbench for reg_file: reset clears all registers, random writes and
// dual reads against a reference array, x0 stays 0, a write needs we3 and
// happens only at the clock edge.
module tb_reg_file;
  logic        clk = 1'b0;
  logic        reset, we3;
  logic [4:0]  a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file #(.NREGS(32), .WIDTH(32)) dut (
    .clk(clk), .reset(reset), .we3(we3), .a1(a1), .a2(a2), .a3(a3),
    .wd3(wd3), .rd1(rd1), .rd2(rd2)
  );

  always #5 clk = ~clk;

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
    reset = 1'b1; we3 = 1'b0; a1 = '0; a2 = '0; a3 = '0; wd3 = '0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    @(posedge clk); #1; reset = 1'b0;
    for (int i = 0; i < 32; i++) begin
      a1 = 5'(i); a2 = 5'(31 - i); #1;
      check(rd1 == 0 && rd2 == 0, $sformatf("x%0d cleared by reset", i));
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a3 = (n < 40) ? 5'(n) : 5'($urandom);
      wd3 = $urandom;
      we3 = (n < 40) ? 1'b1 : ($urandom_range(3, 0) != 0);
      a1 = a3; #1;
      check(rd1 == model[a3], "no write before the edge");
      @(posedge clk); #1;
      if (we3 && a3 != 0) model[a3] = wd3;
      we3 = 1'b0;
      a1 = 5'($urandom); a2 = 5'($urandom); #1;
      check(rd1 == model[a1], $sformatf("rd1 x%0d", a1));
      check(rd2 == model[a2], $sformatf("rd2 x%0d", a2));
      a1 = 5'd0; #1;
      check(rd1 == 0, "x0 reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
