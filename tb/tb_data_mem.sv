// Testbench for data_mem at its full 2048-word size: checks the start-up
// words at byte addresses 0, 4, 8, 12, then random word writes and reads
// against a reference array, that a write needs we, that the write lands at
// the clock edge, and that the low two address bits are ignored.
module tb_data_mem;
  logic        clk = 1'b0;
  logic        we;
  logic [31:0] a, wd, rd;
  logic [31:0] model [2048];
  int checks = 0, failures = 0;

  data_mem dut (.clk(clk), .we(we), .a(a), .wd(wd), .rd(rd));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    we = 1'b0; a = '0; wd = '0;
    for (int i = 0; i < 2048; i++) model[i] = '0;
    model[0] = 32'h30303030; model[1] = 32'h20202020; model[2] = 32'h40404040;
    #1;
    for (int i = 0; i < 2048; i += 97) begin
      a = 32'(i * 4); #1;
      check(rd == model[i], $sformatf("initial word %0d = %h", i, rd));
    end
    for (int i = 0; i < 4; i++) begin
      a = 32'(i * 4); #1;
      check(rd == model[i], $sformatf("initial word %0d = %h", i, rd));
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      idx = (n < 8) ? n : int'($urandom_range(2047, 0));
      a  = {19'd0, 11'(idx), 2'(n)};  // low bits vary, must be ignored
      wd = $urandom;
      we = (n % 3 != 2);
      #1;
      check(rd == model[idx], "read before write");
      @(posedge clk); #1;
      if (we) model[idx] = wd;
      check(rd == model[idx], $sformatf("word %0d after edge we=%0d", idx, we));
      we = 1'b0;
      // read some other word
      idx = int'($urandom_range(2047, 0));
      a = 32'(idx * 4); #1;
      check(rd == model[idx], $sformatf("random read %0d", idx));
    end
    // addresses above the array wrap onto it
    a = 32'h0000_2000 + 32'd4; #1;
    check(rd == model[1], "address wraps above 8 KiB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
