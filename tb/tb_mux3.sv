// Testbench for mux3: random data, each of the select codes 00, 01, 10.
module tb_mux3;
  logic [31:0] d0, d1, d2, y, expected;
  logic [1:0]  s;
  int checks = 0, failures = 0;

  mux3 #(.WIDTH(32)) dut (.d0(d0), .d1(d1), .d2(d2), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d0 = $urandom; d1 = $urandom; d2 = $urandom; s = 2'(i % 3);
      expected = (i % 3 == 0) ? d0 : (i % 3 == 1) ? d1 : d2;
      #1;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL: s=%0d y=%h", s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
