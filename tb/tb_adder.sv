// Testbench for adder: random and corner operands, sum compared with a
// 33-bit reference addition truncated to 32 bits.
module tb_adder;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] ref_sum;
    for (int i = 0; i < 500; i++) begin
      case (i)
        0: begin a = 32'hffff_ffff; b = 32'h1; end
        1: begin a = 32'h0; b = 32'h4; end
        2: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        3: begin a = 32'h18; b = 32'hffff_fff0; end  // PC + negative offset
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      ref_sum = {1'b0, a} + {1'b0, b};
      checks++;
      if (y !== ref_sum[31:0]) begin
        failures++;
        $display("FAIL: %h + %h gave %h", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
