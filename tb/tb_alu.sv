// Testbench for alu: every operation on random and corner operands,
// compared with a reference written with 64-bit integer arithmetic, plus
// the Zero flag.
module tb_alu;
  import rv32i_pkg::*;
  logic [31:0] a, b, result;
  alu_ctrl_e   ctl;
  logic        zero;
  int checks = 0, failures = 0;

  localparam alu_ctrl_e OPS [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                                     ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA};

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .alu_control(ctl), .result(result), .zero(zero));

  function automatic logic [31:0] model(alu_ctrl_e op, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x));
    longint sy = longint'($signed(y));
    longint ux = longint'({32'd0, x});
    longint uy = longint'({32'd0, y});
    int sh = int'(y[4:0]);
    longint r;
    case (op)
      ALU_ADD:  r = ux + uy;
      ALU_SUB:  r = ux - uy;
      ALU_AND:  r = ux & uy;
      ALU_OR:   r = ux | uy;
      ALU_XOR:  r = ux ^ uy;
      ALU_SLT:  r = (sx < sy) ? 1 : 0;
      ALU_SLTU: r = (ux < uy) ? 1 : 0;
      ALU_SLL:  r = ux * (longint'(1) << sh);
      ALU_SRL:  r = ux / (longint'(1) << sh);
      ALU_SRA:  r = (sx >= 0) ? sx / (longint'(1) << sh)
                              : -((-sx + (longint'(1) << sh) - 1) / (longint'(1) << sh));
      default:  r = 0;
    endcase
    return r[31:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int n = 0; n < 5000; n++) begin
      ctl = OPS[n % 10];
      a = $urandom; b = $urandom;
      case ((n / 10) % 8)
        0: b = a;                       // equal operands: Zero after SUB
        1: begin a = 32'h8000_0000; b = 32'h7fff_ffff; end
        2: b = {27'd0, 5'($urandom)};
        3: a = 32'hffff_ffff;
        default: ;
      endcase
      #1;
      e = model(ctl, a, b);
      checks++;
      if (result !== e || zero !== (e == 0)) begin
        failures++;
        $display("FAIL: op=%s a=%h b=%h got %h z=%0d expected %h", ctl.name(), a, b, result, zero, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
