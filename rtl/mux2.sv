// Two-input multiplexer.
//
// Selects PCNext (PCPlus4 on input 0, PCTarget on input 1, select PCSrc) and
// SrcB (register RD2 on input 0, ImmExt on input 1, select ALUSrc) in the
// core's datapath. Interface: d0, d1, s in; y out. Timing: combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  assign y = s ? d1 : d0;

endmodule
