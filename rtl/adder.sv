// Combinational adder.
//
// Used twice in the core: PCPlus4 = PC + 4 (the sequential next address) and
// PCTarget = PC + ImmExt (the branch and jal destination). The sum wraps
// modulo 2^WIDTH and no carry is produced, as in the block diagram.
// Interface: a, b in; y = a + b out. Timing: purely combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = a + b;

endmodule
