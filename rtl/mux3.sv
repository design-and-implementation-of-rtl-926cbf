// Three-input multiplexer for the register write-back value.
//
// Input 00 is ALUResult (arithmetic and logic instructions), 01 is ReadData
// from the data memory (lw) and 10 is PCPlus4 (the link address of jal), as
// numbered on the result multiplexer of the block diagram. Select 11 is not
// used by the decoder; it returns d2 here.
// Interface: d0, d1, d2, s[1:0] in; y out. Timing: combinational.
module mux3 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [1:0]       s,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (s)
      2'b00:   y = d0;
      2'b01:   y = d1;
      default: y = d2;
    endcase
  end

endmodule
