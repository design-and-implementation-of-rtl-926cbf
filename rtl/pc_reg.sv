// Program Counter register.
//
// Holds the byte address of the instruction being executed. On every rising
// clock edge it takes PCNext, which the datapath has chosen between PC+4 and
// the branch/jump target, so one instruction completes per cycle.
// Interface: clk, reset (active high, asynchronous), pc_next in, pc out.
// Timing: pc changes only at the rising edge of clk; reset forces it to 0.
// The register and its role follow the processor's block diagram; the reset
// (asynchronous, to address 0) is this design's own choice.
module pc_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end

endmodule
