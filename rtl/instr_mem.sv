// Instruction memory: a read-only array of 32-bit instruction words.
//
// The word at byte address addr is read combinationally (addr[1:0] are
// ignored, as instructions are word aligned), so an instruction is fetched
// in the same cycle in which it executes. The depth is a parameter; 256
// words is this design's own default. The contents are loaded at start-up
// from the hex file INIT_FILE; words the file does not cover read as 0.
// The default file holds a seven-instruction program that exercises lw,
// bne, ori, and, sw and jal against the data memory's default contents.
// Interface: addr (byte address, normally the PC) in, rd (instruction) out.
// Timing: combinational read, no write port.
module instr_mem #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/sample_program.hex"
) (
  input  logic [31:0] addr,
  output logic [31:0] rd
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign rd = rom[addr[AW+1:2]];

endmodule
