// Data memory: 2048 words of 32 bits, read and written a whole word at a time.
//
// The byte address comes from the ALU (base register plus offset). Address
// bits [1:0] are ignored and bits above the array's range wrap, so lw and sw
// always access the aligned word. Reads are combinational so that a load
// finishes in its own cycle; a write takes place at the rising clock edge
// when we (MemWrite) is high. The 2048 x 32 size follows the processor's
// description; word-only access and the start-up contents (the hex file
// INIT_FILE, by default 0x30303030, 0x20202020, 0x40404040, 0 at byte
// addresses 0, 4, 8, 12 and zero elsewhere) are this design's choices.
// Interface: clk, we, a (byte address), wd (store data) in; rd out.
module data_mem #(
  parameter int unsigned DEPTH     = 2048,
  parameter string       INIT_FILE = "rtl/sample_data.hex"
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0] ram [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) ram[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, ram);
  end

  assign rd = ram[a[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) ram[a[AW+1:2]] <= wd;
  end

endmodule
