// instr_mem: instruction ROM with a misaligned-fetch detector.
//
// a is the byte address from the PC; rd is the word at a[AW+1:2], read
// combinationally. e is high when a[1:0] != 0, which the processor turns into
// a misaligned-instruction-address exception (cause 0). Only the low address
// bits select a word, so the program at 0x0000d400 and the trap handler at
// mtvec = 0x1c000000 occupy different words of the default 1024-word ROM.
// Contents come from INIT_FILE (hex, $readmemh) when it is given, or are
// loaded by the simulation environment. The size is this design's choice.
// Address bits above AW+1 are unused on purpose (same aliasing as data_mem).
// Because nothing in the circuit writes this memory, a synthesis tool sees
// its read data as constant unless INIT_FILE gives the contents.
module instr_mem #(
  parameter int unsigned WORDS = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] a,
  output logic [31:0] rd,
  output logic        e
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  assign e  = |a[1:0];
  assign rd = mem[a[AW+1:2]];

endmodule
