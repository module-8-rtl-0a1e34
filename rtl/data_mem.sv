// data_mem: word-wide RAM with a misaligned-access detector (the "memory
// redesign" of the exception-handling processors).
//
// a is a byte address; the word at a[AW+1:2] is read combinationally on rd
// and written with wd on the rising clock edge when we is high. e is high
// when a[1:0] != 0 (not a multiple of 4); the write is then suppressed
// (effective write enable = we & ~e). Only the low address bits select a
// word, so the memory repeats every 4*WORDS bytes. Used as the data memory of
// the single-cycle and pipelined processors and as the unified instruction
// and data memory of the multicycle processor. The size (WORDS = 1024) is
// this design's choice.
// Address bits above AW+1 are not used (lint reports them as unused bits):
// that is the intended aliasing, not an error.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd,
  output logic        e
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign e  = |a[1:0];
  assign rd = mem[a[AW+1:2]];

  always_ff @(posedge clk)
    if (we && !e) mem[a[AW+1:2]] <= wd;

endmodule
