// regfile: the 32 x 32-bit integer register file (x0 reads as 0).
//
// Two combinational read ports (ra1/rd1, ra2/rd2) and one write port
// (we, wa, wd). The single-cycle and multicycle processors write on the
// rising clock edge (NEGEDGE_WRITE = 0). The pipelined processor writes in the
// first half of the cycle (NEGEDGE_WRITE = 1: write on the falling edge), so
// an instruction in ID reads in the same cycle the value written by the one
// in WB. The registers have no reset; software initialises what it reads.
// Writing in the first half of the cycle for the pipeline follows the
// document; the parameter that selects the edge is this design's way of
// sharing one file between the three processors.
module regfile #(
  parameter bit NEGEDGE_WRITE = 1'b0
) (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);

  logic [31:0] regs [32];

  if (NEGEDGE_WRITE) begin : g_neg
    always_ff @(negedge clk)
      if (we && wa != 5'd0) regs[wa] <= wd;
  end else begin : g_pos
    always_ff @(posedge clk)
      if (we && wa != 5'd0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];

endmodule
