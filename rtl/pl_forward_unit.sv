// pl_forward_unit: operand forwarding for the EX stage of the pipelined
// processor.
//
// For each source register of the instruction in EX it selects
// 2'b10: the value produced by the instruction in MEM, when that one writes
// the same non-zero register; else 2'b01: the result in WB, when the
// instruction in WB writes it; else 2'b00: the value read from the register
// file in ID. The nearer (MEM) producer has priority. Purely combinational.
module pl_forward_unit (
  input  logic [4:0] rs1_e,
  input  logic [4:0] rs2_e,
  input  logic [4:0] rd_m,
  input  logic [4:0] rd_w,
  input  logic       br_wr_m,
  input  logic       br_wr_w,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);

  function automatic logic [1:0] sel(input logic [4:0] rs);
    if (rs != 5'd0 && br_wr_m && rs == rd_m)      return 2'b10;
    else if (rs != 5'd0 && br_wr_w && rs == rd_w) return 2'b01;
    else                                          return 2'b00;
  endfunction

  assign fwd_a = sel(rs1_e);
  assign fwd_b = sel(rs2_e);

endmodule
