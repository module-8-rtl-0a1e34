// pl_hazard_unit: stall and flush control of the pipelined processor.
//
// Load-use and csrrw-use stall: when the instruction in EX is a load
// (ResSrc = 000 with a register write) or a csrrw, and its destination is a
// source of the instruction in ID, IF and ID are held one cycle and a bubble
// enters EX. (A csrrw's value exists only from MEM on, like a load's.)
// A taken branch or jal (PCSrcE) and an mret in EX flush IF/ID and ID/EX:
// the two instructions fetched after them are discarded (not-taken
// prediction, 2 penalty cycles).
// An exception of the instruction in MEM (exc_m) flushes IF/ID, ID/EX,
// EX/MEM and MEM/WB, so the excepting instruction and all younger ones
// write nothing, and overrides any stall so that the trap vector is fetched
// in the next cycle; the exception flushes are this design's extension of
// the stall/flush equations. Purely combinational.
// flush_m and flush_w are both exc_m itself; they are kept as separate
// outputs so each pipeline register has its own named control.
module pl_hazard_unit
  import rv_pkg::*;
(
  input  logic [4:0] rs1_d,
  input  logic [4:0] rs2_d,
  input  logic [4:0] rd_e,
  input  res_src_e   ressrc_e,
  input  logic       br_wr_e,
  input  logic       is_csrw_e,
  input  logic       pc_src_e,
  input  logic       is_mret_e,
  input  logic       exc_m,
  output logic       stall_f,
  output logic       stall_d,
  output logic       flush_d,
  output logic       flush_e,
  output logic       flush_m,
  output logic       flush_w
);

  logic stall;

  assign stall   = (((ressrc_e == RES_MEM) & br_wr_e) | is_csrw_e)
                 & ((rs1_d == rd_e) | (rs2_d == rd_e));
  assign stall_f = stall & ~exc_m;
  assign stall_d = stall & ~exc_m;
  assign flush_d = pc_src_e | is_mret_e | exc_m;
  assign flush_e = stall | pc_src_e | is_mret_e | exc_m;
  assign flush_m = exc_m;
  assign flush_w = exc_m;

endmodule
