// csr_unit: the three control and status registers kept by the reduced
// processors for exception handling.
//
//   mepc   (0x341) address of the instruction that trapped (or, for an
//                  interrupt, of the next instruction); written by the trap
//                  logic and by csrrw (epc_we/epc_d).
//   mcause (0x342) bit 31 = interrupt, bits 30:0 = exception code; written
//                  only by the trap logic (cause_we/cause_d), read-only to
//                  software.
//   mtvec  (0x305) fixed at 0x1c000000, direct mode, read-only.
//
// csr_rdata returns mcause when csr_addr is 0x342 and mepc otherwise (only
// these two can be read in this ISA subset). With MEPC_NEGEDGE = 1 mepc is
// loaded on the falling clock edge, which the pipelined processor uses so
// that an mret in EX sees the mepc written by a csrrw in MEM in the same
// cycle. Both registers clear on the synchronous, active-high reset (a choice
// of this design).
module csr_unit
  import rv_pkg::*;
#(
  parameter bit MEPC_NEGEDGE = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        epc_we,
  input  logic [31:0] epc_d,
  input  logic        cause_we,
  input  logic [31:0] cause_d,
  input  logic [11:0] csr_addr,
  output logic [31:0] mepc,
  output logic [31:0] mcause,
  output logic [31:0] mtvec,
  output logic [31:0] csr_rdata
);

  if (MEPC_NEGEDGE) begin : g_neg
    always_ff @(negedge clk)
      if (rst)         mepc <= '0;
      else if (epc_we) mepc <= epc_d;
  end else begin : g_pos
    always_ff @(posedge clk)
      if (rst)         mepc <= '0;
      else if (epc_we) mepc <= epc_d;
  end

  always_ff @(posedge clk)
    if (rst)           mcause <= '0;
    else if (cause_we) mcause <= cause_d;

  assign mtvec     = MTVEC_VALUE;
  assign csr_rdata = (csr_addr == CSR_MCAUSE) ? mcause : mepc;

endmodule
