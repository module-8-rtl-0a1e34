// exc_cpus_top: the three reduced RISC-V processors with exception handling,
// side by side: single-cycle (sc_), multicycle (mc_) and five-stage pipelined
// (pl_). They share clock and reset but nothing else; each has its own
// memories, CSRs, interrupt input (where it has one) and observation ports.
//
// Per processor: pc = address of the instruction being fetched; trap = an
// exception or interrupt is being taken; mem_we/mem_addr/mem_wdata = the data
// memory write of the cycle. sc_int and mc_int are the external interrupt
// requests of the single-cycle and multicycle processors (level sensitive;
// the device drops them once trap shows the interrupt was taken). All
// processors start at RESET_PC after the synchronous active-high reset.
module exc_cpus_top
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_d400,
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sc_int,
  input  logic        mc_int,
  output logic [31:0] sc_pc,
  output logic        sc_trap,
  output logic        sc_mem_we,
  output logic [31:0] sc_mem_addr,
  output logic [31:0] sc_mem_wdata,
  output logic [31:0] mc_pc,
  output logic        mc_trap,
  output logic        mc_mem_we,
  output logic [31:0] mc_mem_addr,
  output logic [31:0] mc_mem_wdata,
  output logic [31:0] pl_pc,
  output logic        pl_trap,
  output logic        pl_mem_we,
  output logic [31:0] pl_mem_addr,
  output logic [31:0] pl_mem_wdata
);

  sc_cpu #(.RESET_PC(RESET_PC), .IMEM_WORDS(MEM_WORDS), .DMEM_WORDS(MEM_WORDS)) u_sc (
    .clk, .rst, .int_i(sc_int), .pc_o(sc_pc), .trap_o(sc_trap),
    .mem_we(sc_mem_we), .mem_addr(sc_mem_addr), .mem_wdata(sc_mem_wdata));

  mc_cpu #(.RESET_PC(RESET_PC), .MEM_WORDS(MEM_WORDS)) u_mc (
    .clk, .rst, .int_i(mc_int), .pc_o(mc_pc), .trap_o(mc_trap),
    .mem_we(mc_mem_we), .mem_addr(mc_mem_addr), .mem_wdata(mc_mem_wdata));

  pl_cpu #(.RESET_PC(RESET_PC), .IMEM_WORDS(MEM_WORDS), .DMEM_WORDS(MEM_WORDS)) u_pl (
    .clk, .rst, .pc_o(pl_pc), .trap_o(pl_trap),
    .mem_we(pl_mem_we), .mem_addr(pl_mem_addr), .mem_wdata(pl_mem_wdata));

endmodule
