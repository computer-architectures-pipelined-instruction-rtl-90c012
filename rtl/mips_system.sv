// mips_system - the pipelined MIPS processor with its two memories.
//
// Connects the processor core (mips_cpu: control unit, datapath and hazard
// unit) to a separate instruction memory and data memory, so that an
// instruction fetch and a data access can take place in the same cycle.
// This is the organisation the document draws: processor in the middle,
// instruction memory on the PC/instruction path, data memory on the
// address / write-data / read-data path with its write enable from the
// control unit.
//
// Ports: clock, synchronous active-high reset, and, for observation, the
// current fetch PC and the data-memory write request (enable, address,
// data) of the instruction in the MEM stage. The program is placed in
// u_imem.mem (or given by IMEM_INIT) before reset is released.
//
// Memory sizes are this design's choice; the document gives none.
module mips_system
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 64,
  parameter int unsigned DMEM_WORDS = 64,
  parameter string       IMEM_INIT  = ""
) (
  input  logic  clk,
  input  logic  rst,
  output word_t pc,
  output logic  mem_write,
  output word_t data_addr,
  output word_t write_data
);

  word_t instr, read_data;

  mips_cpu u_cpu (
    .clk, .rst,
    .imem_addr(pc), .imem_rdata(instr),
    .dmem_addr(data_addr), .dmem_wdata(write_data), .dmem_we(mem_write),
    .dmem_rdata(read_data)
  );

  instr_mem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .a(pc), .rd(instr)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(mem_write), .a(data_addr), .wd(write_data), .rd(read_data)
  );

endmodule
