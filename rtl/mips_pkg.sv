// mips_pkg - types and constants shared by the pipelined MIPS processor.
//
// Holds the instruction field layout (R, I and J formats: opcode 31:26,
// rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0, immediate 15:0),
// the opcode and funct numbers of the nine supported instructions, the
// 3-bit ALU control code and the structs carried by the ID/EX, EX/MEM and
// MEM/WB pipeline registers.
//
// The field layout and the 3-bit width of ALUControl follow the document.
// The opcode and funct values are the standard MIPS32 encodings and the
// ALU control codes are this design's own choice; the document gives
// neither.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data and address width
  localparam int unsigned RIDX = 5;   // register number width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] reg_idx_t;

  // Opcodes (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_BEQ   = 6'b000100,
    OP_ADDI  = 6'b001000,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // Function codes (instruction bits 5:0) of the R-type instructions
  typedef enum logic [5:0] {
    FN_ADD = 6'b100000,
    FN_SUB = 6'b100010,
    FN_AND = 6'b100100,
    FN_OR  = 6'b100101,
    FN_SLT = 6'b101010
  } funct_e;

  // ALUControl 2:0
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_e;

  // Select of the forwarding multiplexers in front of the ALU
  typedef enum logic [1:0] {
    FWD_NONE = 2'b00,  // value read from the register file in ID
    FWD_WB   = 2'b01,  // ResultW, the value being written back
    FWD_MEM  = 2'b10   // ALUOutM, the ALU result of the instruction in MEM
  } fwd_e;

  // Control signals produced in ID (names as on the datapath drawings)
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_write;
    alu_ctrl_e alu_control;
    logic      alu_src;
    logic      reg_dst;
    logic      branch;
  } ctrl_t;

  // ID/EX pipeline register contents
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_write;
    alu_ctrl_e alu_control;
    logic      alu_src;
    logic      reg_dst;
    word_t     rd1;
    word_t     rd2;
    reg_idx_t  rs;
    reg_idx_t  rt;
    reg_idx_t  rd;
    word_t     sign_imm;
  } id_ex_t;

  // EX/MEM pipeline register contents
  typedef struct packed {
    logic     reg_write;
    logic     mem_to_reg;
    logic     mem_write;
    word_t    alu_out;
    word_t    write_data;
    reg_idx_t write_reg;
  } ex_mem_t;

  // MEM/WB pipeline register contents
  typedef struct packed {
    logic     reg_write;
    logic     mem_to_reg;
    word_t    read_data;
    word_t    alu_out;
    reg_idx_t write_reg;
  } mem_wb_t;

  // IF/ID pipeline register contents
  typedef struct packed {
    word_t instr;
    word_t pc_plus4;
  } if_id_t;

endpackage
