// control_unit - instruction decoder of the ID stage.
//
// Looks at the opcode (instruction bits 31:26) and, for R-type
// instructions, the function field (bits 5:0) and produces the control
// signals that travel down the pipeline with the instruction:
//   reg_write   - the instruction writes a register in WB
//   mem_to_reg  - the value written back comes from data memory (lw)
//   mem_write   - the instruction writes data memory in MEM (sw)
//   alu_control - ALU operation in EX
//   alu_src     - ALU operand B is the sign-extended immediate
//   reg_dst     - destination register is rd (bits 15:11) rather than rt
//   branch      - the instruction is beq (resolved in ID)
// Purely combinational. An unknown opcode or function code decodes to a
// no-operation with every enable low; an all-zero word, which is what a
// cleared pipeline register holds, is such a no-operation.
//
// The signal set and names follow the document's datapath drawings; the
// encodings and the no-operation rule are this design's own (see mips_pkg).
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_write: 1'b0, mem_to_reg: 1'b0, mem_write: 1'b0,
             alu_control: ALU_ADD, alu_src: 1'b0, reg_dst: 1'b0,
             branch: 1'b0};
    case (op)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        case (funct)
          FN_ADD:  ctrl.alu_control = ALU_ADD;
          FN_SUB:  ctrl.alu_control = ALU_SUB;
          FN_AND:  ctrl.alu_control = ALU_AND;
          FN_OR:   ctrl.alu_control = ALU_OR;
          FN_SLT:  ctrl.alu_control = ALU_SLT;
          default: ctrl.reg_write   = 1'b0;
        endcase
      end
      OP_ADDI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
      end
      OP_LW: begin
        ctrl.reg_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch      = 1'b1;
        ctrl.alu_control = ALU_SUB;
      end
      default: ;
    endcase
  end

endmodule
