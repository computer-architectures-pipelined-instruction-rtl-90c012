// alu - the 32-bit arithmetic/logic unit of the execute (EX) stage.
//
// Computes one of five functions of the operands a (SrcA) and b (SrcB),
// selected by the 3-bit ALUControl code: AND, OR, ADD, SUB and "set on less
// than" (signed compare, result 1 or 0). Zero is high when the result is 0.
// These are the operations the supported instructions need: add, sub, and,
// or, slt, and the address/immediate addition of addi, lw and sw. Purely
// combinational.
//
// The operation set, the ALUControl width and the Zero output follow the
// document's datapath drawings. The numeric codes are this design's own
// (see mips_pkg); an unused code yields 0.
module alu
  import mips_pkg::*;
(
  input  word_t     a,
  input  word_t     b,
  input  alu_ctrl_e ctrl,
  output word_t     y,
  output logic      zero
);

  word_t diff;

  always_comb begin
    diff = a - b;
    unique case (ctrl)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = diff;
      ALU_SLT: y = {{(XLEN-1){1'b0}}, ($signed(a) < $signed(b))};
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
