// pipe_reg - an inter-stage pipeline register with hold and clear.
//
// Stores a value of type T (normally one of the stage structs of mips_pkg)
// at each rising clock edge. When en is low the register holds its
// contents: this is how a stall freezes the stages before the hazard.
// When en and clr are both high it loads all zeros instead of d, which turns
// the instruction it carries into a bubble whose write enables are low:
// this is how a flush discards an instruction. clr has an effect only
// while en is high, so a stalled register keeps its instruction even if a
// flush is requested in the same cycle. Synchronous, active-high reset
// also loads zeros.
//
// Holding and clearing inter-stage registers to realise stalls and flushes
// follows the document (the EN and CLR inputs of its final datapath); the
// priority between the two inputs and the synchronous reset are this
// design's own choices.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (en) begin
      if (clr)     q <= '0;
      else         q <= d;
    end
  end

endmodule
