// data_mem - data memory of the processor, used by lw and sw in the MEM stage.
//
// WORDS 32-bit words addressed by the byte address a; bits 1:0 are ignored
// and the word index wraps at WORDS. Reading is combinational (rd follows a
// in the same cycle); a write of wd happens at the rising clock edge when
// we is high. Only whole words are accessed, as lw and sw need.
//
// The document names this memory and shows its A, RD, WD and WE ports and
// its clock; the size and word addressing are this design's choices. The
// contents are not reset.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 64
) (
  input  logic  clk,
  input  logic  we,
  input  word_t a,
  input  word_t wd,
  output word_t rd
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[a[AW+1:2]] <= wd;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
