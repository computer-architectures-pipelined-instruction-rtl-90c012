// instr_mem - instruction memory of the processor (read-only port).
//
// WORDS 32-bit words, addressed by a byte address a; bits 1:0 are ignored
// and the word index wraps at WORDS. The read is combinational: the
// instruction at the PC is available in the same cycle (IF stage). The
// contents come from the hex file INIT_FILE when one is given, or are
// written into the array mem by the surrounding test environment before
// reset is released.
//
// The document only names this memory and shows its A/RD ports; the size,
// the word addressing and the way it is filled are this design's choices.
module instr_mem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS     = 64,
  parameter string       INIT_FILE = ""
) (
  input  word_t a,
  output word_t rd
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rd = mem[a[AW+1:2]];

endmodule
