// regfile - the 32 x 32-bit general-purpose register file.
//
// Two read ports (a1 -> rd1, a2 -> rd2) are read in the decode (ID) stage
// and one write port (a3, wd3, we3) is written from the write-back (WB)
// stage. Register 0 always reads as zero and ignores writes.
//
// Timing: reads are combinational. A write takes effect at the rising clock
// edge, and during the cycle in which it is presented it is also passed
// straight to a read port that names the same register. A value written
// back in a cycle is therefore seen by the instruction decoded in that same
// cycle, which is the effect the document obtains by writing in the first
// half of the clock cycle and reading in the second half; here it is built
// with one clock edge and a write-through path (this design's choice).
// A synchronous, active-high reset clears every register (own choice).
module regfile
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t a1,
  input  reg_idx_t a2,
  input  reg_idx_t a3,
  input  word_t    wd3,
  input  logic     we3,
  output word_t    rd1,
  output word_t    rd2
);

  localparam int unsigned NREGS = 1 << RIDX;

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  function automatic word_t read_port(reg_idx_t a);
    if (a == '0)                return '0;
    else if (we3 && a == a3)    return wd3;
    else                        return regs[a];
  endfunction

  assign rd1 = read_port(a1);
  assign rd2 = read_port(a2);

endmodule
