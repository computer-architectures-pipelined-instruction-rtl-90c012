// tb_instr_mem - self-checking test of the instruction memory: contents
// loaded from a small hex file through INIT_FILE, then filled directly,
// read back at every word address, with the low address bits ignored and
// the index wrapping at the memory size.
module tb_instr_mem;
  import mips_pkg::*;

  localparam int unsigned WORDS = 16;
  word_t a, rd, a2, rd2;
  int checks = 0, failures = 0;
  word_t model [WORDS];

  instr_mem #(.WORDS(WORDS)) dut (.a, .rd);
  instr_mem #(.WORDS(8), .INIT_FILE("tb/imem_init.hex")) dut_file (.a(a2), .rd(rd2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // file contents: word i holds 32'hA5A5_0000 + i*17 (see imem_init.hex)
    for (int i = 0; i < 8; i++) begin
      a2 = word_t'(4 * i); #1;
      checks++;
      if (rd2 !== 32'hA5A5_0000 + word_t'(i * 17)) begin failures++; $display("FAIL file word %0d: %h", i, rd2); end
    end
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      dut.mem[i] = model[i];
    end
    for (int n = 0; n < 500; n++) begin
      a = $urandom; #1;
      checks++;
      if (rd !== model[(a >> 2) % WORDS]) begin failures++; $display("FAIL a=%h rd=%h", a, rd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
