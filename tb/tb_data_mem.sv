// tb_data_mem - self-checking test of the data memory against a shadow
// array: random writes and reads, combinational read of the written word in
// the cycle after the write, write only when we is high, address wrap.
module tb_data_mem;
  import mips_pkg::*;

  localparam int unsigned WORDS = 64;
  logic clk = 0, we;
  word_t a, wd, rd;
  int checks = 0, failures = 0;
  word_t model [WORDS];

  data_mem #(.WORDS(WORDS)) dut (.clk, .we, .a, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < WORDS; i++) begin
      a = word_t'(4 * i); wd = $urandom; model[i] = wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; wd = $urandom; we = ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (rd !== model[(a >> 2) % WORDS]) begin failures++; $display("FAIL read a=%h", a); end
      @(posedge clk);
      if (we) model[(a >> 2) % WORDS] = wd;
      #1;
      checks++;
      if (rd !== model[(a >> 2) % WORDS]) begin failures++; $display("FAIL after write a=%h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
