// tb_pipe_reg - self-checking test of the pipeline register: load, hold
// while en is low, clear to zero when en and clr are high, no clear while
// held, and reset.
module tb_pipe_reg;
  import mips_pkg::*;

  logic clk = 0, rst, en, clr;
  id_ex_t d, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(id_ex_t)) dut (.clk, .rst, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1; clr = 0; d = id_ex_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    model = '0;
    for (int n = 0; n < 2000; n++) begin
      d   = id_ex_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (en) model = clr ? '0 : d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL n=%0d en=%b clr=%b", n, en, clr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
