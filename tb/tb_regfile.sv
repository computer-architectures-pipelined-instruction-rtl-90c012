// tb_regfile - self-checking test of the register file against a shadow
// array: random writes and reads, register 0 staying zero, and a write
// being visible on both read ports in the cycle it is presented.
module tb_regfile;
  import mips_pkg::*;

  logic clk = 0, rst;
  reg_idx_t a1, a2, a3;
  word_t wd3, rd1, rd2;
  logic we3;
  int checks = 0, failures = 0;
  word_t shadow [32];

  regfile dut (.clk, .rst, .a1, .a2, .a3, .wd3, .we3, .rd1, .rd2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(reg_idx_t a);
    if (a == 0) return '0;
    if (we3 && a == a3) return wd3;
    return shadow[a];
  endfunction

  initial begin
    rst = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      a1 = reg_idx_t'($urandom); a2 = reg_idx_t'($urandom);
      a3 = reg_idx_t'($urandom); wd3 = $urandom; we3 = ($urandom_range(0, 2) != 0);
      if (n % 7 == 0) a1 = a3;       // same-cycle write/read
      if (n % 11 == 0) a2 = a3;
      if (n % 13 == 0) a3 = 0;       // write to $0 is ignored
      #1;
      checks += 2;
      if (rd1 !== expect_rd(a1)) begin failures++; $display("FAIL rd1 a1=%0d got %h exp %h", a1, rd1, expect_rd(a1)); end
      if (rd2 !== expect_rd(a2)) begin failures++; $display("FAIL rd2 a2=%0d got %h exp %h", a2, rd2, expect_rd(a2)); end
      @(posedge clk);
      if (we3 && a3 != 0) shadow[a3] = wd3;
      #1;
    end
    // all registers after the run
    we3 = 0;
    for (int r = 0; r < 32; r++) begin
      a1 = reg_idx_t'(r); #1;
      checks++;
      if (rd1 !== shadow[r]) begin failures++; $display("FAIL final r%0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
