// tb_control_unit - self-checking test of the instruction decoder: the
// control word of each of the nine instructions against a table written
// here, and no-operation decoding of unknown opcodes and function codes.
module tb_control_unit;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.op, .funct, .ctrl);

  // expected: {reg_write, mem_to_reg, mem_write, alu_control, alu_src, reg_dst, branch}
  task automatic check(string name, w32_t ins, logic rw, logic m2r, logic mw,
                       logic [2:0] ac, logic as, logic rdst, logic br, logic ac_matters);
    op = ins[31:26]; funct = ins[5:0];
    #1;
    checks++;
    if (ctrl.reg_write !== rw || ctrl.mem_to_reg !== m2r || ctrl.mem_write !== mw ||
        (ac_matters && ctrl.alu_control !== ac) || ctrl.alu_src !== as ||
        (rw && ctrl.reg_dst !== rdst) || ctrl.branch !== br) begin
      failures++;
      $display("FAIL %s: got %p", name, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                                   rw m2r mw  alu     as rdst br  alu-matters
    check("add",  i_add(1, 2, 3),        1, 0,  0, 3'b010, 0, 1,   0,  1);
    check("sub",  i_sub(1, 2, 3),        1, 0,  0, 3'b110, 0, 1,   0,  1);
    check("and",  i_and(1, 2, 3),        1, 0,  0, 3'b000, 0, 1,   0,  1);
    check("or",   i_or(1, 2, 3),         1, 0,  0, 3'b001, 0, 1,   0,  1);
    check("slt",  i_slt(1, 2, 3),        1, 0,  0, 3'b111, 0, 1,   0,  1);
    check("addi", i_addi(1, 2, 5),       1, 0,  0, 3'b010, 1, 0,   0,  1);
    check("lw",   i_lw(1, 8, 2),         1, 1,  0, 3'b010, 1, 0,   0,  1);
    check("sw",   i_sw(1, 8, 2),         0, 0,  1, 3'b010, 1, 0,   0,  1);
    check("beq",  i_beq(1, 2, 4),        0, 0,  0, 3'b110, 0, 0,   1,  0);
    check("nop",  i_nop(),               0, 0,  0, 3'b000, 0, 0,   0,  0);
    // every other opcode and R-type function code is a no-operation
    for (int o = 1; o < 64; o++) begin
      if (o inside {6'h04, 6'h08, 6'h23, 6'h2b}) continue;
      check("unknown op", {6'(o), 26'h0}, 0, 0, 0, 3'b000, 0, 0, 0, 0);
    end
    for (int f = 0; f < 64; f++) begin
      if (f inside {6'h20, 6'h22, 6'h24, 6'h25, 6'h2a}) continue;
      check("unknown funct", {6'h00, 20'h0, 6'(f)}, 0, 0, 0, 3'b000, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
