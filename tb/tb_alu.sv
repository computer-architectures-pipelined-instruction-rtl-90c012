// tb_alu - self-checking test of the ALU: every operation on corner values
// and random operands, compared with a reference computed here, plus the
// Zero flag.
module tb_alu;
  import mips_pkg::*;

  word_t a, b, y;
  alu_ctrl_e ctrl;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .ctrl, .y, .zero);

  function automatic word_t ref_y(word_t x1, word_t x2, alu_ctrl_e c);
    case (c)
      ALU_AND: return x1 & x2;
      ALU_OR:  return x1 | x2;
      ALU_ADD: return x1 + x2;
      ALU_SUB: return x1 - x2;
      ALU_SLT: return (int'(x1) < int'(x2)) ? 32'd1 : 32'd0;
      default: return '0;
    endcase
  endfunction

  task automatic check(word_t x1, word_t x2, alu_ctrl_e c);
    word_t e;
    a = x1; b = x2; ctrl = c;
    #1;
    e = ref_y(x1, x2, c);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL ctrl=%s a=%h b=%h y=%h exp=%h zero=%b", c.name(), x1, x2, y, e, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ctrl_e ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    word_t corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};
    foreach (ops[o]) foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], ops[o]);
    repeat (2000) check($urandom, $urandom, ops[$urandom_range(0, 4)]);
    // a few explicit values
    check(32'd5, 32'd5, ALU_SUB);           // zero result
    check(32'hffff_fffe, 32'd1, ALU_SLT);   // -2 < 1
    check(32'd1, 32'hffff_fffe, ALU_SLT);   // 1 < -2 is false
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
