// tb_hazard_unit - self-checking test of the hazard unit.
//
// Directed cases: the document's examples (add then and/or using its
// result: forward from MEM, then from WB; lw then a user: stall; beq after
// an instruction producing its operand: stall or forward into ID), writes
// to $0 and non-writing instructions (never forwarded). Then random inputs
// against a reference written here from the rules.
module tb_hazard_unit;
  import mips_pkg::*;

  reg_idx_t rs_d, rt_d, rs_e, rt_e, write_reg_e, write_reg_m, write_reg_w;
  logic branch_d, reg_write_e, mem_to_reg_e, reg_write_m, mem_to_reg_m, reg_write_w;
  fwd_e forward_ae, forward_be;
  logic forward_ad, forward_bd, stall_f, stall_d, flush_e;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  function automatic fwd_e ref_fwd(reg_idx_t s);
    if (s != 0 && reg_write_m && s == write_reg_m) return FWD_MEM;
    if (s != 0 && reg_write_w && s == write_reg_w) return FWD_WB;
    return FWD_NONE;
  endfunction

  task automatic check_all(string tag);
    logic stall;
    #1;
    stall = (mem_to_reg_e && (rt_e == rs_d || rt_e == rt_d)) ||
            (branch_d && ((reg_write_e && (write_reg_e == rs_d || write_reg_e == rt_d)) ||
                          (mem_to_reg_m && (write_reg_m == rs_d || write_reg_m == rt_d))));
    checks++;
    if (forward_ae !== ref_fwd(rs_e) || forward_be !== ref_fwd(rt_e) ||
        forward_ad !== (rs_d != 0 && reg_write_m && rs_d == write_reg_m) ||
        forward_bd !== (rt_d != 0 && reg_write_m && rt_d == write_reg_m) ||
        stall_f !== stall || stall_d !== stall || flush_e !== stall) begin
      failures++;
      $display("FAIL %s: fae=%0d fbe=%0d fad=%b fbd=%b st=%b/%b/%b exp stall=%b",
               tag, forward_ae, forward_be, forward_ad, forward_bd, stall_f, stall_d, flush_e, stall);
    end
  endtask

  task automatic idle();
    rs_d = 0; rt_d = 0; rs_e = 0; rt_e = 0; write_reg_e = 0; write_reg_m = 0; write_reg_w = 0;
    branch_d = 0; reg_write_e = 0; mem_to_reg_e = 0; reg_write_m = 0; mem_to_reg_m = 0; reg_write_w = 0;
  endtask

  task automatic expect_bit(string tag, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", tag, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // add $s0 in MEM, and $t0,$s0,$s1 in EX: forward A from MEM
    idle(); write_reg_m = 16; reg_write_m = 1; rs_e = 16; rt_e = 17; #1;
    checks++; if (forward_ae !== FWD_MEM || forward_be !== FWD_NONE) begin failures++; $display("FAIL mem fwd"); end
    // add $s0 in WB, or $t1,$s4,$s0 in EX: forward B from WB
    idle(); write_reg_w = 16; reg_write_w = 1; rs_e = 20; rt_e = 16; #1;
    checks++; if (forward_be !== FWD_WB || forward_ae !== FWD_NONE) begin failures++; $display("FAIL wb fwd"); end
    // both MEM and WB write the same register: the younger (MEM) wins
    idle(); write_reg_w = 5; reg_write_w = 1; write_reg_m = 5; reg_write_m = 1; rs_e = 5; #1;
    checks++; if (forward_ae !== FWD_MEM) begin failures++; $display("FAIL priority"); end
    // writes to $0 and non-writing instructions are not forwarded
    idle(); write_reg_m = 0; reg_write_m = 1; rs_e = 0; rt_e = 0; #1;
    checks++; if (forward_ae !== FWD_NONE || forward_be !== FWD_NONE) begin failures++; $display("FAIL $0"); end
    idle(); write_reg_m = 7; reg_write_m = 0; rs_e = 7; #1;
    checks++; if (forward_ae !== FWD_NONE) begin failures++; $display("FAIL regwrite qual"); end
    // lw $s0 in EX, and $t0,$s0,$s1 in ID: stall
    idle(); mem_to_reg_e = 1; reg_write_e = 1; rt_e = 16; write_reg_e = 16; rs_d = 16; rt_d = 17; #1;
    expect_bit("lw stall", stall_f && stall_d && flush_e, 1);
    // add in EX (not a load) with the same dependence: no stall
    mem_to_reg_e = 0; #1;
    expect_bit("no lw stall", stall_f || stall_d || flush_e, 0);
    // beq in ID using the result of an ALU instruction in EX: stall
    idle(); branch_d = 1; rs_d = 9; rt_d = 10; reg_write_e = 1; write_reg_e = 10; #1;
    expect_bit("branch stall EX", stall_d, 1);
    // ... one cycle later that instruction is in MEM: forward into ID, no stall
    idle(); branch_d = 1; rs_d = 9; rt_d = 10; reg_write_m = 1; write_reg_m = 10; #1;
    expect_bit("branch fwd", forward_bd && !forward_ad && !stall_d, 1);
    // beq in ID using a load result in MEM: stall
    mem_to_reg_m = 1; #1;
    expect_bit("branch stall MEM load", stall_d, 1);
    // random
    for (int n = 0; n < 5000; n++) begin
      write_reg_e = reg_idx_t'($urandom_range(0, 7)); write_reg_m = reg_idx_t'($urandom_range(0, 7));
      write_reg_w = reg_idx_t'($urandom_range(0, 7));
      rs_d = reg_idx_t'($urandom_range(0, 7)); rt_d = reg_idx_t'($urandom_range(0, 7));
      rs_e = reg_idx_t'($urandom_range(0, 7)); rt_e = reg_idx_t'($urandom_range(0, 7));
      {branch_d, reg_write_e, mem_to_reg_e, reg_write_m, mem_to_reg_m, reg_write_w} = 6'($urandom);
      check_all($sformatf("rand %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
