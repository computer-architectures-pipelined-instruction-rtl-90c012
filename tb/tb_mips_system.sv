// tb_mips_system - end-to-end test of the processor with its memories, all
// parameters at their defaults.
//
// 1. Throughput: 40 independent instructions complete in 5 + 39 cycles
//    (k + n - 1 cycles for n instructions on a k = 5 stage pipeline).
// 2. The document's branch example (beq at 0x20 to slt at 0x64).
// 3. Random programs of the nine instructions with dense register
//    dependences, loads feeding their users and forward branches, each
//    compared register by register and word by word with the reference
//    instruction-set model.
// Throughout, the testbench counts how often each hazard mechanism acted:
// forwarding into EX from MEM and from WB, forwarding into ID for beq,
// load-use stall, branch stall, and a taken branch flushing the IF/ID
// register. A mechanism that never acted counts as a failure.
module tb_mips_system;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int IW = 64, DW = 64;

  logic clk = 0, rst = 1;
  word_t pc, data_addr, write_data;
  logic mem_write;
  int checks = 0, failures = 0;
  int cyc, last_wr_cycle, n_writes;
  int n_fwd_mem, n_fwd_wb, n_fwd_id, n_lw_stall, n_br_stall, n_flush_d, n_taken;

  mips_system dut (.clk, .rst, .pc, .mem_write, .data_addr, .write_data);

  always #5 clk = ~clk;

  always_ff @(posedge clk) cyc <= rst ? 1 : cyc + 1;

  // mechanism counters and write-back log, sampled mid-cycle
  always @(negedge clk) begin
    if (!rst) begin
      if (dut.u_cpu.forward_ae == FWD_MEM || dut.u_cpu.forward_be == FWD_MEM) n_fwd_mem++;
      if (dut.u_cpu.forward_ae == FWD_WB  || dut.u_cpu.forward_be == FWD_WB)  n_fwd_wb++;
      if (dut.u_cpu.forward_ad || dut.u_cpu.forward_bd) n_fwd_id++;
      if (dut.u_cpu.u_hazard.lw_stall)     n_lw_stall++;
      if (dut.u_cpu.u_hazard.branch_stall) n_br_stall++;
      if (dut.u_cpu.pc_src_d && !dut.u_cpu.stall_d) n_flush_d++;
      if (dut.u_cpu.mem_wb_q.reg_write && dut.u_cpu.mem_wb_q.write_reg != 0) begin
        last_wr_cycle = cyc;
        n_writes++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(string tag, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", tag); end
  endtask

  task automatic run_prog(string name, w32_t prog [], int ncycles);
    mips_iss iss = new(IW, DW);
    int halt_pc;
    rst = 1;
    halt_pc = -1;
    for (int i = 0; i < IW; i++) begin
      dut.u_imem.mem[i] = (i < prog.size()) ? prog[i] : i_halt();
      iss.imem[i] = dut.u_imem.mem[i];
    end
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < DW; i++) begin
      dut.u_dmem.mem[i] = $urandom;
      iss.dmem[i] = dut.u_dmem.mem[i];
    end
    n_writes = 0; last_wr_cycle = 0;
    rst = 0;
    repeat (ncycles) @(posedge clk);
    #1;
    iss.run(100000);
    for (int r = 0; r < 32; r++)
      check($sformatf("%s reg %0d = %h exp %h", name, r, dut.u_cpu.u_regfile.regs[r], iss.regs[r]),
            dut.u_cpu.u_regfile.regs[r] == iss.regs[r]);
    for (int i = 0; i < DW; i++)
      check($sformatf("%s mem %0d = %h exp %h", name, i, dut.u_dmem.mem[i], iss.dmem[i]),
            dut.u_dmem.mem[i] == iss.dmem[i]);
    check($sformatf("%s reached halt (pc=%h exp %h)", name, pc, iss.pc),
          pc == iss.pc || pc == iss.pc + 4);
  endtask

  initial begin
    w32_t p [];
    n_fwd_mem = 0; n_fwd_wb = 0; n_fwd_id = 0; n_lw_stall = 0; n_br_stall = 0; n_flush_d = 0;

    // 1. throughput: 40 independent addi, one per cycle after the pipeline fills
    p = new[41];
    for (int i = 0; i < 40; i++) p[i] = i_addi(1 + (i % 31), R0, i);
    p[40] = i_halt();
    run_prog("throughput", p, 60);
    check($sformatf("throughput: 40 writes, last in cycle 44 (got %0d in %0d)", n_writes, last_wr_cycle),
          n_writes == 40 && last_wr_cycle == 44);

    // 2. the document's branch example
    p = new[27];
    foreach (p[i]) p[i] = i_nop();
    p[0] = i_addi(T1, R0, 7);  p[1] = i_addi(T2, R0, 7);  p[2] = i_addi(S2, R0, -3);
    p[3] = i_addi(S3, R0, 4);  p[4] = i_addi(S0, R0, 1);  p[5] = i_addi(S1, R0, 2);
    p[8] = i_beq(T1, T2, 16);
    p[9] = i_and(T0, S0, S1);  p[10] = i_or(T1, S4, S0);  p[11] = i_sub(T2, S0, S5);
    p[25] = i_slt(T3, S2, S3); p[26] = i_halt();
    run_prog("branch example", p, 40);
    check("branch example: slt result", dut.u_cpu.u_regfile.regs[T3] == 1);

    // 3. random programs
    for (int n = 0; n < 40; n++) begin
      random_program(p, 50 + (n % 10));
      run_prog($sformatf("random%0d", n), p, 4 * p.size() + 20);
    end

    $display("mechanisms: fwd EX<-MEM %0d, fwd EX<-WB %0d, fwd ID<-MEM %0d, load-use stall %0d, branch stall %0d, taken-branch flush %0d",
             n_fwd_mem, n_fwd_wb, n_fwd_id, n_lw_stall, n_br_stall, n_flush_d);
    check("forwarding EX<-MEM happened", n_fwd_mem > 0);
    check("forwarding EX<-WB happened",  n_fwd_wb > 0);
    check("forwarding ID<-MEM happened", n_fwd_id > 0);
    check("load-use stall happened",     n_lw_stall > 0);
    check("branch stall happened",       n_br_stall > 0);
    check("taken-branch flush happened", n_flush_d > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
