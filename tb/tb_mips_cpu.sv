// tb_mips_cpu - self-checking test of the pipelined processor core with
// memories modelled in the testbench.
//
// Runs the document's example sequences and checks both the results
// (against the reference instruction-set model of mips_tb_pkg) and the
// cycle on which each instruction writes back:
//   * forwarding: add $s0 followed by and/or/sub that read $s0 - one
//     instruction completes per cycle, the first 5 cycles after its fetch;
//   * load-use: lw $s0 followed by and/or/sub - one stall cycle after lw;
//   * branch: beq $t1,$t2 at 0x20 to 0x64 - taken costs one flushed slot,
//     not taken costs none, a beq operand produced by the instruction just
//     before costs one stall cycle (ALU result) or two (load).
module tb_mips_cpu;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int IW = 64, DW = 64;

  logic clk = 0, rst = 1;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we;
  word_t imem [IW];
  word_t dmem [DW];
  int checks = 0, failures = 0;
  int cyc;
  int wr_cycle [32];
  int wr_count [32];

  mips_cpu dut (.clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_wdata, .dmem_we, .dmem_rdata);

  assign imem_rdata = imem[(imem_addr >> 2) % IW];
  assign dmem_rdata = dmem[(dmem_addr >> 2) % DW];
  always_ff @(posedge clk) if (dmem_we) dmem[(dmem_addr >> 2) % DW] <= dmem_wdata;

  always #5 clk = ~clk;

  // cycle counter: cycle 1 is the first cycle after reset, when PC=0 is fetched
  always_ff @(posedge clk) cyc <= rst ? 1 : cyc + 1;

  // write-back log, sampled in the middle of the cycle
  always @(negedge clk) begin
    if (!rst && dut.mem_wb_q.reg_write && dut.mem_wb_q.write_reg != 0) begin
      wr_cycle[dut.mem_wb_q.write_reg] = cyc;
      wr_count[dut.mem_wb_q.write_reg]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", tag); end
  endtask

  // load prog, reset, run ncycles, compare registers and memory with the model
  task automatic run_prog(string name, w32_t prog [], int ncycles);
    mips_iss iss = new(IW, DW);
    rst = 1;
    foreach (imem[i]) imem[i] = (i < prog.size()) ? prog[i] : i_halt();
    foreach (imem[i]) iss.imem[i] = imem[i];
    repeat (2) @(posedge clk);
    // memory and log are initialised once the pipeline registers are reset
    #1;
    foreach (dmem[i]) begin dmem[i] = 32'h100 + i; iss.dmem[i] = dmem[i]; end
    foreach (wr_cycle[i]) begin wr_cycle[i] = 0; wr_count[i] = 0; end
    rst = 0;
    repeat (ncycles) @(posedge clk);
    #1;
    iss.run(10000);
    for (int r = 0; r < 32; r++)
      check($sformatf("%s reg %0d = %h exp %h", name, r, dut.u_regfile.regs[r], iss.regs[r]),
            dut.u_regfile.regs[r] == iss.regs[r]);
    for (int i = 0; i < DW; i++)
      check($sformatf("%s mem %0d", name, i), dmem[i] == iss.dmem[i]);
  endtask

  initial begin
    w32_t p [];

    // ---- forwarding example (add, and, or, sub using $s0)
    p = new[9];
    p[0] = i_addi(S1, R0, 12);  p[1] = i_addi(S2, R0, 7);  p[2] = i_addi(S3, R0, 9);
    p[3] = i_addi(S4, R0, 33);  p[4] = i_addi(S5, R0, 5);
    p[5] = i_add(S0, S2, S3);   p[6] = i_and(T0, S0, S1);  p[7] = i_or(T1, S4, S0);
    p[8] = i_sub(T2, S0, S5);
    run_prog("forward", p, 30);
    check("forward: add writes 5 cycles after its fetch (cycle 6+5-1)", wr_cycle[S0] == 10);
    check("forward: and one cycle later", wr_cycle[T0] == 11);
    check("forward: or one cycle later",  wr_cycle[T1] == 12);
    check("forward: sub one cycle later", wr_cycle[T2] == 13);
    check("forward: values", dut.u_regfile.regs[T0] == 32'd0 && dut.u_regfile.regs[T1] == 32'd49
                              && dut.u_regfile.regs[T2] == 32'd11);

    // ---- load-use example (lw $s0,40($0) then and, or, sub)
    p = new[9];
    p[0] = i_addi(S1, R0, 12);  p[1] = i_addi(S4, R0, 33); p[2] = i_addi(S5, R0, 5);
    p[3] = i_nop();             p[4] = i_nop();
    p[5] = i_lw(S0, 40, R0);    p[6] = i_and(T0, S0, S1);  p[7] = i_or(T1, S4, S0);
    p[8] = i_sub(T2, S0, S5);
    run_prog("loaduse", p, 30);
    check("loaduse: lw writes in cycle 10", wr_cycle[S0] == 10);
    check("loaduse: and delayed by one stall cycle", wr_cycle[T0] == 12);
    check("loaduse: or",  wr_cycle[T1] == 13);
    check("loaduse: sub", wr_cycle[T2] == 14);
    check("loaduse: loaded value used", dut.u_regfile.regs[T2] == 32'h10a - 32'd5);

    // ---- load-use through the second source operand (rt)
    p[6] = i_and(T0, S1, S0);
    run_prog("loaduse_rt", p, 30);
    check("loaduse_rt: and delayed by one stall cycle", wr_cycle[T0] == 12);

    // ---- branch example: beq $t1,$t2 at 0x20, target 0x64 (slt $t3,$s2,$s3)
    for (int variant = 0; variant < 6; variant++) begin
      p = new[27];
      foreach (p[i]) p[i] = i_nop();
      p[0] = i_addi(T1, R0, 7);
      p[1] = i_addi(T2, R0, (variant == 1) ? 8 : 7);   // variant 1: not taken
      p[2] = i_addi(S2, R0, -3);  p[3] = i_addi(S3, R0, 4);
      p[4] = i_addi(S0, R0, 1);   p[5] = i_addi(S1, R0, 2);   p[6] = i_addi(S4, R0, 5);
      p[7] = i_addi(S7, R0, 9);   // last instruction before the branch
      if (variant >= 2) p[0] = i_addi(T1, R0, 3);          // $t1 differs until p[7]
      if (variant == 2) p[7] = i_addi(T1, R0, 7);          // ALU result needed by beq
      if (variant == 3) p[7] = i_lw(T1, 0, R0);            // load result needed by beq
      p[8]  = i_beq(T1, T2, 16);                           // 0x24 + 16*4 = 0x64
      if (variant >= 4) begin
        // variants 4/5: as 2/3 with the produced operand in the rt position
        p[0] = i_addi(T1, R0, 3);
        p[7] = (variant == 4) ? i_addi(T1, R0, 7) : i_lw(T1, 0, R0);
        p[8] = i_beq(T2, T1, 16);
      end
      p[9]  = i_and(T0, S0, S1);  p[10] = i_or(T1, S4, S0); p[11] = i_sub(T2, S0, S5);
      p[25] = i_slt(T3, S2, S3);  p[26] = i_halt();
      p[12] = i_halt();                                    // end of the fall-through path
      if (variant == 3 || variant == 5) begin
        // make the loaded word equal to $t2 so the branch is taken
        p[1] = i_addi(T2, R0, 32'h100);
      end
      run_prog($sformatf("branch%0d", variant), p, 40);
      if (variant == 1) begin
        check("branch not taken: and executes right after the beq slot",
              wr_count[T0] == 1 && wr_cycle[T0] == wr_cycle[S7] + 2);
        check("branch not taken: slt never reached", wr_count[T3] == 0);
      end else begin
        int after, delay;
        after = (variant == 0) ? S7 : T1;
        delay = (variant == 0) ? 3 : (variant == 2 || variant == 4) ? 4 : 5;
        check($sformatf("branch%0d taken: and flushed", variant), wr_count[T0] == 0 && wr_count[T2] == 1);
        check($sformatf("branch%0d taken: slt writes %0d cycles after the instruction before beq (got %0d)",
                        variant, delay, wr_cycle[T3] - wr_cycle[after]),
              wr_count[T3] == 1 && wr_cycle[T3] == wr_cycle[after] + delay);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
