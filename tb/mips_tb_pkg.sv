// mips_tb_pkg - test helpers for the pipelined MIPS processor.
//
// * Instruction encoders for the nine supported instructions (standard
//   MIPS32 formats: R = op|rs|rt|rd|shamt|funct, I = op|rs|rt|imm16).
// * mips_iss: an instruction-at-a-time reference model of the same
//   instruction set, with no pipeline, used to compute the register and
//   memory contents a program must leave behind. Memory is word-addressed
//   with the index wrapping at the memory size, as in the RTL memories.
// * A random program generator that produces dense register dependences,
//   loads feeding their successors, and forward-only branches ending in a
//   halt loop (beq $0,$0,-1).
package mips_tb_pkg;

  typedef logic [31:0] w32_t;

  localparam logic [5:0] OPC_R = 6'h00, OPC_BEQ = 6'h04, OPC_ADDI = 6'h08,
                         OPC_LW = 6'h23, OPC_SW = 6'h2b;
  localparam logic [5:0] FNC_ADD = 6'h20, FNC_SUB = 6'h22, FNC_AND = 6'h24,
                         FNC_OR = 6'h25, FNC_SLT = 6'h2a;

  // register numbers used by the document's examples
  localparam int R0 = 0;
  localparam int T0 = 8, T1 = 9, T2 = 10, T3 = 11;
  localparam int S0 = 16, S1 = 17, S2 = 18, S3 = 19, S4 = 20, S5 = 21, S7 = 23;

  function automatic w32_t enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {OPC_R, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic w32_t enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic w32_t i_add (int rd, int rs, int rt); return enc_r(FNC_ADD, rd, rs, rt); endfunction
  function automatic w32_t i_sub (int rd, int rs, int rt); return enc_r(FNC_SUB, rd, rs, rt); endfunction
  function automatic w32_t i_and (int rd, int rs, int rt); return enc_r(FNC_AND, rd, rs, rt); endfunction
  function automatic w32_t i_or  (int rd, int rs, int rt); return enc_r(FNC_OR,  rd, rs, rt); endfunction
  function automatic w32_t i_slt (int rd, int rs, int rt); return enc_r(FNC_SLT, rd, rs, rt); endfunction
  function automatic w32_t i_addi(int rt, int rs, int imm); return enc_i(OPC_ADDI, rt, rs, imm); endfunction
  function automatic w32_t i_lw  (int rt, int imm, int rs); return enc_i(OPC_LW, rt, rs, imm); endfunction
  function automatic w32_t i_sw  (int rt, int imm, int rs); return enc_i(OPC_SW, rt, rs, imm); endfunction
  function automatic w32_t i_beq (int rs, int rt, int imm); return enc_i(OPC_BEQ, rt, rs, imm); endfunction
  function automatic w32_t i_nop (); return 32'h0000_0000; endfunction
  function automatic w32_t i_halt(); return i_beq(0, 0, -1); endfunction

  class mips_iss;
    w32_t regs [32];
    w32_t imem [];
    w32_t dmem [];
    w32_t pc;
    int   retired;
    int   iw, dw;

    function new(int iwords, int dwords);
      iw = iwords;
      dw = dwords;
      imem = new[iwords];
      dmem = new[dwords];
      foreach (regs[i]) regs[i] = '0;
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      pc = '0;
      retired = 0;
    endfunction

    function int didx(w32_t x);
      int k;
      k = int'(x[31:2]);
      return k % dw;
    endfunction

    function int iidx(w32_t x);
      int k;
      k = int'(x[31:2]);
      return k % iw;
    endfunction

    function void step();
      w32_t ins, a, b, imm, npc, val;
      logic [5:0] op, fn;
      int rs, rt, rd, dst;
      ins = imem[iidx(pc)];
      op = ins[31:26];
      fn = ins[5:0];
      rs = int'(ins[25:21]);
      rt = int'(ins[20:16]);
      rd = int'(ins[15:11]);
      a = regs[rs];
      b = regs[rt];
      imm = {{16{ins[15]}}, ins[15:0]};
      npc = pc + 4;
      dst = 0;
      val = '0;
      case (op)
        OPC_R: begin
          dst = rd;
          case (fn)
            FNC_ADD: val = a + b;
            FNC_SUB: val = a - b;
            FNC_AND: val = a & b;
            FNC_OR:  val = a | b;
            FNC_SLT: val = ($signed(a) < $signed(b)) ? 1 : 0;
            default: dst = 0;
          endcase
        end
        OPC_ADDI: begin dst = rt; val = a + imm; end
        OPC_LW:   begin dst = rt; val = dmem[didx(a + imm)]; end
        OPC_SW:   dmem[didx(a + imm)] = b;
        OPC_BEQ:  if (a == b) npc = pc + 4 + (imm << 2);
        default: ;
      endcase
      if (dst != 0) regs[dst] = val;
      pc = npc;
      retired++;
    endfunction

    // run until the instruction at pc is the halt loop
    function void run(int max_steps);
      for (int i = 0; i < max_steps; i++) begin
        if (imem[iidx(pc)] == i_halt()) return;
        step();
      end
    endfunction
  endclass

  // Random program of n instructions followed by the halt loop. Registers
  // come from $0..$7 so that most instructions depend on recent ones.
  function automatic void random_program(ref w32_t prog [], input int n);
    prog = new[n + 1];
    for (int i = 0; i < n; i++) begin
      int k  = $urandom_range(0, 99);
      int rd = $urandom_range(1, 7);
      int rs = $urandom_range(0, 7);
      int rt = $urandom_range(0, 7);
      int imm = $urandom_range(0, 255) - 128;
      if (k < 12)       prog[i] = i_add(rd, rs, rt);
      else if (k < 20)  prog[i] = i_sub(rd, rs, rt);
      else if (k < 27)  prog[i] = i_and(rd, rs, rt);
      else if (k < 34)  prog[i] = i_or(rd, rs, rt);
      else if (k < 42)  prog[i] = i_slt(rd, rs, rt);
      else if (k < 60)  prog[i] = i_addi(rd, rs, imm);
      else if (k < 74)  prog[i] = i_lw(rd, 4 * $urandom_range(0, 63), rs);
      else if (k < 84)  prog[i] = i_sw(rt, 4 * $urandom_range(0, 63), rs);
      else begin
        // forward branch that stays inside the program (target <= halt)
        int maxoff = n - i - 1;
        int off = (maxoff > 3) ? $urandom_range(0, 3) : $urandom_range(0, maxoff);
        if ($urandom_range(0, 2) == 0) prog[i] = i_beq(rs, rs, off);  // always taken
        else                           prog[i] = i_beq(rs, rt, off);
      end
    end
    prog[n] = i_halt();
  endfunction

endpackage
