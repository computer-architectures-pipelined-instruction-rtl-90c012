// mips_cpu - five-stage pipelined MIPS processor core.
//
// Executes add, sub, and, or, slt, addi, lw, sw and beq in the classic
// stages IF (fetch, PC+4), ID (decode, register read, branch compare and
// target), EX (ALU), MEM (data memory) and WB (register write). Four
// pipeline registers (pipe_reg) separate the stages, so up to five
// instructions are in flight and, without hazards, one completes per cycle.
//
// Hazards:
//   * data hazards between ALU instructions are removed by forwarding the
//     result from MEM (ALUOutM) or WB (ResultW) to the ALU inputs in EX;
//   * a load followed by an instruction using its result stalls IF and ID
//     for one cycle and inserts a bubble into EX, after which the loaded
//     value is forwarded from WB;
//   * beq is resolved in ID: an equality comparator decides the branch and
//     an adder forms the target PC+4 + (imm << 2). A taken branch loads the
//     target into the PC and clears the IF/ID register, so exactly one
//     instruction (the one after the branch) is discarded. Branch operands
//     produced by an ALU instruction in MEM are forwarded into ID; if an
//     operand is still in EX, or is being loaded in MEM, ID stalls.
// The register file is written and read in the same cycle with the new
// value visible to the reader.
//
// Interface: separate instruction memory (imem_addr -> imem_rdata, read
// combinationally in the same cycle) and data memory (dmem_addr,
// dmem_wdata, dmem_we, combinational dmem_rdata; the write occurs at the
// clock edge). Synchronous, active-high reset sets PC to 0 and empties the
// pipeline. The first instruction writes its register 5 cycles after it is
// fetched: at the end of cycle 5 counting the fetch cycle as 1.
//
// Concurrent assertions at the end state the stall and flush rules: a
// stall freezes PC and IF/ID and bubbles EX; a taken branch clears IF/ID and
// fetches from the target next.
//
// The stage split, the signal names, forwarding into EX, the load stall,
// early branch evaluation with flush, and the datapath connections follow
// the document. The exact stall and ID-forwarding conditions, the
// encodings and the reset are this design's own completion.
module mips_cpu
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // instruction memory
  output word_t imem_addr,
  input  word_t imem_rdata,
  // data memory
  output word_t dmem_addr,
  output word_t dmem_wdata,
  output logic  dmem_we,
  input  word_t dmem_rdata
);

  // ---------------------------------------------------------------- hazards
  fwd_e forward_ae, forward_be;
  logic forward_ad, forward_bd;
  logic stall_f, stall_d, flush_e;

  // ---------------------------------------------------------------- IF
  word_t pc_f, pc_next_f, pc_plus4_f;
  word_t pc_branch_d;
  logic  pc_src_d;

  assign pc_plus4_f = pc_f + 32'd4;
  assign pc_next_f  = pc_src_d ? pc_branch_d : pc_plus4_f;

  always_ff @(posedge clk) begin
    if (rst)           pc_f <= '0;
    else if (!stall_f) pc_f <= pc_next_f;
  end

  assign imem_addr = pc_f;

  if_id_t if_id_d, if_id_q;
  assign if_id_d = '{instr: imem_rdata, pc_plus4: pc_plus4_f};

  pipe_reg #(.T(if_id_t)) u_if_id (
    .clk, .rst, .en(!stall_d), .clr(pc_src_d), .d(if_id_d), .q(if_id_q)
  );

  // ---------------------------------------------------------------- ID
  word_t    instr_d;
  reg_idx_t rs_d, rt_d, rd_d;
  ctrl_t    ctrl_d;
  word_t    rd1_d, rd2_d, sign_imm_d;
  word_t    cmp_a_d, cmp_b_d;
  logic     equal_d;

  // WB-stage signals used by the register file
  mem_wb_t  mem_wb_q;
  word_t    result_w;

  // MEM-stage result used for forwarding
  ex_mem_t  ex_mem_q;

  assign instr_d = if_id_q.instr;
  assign rs_d    = instr_d[25:21];
  assign rt_d    = instr_d[20:16];
  assign rd_d    = instr_d[15:11];

  control_unit u_control (
    .op(instr_d[31:26]), .funct(instr_d[5:0]), .ctrl(ctrl_d)
  );

  regfile u_regfile (
    .clk, .rst,
    .a1(rs_d), .a2(rt_d),
    .a3(mem_wb_q.write_reg), .wd3(result_w), .we3(mem_wb_q.reg_write),
    .rd1(rd1_d), .rd2(rd2_d)
  );

  assign sign_imm_d  = {{16{instr_d[15]}}, instr_d[15:0]};
  assign pc_branch_d = {sign_imm_d[29:0], 2'b00} + if_id_q.pc_plus4;

  assign cmp_a_d  = forward_ad ? ex_mem_q.alu_out : rd1_d;
  assign cmp_b_d  = forward_bd ? ex_mem_q.alu_out : rd2_d;
  assign equal_d  = (cmp_a_d == cmp_b_d);
  assign pc_src_d = ctrl_d.branch && equal_d;

  id_ex_t id_ex_d, id_ex_q;
  assign id_ex_d = '{
    reg_write:   ctrl_d.reg_write,
    mem_to_reg:  ctrl_d.mem_to_reg,
    mem_write:   ctrl_d.mem_write,
    alu_control: ctrl_d.alu_control,
    alu_src:     ctrl_d.alu_src,
    reg_dst:     ctrl_d.reg_dst,
    rd1:         rd1_d,
    rd2:         rd2_d,
    rs:          rs_d,
    rt:          rt_d,
    rd:          rd_d,
    sign_imm:    sign_imm_d
  };

  pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk, .rst, .en(1'b1), .clr(flush_e), .d(id_ex_d), .q(id_ex_q)
  );

  // ---------------------------------------------------------------- EX
  word_t    src_a_e, src_b_e, write_data_e, alu_out_e;
  reg_idx_t write_reg_e;
  logic     zero_e;  // not needed: beq is decided in ID

  always_comb begin
    unique case (forward_ae)
      FWD_WB:  src_a_e = result_w;
      FWD_MEM: src_a_e = ex_mem_q.alu_out;
      default: src_a_e = id_ex_q.rd1;
    endcase
    unique case (forward_be)
      FWD_WB:  write_data_e = result_w;
      FWD_MEM: write_data_e = ex_mem_q.alu_out;
      default: write_data_e = id_ex_q.rd2;
    endcase
  end

  assign src_b_e     = id_ex_q.alu_src ? id_ex_q.sign_imm : write_data_e;
  assign write_reg_e = id_ex_q.reg_dst ? id_ex_q.rd : id_ex_q.rt;

  alu u_alu (
    .a(src_a_e), .b(src_b_e), .ctrl(id_ex_q.alu_control),
    .y(alu_out_e), .zero(zero_e)
  );

  ex_mem_t ex_mem_d;
  assign ex_mem_d = '{
    reg_write:  id_ex_q.reg_write,
    mem_to_reg: id_ex_q.mem_to_reg,
    mem_write:  id_ex_q.mem_write,
    alu_out:    alu_out_e,
    write_data: write_data_e,
    write_reg:  write_reg_e
  };

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk, .rst, .en(1'b1), .clr(1'b0), .d(ex_mem_d), .q(ex_mem_q)
  );

  // ---------------------------------------------------------------- MEM
  assign dmem_addr  = ex_mem_q.alu_out;
  assign dmem_wdata = ex_mem_q.write_data;
  assign dmem_we    = ex_mem_q.mem_write;

  mem_wb_t mem_wb_d;
  assign mem_wb_d = '{
    reg_write:  ex_mem_q.reg_write,
    mem_to_reg: ex_mem_q.mem_to_reg,
    read_data:  dmem_rdata,
    alu_out:    ex_mem_q.alu_out,
    write_reg:  ex_mem_q.write_reg
  };

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst, .en(1'b1), .clr(1'b0), .d(mem_wb_d), .q(mem_wb_q)
  );

  // ---------------------------------------------------------------- WB
  assign result_w = mem_wb_q.mem_to_reg ? mem_wb_q.read_data : mem_wb_q.alu_out;

  // ---------------------------------------------------------------- hazard unit
  hazard_unit u_hazard (
    .rs_d, .rt_d, .branch_d(ctrl_d.branch),
    .rs_e(id_ex_q.rs), .rt_e(id_ex_q.rt), .write_reg_e,
    .reg_write_e(id_ex_q.reg_write), .mem_to_reg_e(id_ex_q.mem_to_reg),
    .write_reg_m(ex_mem_q.write_reg), .reg_write_m(ex_mem_q.reg_write),
    .mem_to_reg_m(ex_mem_q.mem_to_reg),
    .write_reg_w(mem_wb_q.write_reg), .reg_write_w(mem_wb_q.reg_write),
    .forward_ae, .forward_be, .forward_ad, .forward_bd,
    .stall_f, .stall_d, .flush_e
  );

  // ---------------------------------------------------------------- rules
  // A stall freezes the PC and the instruction waiting in ID.
  a_stall_holds_pc: assert property (@(posedge clk) disable iff (rst)
    stall_f |=> $stable(pc_f));
  a_stall_holds_id: assert property (@(posedge clk) disable iff (rst)
    stall_d |=> $stable(if_id_q));
  // A stall always inserts a bubble into EX.
  a_stall_bubble: assert property (@(posedge clk) disable iff (rst)
    stall_d |=> (!id_ex_q.reg_write && !id_ex_q.mem_write));
  // A taken branch that leaves ID discards the instruction fetched after it
  // and redirects the fetch to the branch target.
  a_branch_flush: assert property (@(posedge clk) disable iff (rst)
    (pc_src_d && !stall_d) |=> (if_id_q == '0 && pc_f == $past(pc_branch_d)));

endmodule
