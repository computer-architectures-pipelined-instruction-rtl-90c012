// hazard_unit - detects data and control hazards and resolves them by
// forwarding, stalling and flushing.
//
// Forwarding into EX (forward_ae / forward_be, per ALU operand):
//   FWD_MEM if the source register of the instruction in EX is not $0 and
//           equals the destination of the instruction in MEM, which writes
//           a register (its ALU result ALUOutM is used);
//   FWD_WB  otherwise, if it equals the destination of the instruction in
//           WB, which writes a register (ResultW is used);
//   FWD_NONE otherwise (the value read from the register file).
// Forwarding into ID for the branch comparison (forward_ad / forward_bd):
//   high if the branch source register is not $0 and equals the
//   destination of a register-writing instruction in MEM (ALUOutM is used).
//   A result in WB needs no path: the register file passes it through.
// Stalls (stall_f, stall_d hold PC and the IF/ID register; flush_e turns
// the ID/EX register into a bubble):
//   load-use: the instruction in EX is a load (mem_to_reg) whose
//             destination rt is a source of the instruction in ID;
//   branch:   a beq in ID needs a register that is still being computed in
//             EX, or still being loaded in MEM.
// Purely combinational.
//
// The forwarding rule (compare EX sources with the MEM and WB destinations,
// qualified by their RegWrite) and the stall by holding and clearing the
// inter-stage registers follow the document; the exact stall conditions
// and the ID-stage forwarding for early branch evaluation are this
// design's completion of what the document states in words only.
module hazard_unit
  import mips_pkg::*;
(
  // ID stage
  input  reg_idx_t rs_d,
  input  reg_idx_t rt_d,
  input  logic     branch_d,
  // EX stage
  input  reg_idx_t rs_e,
  input  reg_idx_t rt_e,
  input  reg_idx_t write_reg_e,
  input  logic     reg_write_e,
  input  logic     mem_to_reg_e,
  // MEM stage
  input  reg_idx_t write_reg_m,
  input  logic     reg_write_m,
  input  logic     mem_to_reg_m,
  // WB stage
  input  reg_idx_t write_reg_w,
  input  logic     reg_write_w,
  // outputs
  output fwd_e     forward_ae,
  output fwd_e     forward_be,
  output logic     forward_ad,
  output logic     forward_bd,
  output logic     stall_f,
  output logic     stall_d,
  output logic     flush_e
);

  // the two stall causes, kept apart for observation
  logic lw_stall, branch_stall;

  function automatic fwd_e fwd_ex(reg_idx_t src);
    if (src != '0 && reg_write_m && src == write_reg_m)      return FWD_MEM;
    else if (src != '0 && reg_write_w && src == write_reg_w) return FWD_WB;
    else                                                     return FWD_NONE;
  endfunction

  always_comb begin
    forward_ae = fwd_ex(rs_e);
    forward_be = fwd_ex(rt_e);

    forward_ad = (rs_d != '0) && reg_write_m && (rs_d == write_reg_m);
    forward_bd = (rt_d != '0) && reg_write_m && (rt_d == write_reg_m);

    lw_stall = mem_to_reg_e && ((rs_d == rt_e) || (rt_d == rt_e));

    branch_stall = branch_d &&
      ((reg_write_e  && (write_reg_e == rs_d || write_reg_e == rt_d)) ||
       (mem_to_reg_m && (write_reg_m == rs_d || write_reg_m == rt_d)));

    stall_f = lw_stall || branch_stall;
    stall_d = lw_stall || branch_stall;
    flush_e = lw_stall || branch_stall;
  end

endmodule
