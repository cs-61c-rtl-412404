// controller: main control of the single-cycle processor.
//
// Two-level logic. The "AND" plane decodes the opcode (and, for R-type, the
// function code) into one line per instruction: add, sub, ori, lw, sw, beq,
// jump. The "OR" plane forms each control point as the OR of the instructions
// that need it:
//   RegDst = add+sub, ALUSrc = ori+lw+sw, MemtoReg = lw,
//   RegWrite = add+sub+ori+lw, MemWrite = sw, nPCsel = beq, Jump = jump,
//   ExtOp = lw+sw, ALUctr[0] = sub+beq, ALUctr[1] = ori.
// An opcode or function code outside the subset asserts nothing, so it writes
// no state and the PC advances by 4 (a choice of this design). For jump the
// don't-care outputs come out 0: nPCsel 0, ALUctr ADD. Purely combinational.
module controller
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);
  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  // "AND" logic
  always_comb begin
    rtype  = (op == OP_RTYPE);
    i_add  = rtype && (func == FN_ADD);
    i_sub  = rtype && (func == FN_SUB);
    i_ori  = (op == OP_ORI);
    i_lw   = (op == OP_LW);
    i_sw   = (op == OP_SW);
    i_beq  = (op == OP_BEQ);
    i_jump = (op == OP_J);
  end

  // "OR" logic
  always_comb begin
    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_write  = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_write  = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = ext_op_e'(i_lw | i_sw);
    ctrl.alu_ctr    = alu_ctr_e'({i_ori, i_sub | i_beq});
  end
endmodule
