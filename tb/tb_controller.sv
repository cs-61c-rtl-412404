// tb_controller: self-checking test of the main control.
// For each instruction of the subset the expected control points are taken
// from the control-signal truth table (x entries are not checked); for jump
// only Jump and the write enables are checked. Opcodes and function codes
// outside the subset must assert no write, no branch and no jump.
module tb_controller;
  import cpu_pkg::*;
  logic [5:0] op, func;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  controller dut (.op(op), .func(func), .ctrl(ctrl));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected value and care mask, one bit per control point, in the order
  // RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr[1:0]
  function automatic logic [9:0] pack(ctrl_t c);
    return {c.reg_dst, c.alu_src, c.mem_to_reg, c.reg_write, c.mem_write,
            c.npc_sel, c.jump, c.ext_op, c.alu_ctr};
  endfunction

  task automatic expect_ctrl(string nm, logic [5:0] o, logic [5:0] f,
                             logic [9:0] exp, logic [9:0] care);
    op = o; func = f; #1;
    checks++;
    if (((pack(ctrl) ^ exp) & care) != 0) begin
      failures++;
      $display("%s: got %b exp %b care %b", nm, pack(ctrl), exp, care);
    end
  endtask

  initial begin
    //                               Dst Src M2R RW MW nPC J  Ext ALU
    expect_ctrl("add", OP_RTYPE, FN_ADD, 10'b1_0_0_1_0_0_0_0_00, 10'b1_1_1_1_1_1_1_0_11);
    expect_ctrl("sub", OP_RTYPE, FN_SUB, 10'b1_0_0_1_0_0_0_0_01, 10'b1_1_1_1_1_1_1_0_11);
    expect_ctrl("ori", OP_ORI,   6'h3f,  10'b0_1_0_1_0_0_0_0_10, 10'b1_1_1_1_1_1_1_1_11);
    expect_ctrl("lw",  OP_LW,    6'h00,  10'b0_1_1_1_0_0_0_1_00, 10'b1_1_1_1_1_1_1_1_11);
    expect_ctrl("sw",  OP_SW,    6'h15,  10'b0_1_0_0_1_0_0_1_00, 10'b0_1_0_1_1_1_1_1_11);
    expect_ctrl("beq", OP_BEQ,   6'h20,  10'b0_0_0_0_0_1_0_0_01, 10'b0_1_0_1_1_1_1_0_11);
    expect_ctrl("j",   OP_J,     6'h22,  10'b0_0_0_0_0_0_1_0_00, 10'b0_0_0_1_1_0_1_0_00);
    // func is ignored for non-R-type opcodes
    for (int f = 0; f < 64; f++) begin
      expect_ctrl("lw/any func", OP_LW, f[5:0], 10'b0_1_1_1_0_0_0_1_00, 10'b1_1_1_1_1_1_1_1_11);
      expect_ctrl("beq/any func", OP_BEQ, f[5:0], 10'b0_0_0_0_0_1_0_0_01, 10'b0_1_0_1_1_1_1_0_11);
      expect_ctrl("ori/any func", OP_ORI, f[5:0], 10'b0_1_0_1_0_0_0_0_10, 10'b1_1_1_1_1_1_1_1_11);
      expect_ctrl("sw/any func",  OP_SW,  f[5:0], 10'b0_1_0_0_1_0_0_1_00, 10'b0_1_0_1_1_1_1_1_11);
    end
    // everything outside the subset does nothing
    for (int o = 0; o < 64; o++)
      for (int f = 0; f < 64; f++) begin
        logic known;
        known = (o == OP_ORI) || (o == OP_LW) || (o == OP_SW) || (o == OP_BEQ) || (o == OP_J) ||
                (o == OP_RTYPE && (f == FN_ADD || f == FN_SUB));
        if (!known)
          expect_ctrl("undefined", o[5:0], f[5:0], 10'b0, 10'b0_0_0_1_1_1_1_0_00);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
