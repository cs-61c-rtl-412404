// tb_inst_fetch_unit: self-checking test of the PC and next-PC logic.
// Random nPC_sel, Equal, Jump, imm16 and target values are applied for many
// cycles; after each rising edge the PC is compared with a model that
// computes PC+4, PC+4+SignExt(imm16)*4 and {PC[31:28],target,00} with
// integer arithmetic. Counts the taken branches, not-taken branches and
// jumps seen, and fails if any of them never occurred.
module tb_inst_fetch_unit;
  logic        clk = 0, rst, npc_sel, equal, jump;
  logic [15:0] imm16;
  logic [25:0] target;
  logic [31:0] pc, model_pc;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jump = 0;

  inst_fetch_unit dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .equal(equal), .jump(jump),
                       .imm16(imm16), .target(target), .pc(pc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; equal = 0; jump = 0; imm16 = 0; target = 0;
    @(posedge clk); #1;
    model_pc = 0;
    checks++; if (pc !== 0) begin failures++; $display("reset pc %h", pc); end
    rst = 0;
    for (int n = 0; n < 10000; n++) begin
      longint signed off;
      npc_sel = ($urandom % 3) == 0;
      equal   = ($urandom % 2) != 0;
      jump    = ($urandom % 8) == 0;
      imm16   = 16'($urandom);
      target  = 26'($urandom);
      off = longint'(signed'(imm16)) * 4;
      if (jump) begin
        model_pc = {model_pc[31:28], target, 2'b00}; n_jump++;
      end else if (npc_sel && equal) begin
        model_pc = 32'(longint'(model_pc) + 4 + off); n_taken++;
      end else begin
        if (npc_sel) n_not_taken++;
        model_pc = model_pc + 4;
      end
      @(posedge clk); #1;
      checks++;
      if (pc !== model_pc) begin failures++; $display("cycle %0d pc %h exp %h", n, pc, model_pc); end
    end
    if (n_taken == 0)     begin failures++; $display("no taken branch"); end
    if (n_not_taken == 0) begin failures++; $display("no untaken branch"); end
    if (n_jump == 0)      begin failures++; $display("no jump"); end
    $display("taken=%0d not_taken=%0d jumps=%0d", n_taken, n_not_taken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
