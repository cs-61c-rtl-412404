// tb_alu: self-checking test of the ALU.
// Drives corner values and random operands for ADD, SUB and OR and compares
// the result with 64-bit integer arithmetic truncated to 32 bits, and the
// Equal flag with an operand comparison.
module tb_alu;
  import cpu_pkg::*;
  logic [31:0] a, b, result;
  alu_ctr_e    alu_ctr;
  logic        equal;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(alu_ctr), .result(result), .equal(equal));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e op);
    longint unsigned la, lb, lexp;
    logic [31:0] exp;
    a = ta; b = tb_; alu_ctr = op; #1;
    la = longint'(ta); lb = longint'(tb_);
    case (op)
      ALU_ADD: lexp = la + lb;
      ALU_SUB: lexp = la + (64'h1_0000_0000 - lb);
      default: lexp = la | lb;
    endcase
    exp = lexp[31:0];
    checks++;
    if (result !== exp) begin
      failures++; $display("op %s a=%h b=%h got %h exp %h", op.name(), ta, tb_, result, exp);
    end
    checks++;
    if (equal !== (la == lb)) begin
      failures++; $display("equal a=%h b=%h got %b", ta, tb_, equal);
    end
  endtask

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    alu_ctr_e ops [3] = '{ALU_ADD, ALU_SUB, ALU_OR};
    foreach (corners[i]) foreach (corners[j]) foreach (ops[k]) check(corners[i], corners[j], ops[k]);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x;
      x = $urandom;
      check(x, (n % 5 == 0) ? x : $urandom, ops[n % 3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
