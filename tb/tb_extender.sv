// tb_extender: self-checking test of the immediate extender.
// Applies every 16-bit immediate in both modes and compares with zero and
// sign extension computed by arithmetic on 32-bit integers.
module tb_extender;
  import cpu_pkg::*;
  logic [15:0] imm16;
  ext_op_e     ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expz, exps;
    for (int v = 0; v < 65536; v++) begin
      imm16  = v[15:0];
      expz   = v;
      exps   = (v >= 32768) ? v - 65536 : v;
      ext_op = EXT_ZERO; #1;
      checks++; if (imm32 !== expz) begin failures++; $display("zero ext %h -> %h", imm16, imm32); end
      ext_op = EXT_SIGN; #1;
      checks++; if (imm32 !== exps) begin failures++; $display("sign ext %h -> %h", imm16, imm32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
