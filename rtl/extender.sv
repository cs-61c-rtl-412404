// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp selects zero extension (ori) or sign extension (lw, sw). Purely
// combinational. Interface: imm16 in, ext_op in, imm32 out.
module extender
  import cpu_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_e     ext_op,
  output logic [31:0] imm32
);
  always_comb begin
    if (ext_op == EXT_SIGN) imm32 = {{16{imm16[15]}}, imm16};
    else                    imm32 = {16'h0000, imm16};
  end
endmodule
