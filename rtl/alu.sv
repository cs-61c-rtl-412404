// alu: 32-bit arithmetic-logic unit of the single-cycle datapath.
//
// ALUctr selects ADD (00), SUB (01) or OR (10); the fourth code is unused and
// yields 0. Beside the result the unit drives Equal, the comparison of its two
// operands that beq uses to decide the branch. Equal compares the A and B
// inputs directly (the datapath drives B with busB for beq). Overflow is not
// detected: add and sub wrap modulo 2^32. Purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_e         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             equal
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
  end

  assign equal = (a == b);
endmodule
