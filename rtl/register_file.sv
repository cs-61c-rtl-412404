// register_file: 32 x 32-bit register file with two read ports and one write port.
//
// Ra and Rb select the registers driven combinationally on busA and busB.
// When RegWr is 1, busW is written into register Rw on the rising clock edge,
// so a value computed during a cycle appears at the end of that cycle, as in
// the single-cycle timing. Register 0 always reads as zero and ignores writes
// (the usual MIPS $zero). Reset clears all registers. A read of the register
// being written in the same cycle returns the old value.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             reg_wr,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] bus_w,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];
endmodule
