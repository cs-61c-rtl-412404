// datapath: register file, extender, ALU and data memory of the single-cycle
// processor, with the three multiplexers that route between them.
//
//   Rw    = RegDst   ? Rd : Rt
//   ALU B = ALUSrc   ? Ext(imm16) : busB
//   busW  = MemtoReg ? DataMemory[ALU result] : ALU result
// busA always feeds ALU input A; busB also feeds the data memory's Data In,
// and the ALU result is the memory address. Everything is combinational from
// the instruction fields and control points to busW, the memory write data
// and Equal; the register file and data memory are written on the rising
// clock edge that ends the cycle. The write-back and store buses are brought
// out so that the executed instructions can be observed.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [4:0]  rs,
  input  logic [4:0]  rt,
  input  logic [4:0]  rd,
  input  logic [15:0] imm16,
  output logic        equal,
  // observation of the state updates of this cycle
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm32, alu_b, alu_out, dmem_out;

  assign rw = ctrl.reg_dst ? rd : rt;

  register_file #(.NREGS(NREG), .WIDTH(XLEN)) u_rf (
    .clk    (clk),
    .rst    (rst),
    .reg_wr (ctrl.reg_write),
    .rw     (rw),
    .bus_w  (bus_w),
    .ra     (rs),
    .rb     (rt),
    .bus_a  (bus_a),
    .bus_b  (bus_b)
  );

  extender u_ext (
    .imm16  (imm16),
    .ext_op (ctrl.ext_op),
    .imm32  (imm32)
  );

  assign alu_b = ctrl.alu_src ? imm32 : bus_b;

  alu #(.WIDTH(XLEN)) u_alu (
    .a       (bus_a),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .equal   (equal)
  );

  data_memory #(.WORDS(DMEM_WORDS), .WIDTH(XLEN)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_write),
    .adr      (alu_out),
    .data_in  (bus_b),
    .data_out (dmem_out)
  );

  assign bus_w = ctrl.mem_to_reg ? dmem_out : alu_out;

  assign reg_we    = ctrl.reg_write;
  assign reg_waddr = rw;
  assign reg_wdata = bus_w;
  assign mem_we    = ctrl.mem_write;
  assign mem_addr  = alu_out;
  assign mem_wdata = bus_b;
endmodule
