// single_cycle_cpu: single-cycle processor for the MIPS subset
// add, sub, ori, lw, sw, beq and j.
//
// Every instruction completes in one clock cycle. During the cycle the PC
// addresses the instruction memory, the controller decodes op and func into
// the control points, the datapath reads the registers, computes in the ALU,
// reads the data memory and settles busW, and the fetch unit computes the
// next PC from nPC_sel, Equal and Jump. The rising clock edge that ends the
// cycle writes the register file, the data memory and the PC together.
//
// Ports: clk and a synchronous, active-high rst (clears the PC and the
// registers). The instruction memory is loaded through prog_we / prog_addr
// (word index) / prog_data, normally while rst is held. The outputs show the
// current PC and instruction and the register and memory writes that the
// next clock edge will perform.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned IAW       = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_data,
  output logic [31:0]    pc,
  output logic [31:0]    instruction,
  output logic           reg_we,
  output logic [4:0]     reg_waddr,
  output logic [31:0]    reg_wdata,
  output logic           mem_we,
  output logic [31:0]    mem_addr,
  output logic [31:0]    mem_wdata
);
  ctrl_t ctrl;
  logic  equal;

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk         (clk),
    .adr         (pc),
    .instruction (instruction),
    .prog_we     (prog_we),
    .prog_addr   (prog_addr),
    .prog_data   (prog_data)
  );

  controller u_ctrl (
    .op   (f_op(instruction)),
    .func (f_funct(instruction)),
    .ctrl (ctrl)
  );

  inst_fetch_unit u_ifu (
    .clk     (clk),
    .rst     (rst),
    .npc_sel (ctrl.npc_sel),
    .equal   (equal),
    .jump    (ctrl.jump),
    .imm16   (f_imm16(instruction)),
    .target  (f_target(instruction)),
    .pc      (pc)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .rs        (f_rs(instruction)),
    .rt        (f_rt(instruction)),
    .rd        (f_rd(instruction)),
    .imm16     (f_imm16(instruction)),
    .equal     (equal),
    .reg_we    (reg_we),
    .reg_waddr (reg_waddr),
    .reg_wdata (reg_wdata),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata)
  );
endmodule
