// cpu_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The instruction formats (R, I and J type) and the opcode / function-code
// values are those of the MIPS subset add, sub, ori, lw, sw, beq and j. The
// two-bit ALU control encoding (00 ADD, 01 SUB, 10 OR) is the one the control
// equations are written for. The control-word struct gathers the control
// points of the datapath so that the controller, the fetch unit and the
// datapath share one definition.
package cpu_pkg;

  localparam int unsigned XLEN = 32;  // data and address width
  localparam int unsigned NREG = 32;  // architectural registers

  // Opcodes, instruction bits 31:26
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function codes of R-type instructions, bits 5:0
  localparam logic [5:0] FN_ADD   = 6'b10_0000;
  localparam logic [5:0] FN_SUB   = 6'b10_0010;

  // ALU operation selected by ALUctr
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Extender mode: 0 zero-extend, 1 sign-extend
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // Control points of the datapath and the fetch unit
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data-memory output
    logic     reg_write;  // write the register file
    logic     mem_write;  // write the data memory
    logic     npc_sel;    // 1: branch instruction
    logic     jump;       // 1: jump instruction
    ext_op_e  ext_op;     // immediate extension
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction fields
  function automatic logic [5:0]  f_op    (logic [31:0] i); return i[31:26]; endfunction
  function automatic logic [4:0]  f_rs    (logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0]  f_rt    (logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0]  f_rd    (logic [31:0] i); return i[15:11]; endfunction
  function automatic logic [5:0]  f_funct (logic [31:0] i); return i[5:0];   endfunction
  function automatic logic [15:0] f_imm16 (logic [31:0] i); return i[15:0];  endfunction
  function automatic logic [25:0] f_target(logic [31:0] i); return i[25:0];  endfunction

endpackage
