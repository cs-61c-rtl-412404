// inst_fetch_unit: program counter and next-PC logic.
//
// The PC holds a word address; its two low bits are always 00. Each rising
// clock edge loads the next PC:
//   - PC + 4 by default;
//   - PC + 4 + SignExt(imm16)*4 when nPC_sel (a branch) and Equal are both 1;
//     the branch adder adds the PC+4 adder's output and the "PC Ext" value;
//   - {PC[31:28], target, 00} when Jump is 1, through a second mux after the
//     branch mux. The four upper bits come from the current PC.
// Synchronous reset loads RESET_PC (0 here; the reset value is this design's
// choice). The PC output is the instruction address for the whole cycle.
module inst_fetch_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        equal,
  input  logic        jump,
  input  logic [15:0] imm16,
  input  logic [25:0] target,
  output logic [31:0] pc
);
  logic [29:0] pc_word;      // PC[31:2]
  logic [29:0] pc_plus4;     // (PC + 4)[31:2]
  logic [29:0] pc_ext;       // SignExt(imm16), in words
  logic [29:0] br_target;    // (PC + 4 + SignExt(imm16)*4)[31:2]
  logic [29:0] jmp_target;   // {PC[31:28], target}
  logic        npc_mux_sel;  // branch taken
  logic [29:0] npc_br;       // output of the branch mux
  logic [29:0] npc;          // output of the jump mux

  assign pc          = {pc_word, 2'b00};
  assign pc_plus4    = pc_word + 30'd1;
  assign pc_ext      = {{14{imm16[15]}}, imm16};
  assign br_target   = pc_plus4 + pc_ext;
  assign jmp_target  = {pc_word[29:26], target};
  assign npc_mux_sel = npc_sel & equal;
  assign npc_br      = npc_mux_sel ? br_target : pc_plus4;
  assign npc         = jump ? jmp_target : npc_br;

  always_ff @(posedge clk) begin
    if (rst) pc_word <= RESET_PC[31:2];
    else     pc_word <= npc;
  end
endmodule
