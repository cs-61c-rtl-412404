// inst_memory: instruction memory read at the program counter.
//
// Adr is the byte address held in the PC; bits [AW+1:2] select one of WORDS
// 32-bit instruction words, read combinationally onto Instruction<31:0>.
// The processor never writes it; a separate load port (prog_we, prog_addr
// as a word index, prog_data), written on the rising clock edge, lets a
// program be placed in it before it runs. The memory is not reset.
module inst_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [31:0]   adr,
  output logic [31:0]   instruction,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_data
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign instruction = mem[adr[AW+1:2]];
endmodule
