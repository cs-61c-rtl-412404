// data_memory: word-organised data memory of the single-cycle datapath.
//
// Adr is a byte address; bits [AW+1:2] select one of WORDS 32-bit words and
// the two low bits and the bits above the array are ignored (accesses are
// word accesses, wrapping around the array). Data Out is read
// combinationally, so a load completes inside its cycle. When WrEn is 1,
// Data In is written on the rising clock edge. The memory is not reset.
module data_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [31:0]      adr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);
  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  assign data_out = mem[widx];
endmodule
