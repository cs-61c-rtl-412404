// tb_inst_memory: self-checking test of the instruction memory.
// Loads random words through the load port, then reads them back at byte
// addresses (PC values) and checks that word k appears at address 4k.
module tb_inst_memory;
  localparam int unsigned WORDS = 128;
  logic        clk = 0, prog_we;
  logic [6:0]  prog_addr;
  logic [31:0] prog_data, adr, instruction;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(WORDS)) dut (.clk(clk), .adr(adr), .instruction(instruction),
                                    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; adr = 0;
    for (int i = 0; i < WORDS; i++) begin
      prog_we = 1; prog_addr = i[6:0]; prog_data = $urandom; model[i] = prog_data;
      @(posedge clk); #1;
    end
    prog_we = 0; prog_data = 32'hDEAD_BEEF;
    repeat (3) @(posedge clk);         // prog_we=0 must not write
    #1;
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < WORDS; i++) begin
        adr = i * 4; #1; checks++;
        if (instruction !== model[i]) begin failures++; $display("adr %h got %h exp %h", adr, instruction, model[i]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
