// tb_data_memory: self-checking test of the data memory.
// Fills the memory, then mixes random reads and writes, comparing the
// combinational Data Out with an associative-array model indexed by the word
// address. Checks that the two low address bits are ignored and that WrEn=0
// leaves the memory unchanged.
module tb_data_memory;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(WORDS)) dut (.clk(clk), .wr_en(wr_en), .adr(adr),
                                    .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    for (int i = 0; i < WORDS; i++) begin
      wr_en = 1; adr = i * 4; data_in = $urandom; model[i] = data_in;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < WORDS; i++) begin
      adr = i * 4 + ($urandom % 4); #1;
      checks++;
      if (data_out !== model[i]) begin failures++; $display("read %0d got %h exp %h", i, data_out, model[i]); end
    end
    for (int n = 0; n < 4000; n++) begin
      int idx;
      idx     = $urandom % WORDS;
      wr_en   = ($urandom % 2) != 0;
      adr     = idx * 4;
      data_in = $urandom;
      #1; checks++;
      if (data_out !== model[idx]) begin failures++; $display("pre-edge read %0d got %h exp %h", idx, data_out, model[idx]); end
      @(posedge clk);
      if (wr_en) model[idx] = data_in;
      #1; checks++;
      if (data_out !== model[idx]) begin failures++; $display("post-edge read %0d got %h exp %h", idx, data_out, model[idx]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
