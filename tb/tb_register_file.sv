// tb_register_file: self-checking test of the 32 x 32 register file.
// Random writes and reads on both ports are checked against an array model:
// writes land at the clock edge, reads are combinational, register 0 stays
// zero, RegWr=0 writes nothing, and reset clears every register.
module tb_register_file;
  logic        clk = 0, rst, reg_wr;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .reg_wr(reg_wr), .rw(rw), .bus_w(bus_w),
                     .ra(ra), .rb(rb), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (bus_a !== model[ra]) begin failures++; $display("busA r%0d got %h exp %h", ra, bus_a, model[ra]); end
    checks++;
    if (bus_b !== model[rb]) begin failures++; $display("busB r%0d got %h exp %h", rb, bus_b, model[rb]); end
  endtask

  initial begin
    rst = 1; reg_wr = 0; rw = 0; ra = 0; rb = 0; bus_w = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin ra = i[4:0]; rb = 5'(31 - i); #1 check_reads(); end
    for (int n = 0; n < 5000; n++) begin
      reg_wr = ($urandom % 4) != 0;
      rw     = 5'($urandom);
      bus_w  = $urandom;
      ra     = 5'($urandom);
      rb     = (n % 7 == 0) ? rw : 5'($urandom);
      #1 check_reads();               // old value before the edge
      @(posedge clk);
      if (reg_wr && rw != 0) model[rw] = bus_w;
      #1 check_reads();               // new value after the edge
    end
    // reset clears everything
    rst = 1; @(posedge clk); #1 rst = 0; reg_wr = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin ra = i[4:0]; rb = i[4:0]; #1 check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
