// tb_datapath: self-checking test of the datapath.
// The testbench plays the controller: for random add, sub, ori, lw, sw and
// beq operations it sets the control points from its own table and the
// register fields, then compares the write-back bus, the store bus and Equal
// with a model of the registers and memory, one cycle at a time. The data
// memory is first cleared by a run of stores so that every load is checked.
module tb_datapath;
  import cpu_pkg::*;
  localparam int unsigned DW = 64;
  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [4:0]  rs, rt, rd;
  logic [15:0] imm16;
  logic        equal, reg_we, mem_we;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata, mem_addr, mem_wdata;
  logic [31:0] regs [32];
  logic [31:0] mem  [DW];
  int checks = 0, failures = 0;
  int n_op [6];

  datapath #(.DMEM_WORDS(DW)) dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .rs(rs), .rt(rt), .rd(rd), .imm16(imm16),
    .equal(equal), .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t ctrl_of(int k);
    ctrl_t c = '0;
    case (k)
      0: begin c.reg_dst = 1; c.reg_write = 1; c.alu_ctr = ALU_ADD; end                       // add
      1: begin c.reg_dst = 1; c.reg_write = 1; c.alu_ctr = ALU_SUB; end                       // sub
      2: begin c.alu_src = 1; c.reg_write = 1; c.ext_op = EXT_ZERO; c.alu_ctr = ALU_OR; end   // ori
      3: begin c.alu_src = 1; c.mem_to_reg = 1; c.reg_write = 1; c.ext_op = EXT_SIGN; end     // lw
      4: begin c.alu_src = 1; c.mem_write = 1; c.ext_op = EXT_SIGN; end                       // sw
      default: begin c.npc_sel = 1; c.alu_ctr = ALU_SUB; end                                  // beq
    endcase
    return c;
  endfunction

  // one operation: apply, check the buses against the model, clock, update
  task automatic step(int k, logic [4:0] s, logic [4:0] t, logic [4:0] d, logic [15:0] im);
    logic [31:0] a, b, sx, zx, addr, wb;
    ctrl = ctrl_of(k); rs = s; rt = t; rd = d; imm16 = im;
    a  = regs[s]; b = regs[t];
    sx = 32'(signed'(im)); zx = {16'h0, im};
    #1;
    case (k)
      0: begin checks++; if (!(reg_we && reg_waddr == d && reg_wdata == a + b)) begin failures++; $display("add"); end end
      1: begin checks++; if (!(reg_we && reg_waddr == d && reg_wdata == a - b)) begin failures++; $display("sub"); end end
      2: begin checks++; if (!(reg_we && reg_waddr == t && reg_wdata == (a | zx))) begin failures++; $display("ori"); end end
      3: begin
           addr = a + sx; wb = mem[addr[7:2]];
           checks++; if (!(reg_we && reg_waddr == t && reg_wdata == wb)) begin
             failures++; $display("lw addr %h got %h exp %h", addr, reg_wdata, wb); end
         end
      4: begin
           addr = a + sx;
           checks++; if (!(mem_we && !reg_we && mem_addr == addr && mem_wdata == b)) begin failures++; $display("sw"); end
         end
      default: begin checks++; if (equal !== (a == b) || reg_we || mem_we) begin failures++; $display("beq"); end end
    endcase
    n_op[k]++;
    @(posedge clk);
    case (k)
      0: if (d != 0) regs[d] = a + b;
      1: if (d != 0) regs[d] = a - b;
      2: if (t != 0) regs[t] = a | zx;
      3: if (t != 0) regs[t] = mem[addr[7:2]];
      4: mem[addr[7:2]] = b;
      default: ;
    endcase
    #1;
  endtask

  initial begin
    rst = 1; ctrl = '0; rs = 0; rt = 0; rd = 0; imm16 = 0;
    @(posedge clk); #1 rst = 0;
    foreach (regs[i]) regs[i] = 0;
    for (int i = 0; i < DW; i++) step(4, 0, 0, 0, 16'(i * 4));  // clear memory with sw r0
    for (int i = 1; i < 32; i++) step(2, 0, i[4:0], 0, 16'($urandom));
    for (int n = 0; n < 6000; n++) begin
      int k;
      logic [4:0] s, t;
      k = $urandom % 6;
      s = 5'($urandom % 8); t = 5'($urandom % 8);
      if (k == 5 && n % 3 == 0) t = s;             // make Equal happen
      if (k >= 3 && k <= 4) s = ($urandom % 2) ? 5'd0 : s;
      step(k, s, t, 5'($urandom % 8), (k == 3 || k == 4) ? 16'(($urandom % 64) * 4) : 16'($urandom));
    end
    $display("ops add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
