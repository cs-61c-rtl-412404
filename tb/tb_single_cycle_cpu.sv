// tb_single_cycle_cpu: end-to-end test of the single-cycle processor at its
// default sizes.
//
// Each program is loaded through the instruction-memory load port while
// reset is held, then run. An instruction-set model in this testbench
// executes the same program in step with the processor: every cycle it
// compares the PC, the register write (enable, number, value) and the memory
// write (enable, address, data) that the processor is about to perform, so
// one instruction must complete per clock.
//
// Program 0 is the array swap of two words v[k], v[k+1]:
//   lw $t0,0($2); lw $t1,4($2); sw $t1,0($2); sw $t0,4($2)
// and its result is read back with two loads.
// Programs 1.. begin with a loop that clears the whole data memory
// (sw, add, beq, j), so every later load has a known value, followed by
// random add, sub, ori, lw, sw, beq, j and undefined instructions.
// The mechanisms of the design are counted; one that never happened is a
// failure: each of the seven instructions, taken and untaken branches, a
// jump, a write to register 0 that is discarded, and an undefined opcode.
module tb_single_cycle_cpu;
  import cpu_pkg::*;
  localparam int unsigned IW = 1024;   // default instruction-memory words
  localparam int unsigned DW = 1024;   // default data-memory words
  localparam int NPROG  = 16;
  localparam int RUNCYC = 5000;
  localparam int START  = 6;           // first instruction after the clear loop

  logic        clk = 0, rst, prog_we;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data, pc, instruction, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instruction(instruction), .reg_we(reg_we), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] r_add(int d, int s, int t); return {OP_RTYPE, 5'(s), 5'(t), 5'(d), 5'd0, FN_ADD}; endfunction
  function automatic logic [31:0] r_sub(int d, int s, int t); return {OP_RTYPE, 5'(s), 5'(t), 5'(d), 5'd0, FN_SUB}; endfunction
  function automatic logic [31:0] i_ori(int t, int s, int im); return {OP_ORI, 5'(s), 5'(t), 16'(im)}; endfunction
  function automatic logic [31:0] i_lw (int t, int s, int im); return {OP_LW,  5'(s), 5'(t), 16'(im)}; endfunction
  function automatic logic [31:0] i_sw (int t, int s, int im); return {OP_SW,  5'(s), 5'(t), 16'(im)}; endfunction
  function automatic logic [31:0] i_beq(int s, int t, int im); return {OP_BEQ, 5'(s), 5'(t), 16'(im)}; endfunction
  function automatic logic [31:0] j_j  (int word);             return {OP_J, 26'(word)}; endfunction

  // ---------------- instruction-set model ----------------
  logic [31:0] prog [IW];
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [DW];
  logic [31:0] m_pc;

  typedef enum int {C_ADD, C_SUB, C_ORI, C_LW, C_SW, C_BEQ_T, C_BEQ_N, C_J, C_R0, C_UNDEF, C_N} cov_e;
  int cov [C_N];
  string cov_name [C_N] = '{"add", "sub", "ori", "lw", "sw", "beq taken", "beq not taken",
                            "jump", "write to r0 discarded", "undefined opcode"};

  // compare the processor's cycle with the model, then advance the model
  task automatic model_step();
    logic [31:0] ins, a, b, sx, zx, addr;
    logic [5:0]  op, fn;
    logic [4:0]  s, t, d;
    logic        exp_rwe, exp_mwe;
    logic [4:0]  exp_rw;
    logic [31:0] exp_rd, exp_ma, exp_md, npc;
    ins = prog[m_pc[11:2]];
    op = ins[31:26]; fn = ins[5:0]; s = ins[25:21]; t = ins[20:16]; d = ins[15:11];
    a = m_regs[s]; b = m_regs[t];
    sx = 32'(signed'(ins[15:0])); zx = {16'h0, ins[15:0]};
    exp_rwe = 0; exp_mwe = 0; exp_rw = 0; exp_rd = 0; exp_ma = 0; exp_md = 0;
    npc = m_pc + 4;
    if (op == OP_RTYPE && fn == FN_ADD) begin
      exp_rwe = 1; exp_rw = d; exp_rd = a + b; cov[C_ADD]++;
    end else if (op == OP_RTYPE && fn == FN_SUB) begin
      exp_rwe = 1; exp_rw = d; exp_rd = a - b; cov[C_SUB]++;
    end else if (op == OP_ORI) begin
      exp_rwe = 1; exp_rw = t; exp_rd = a | zx; cov[C_ORI]++;
    end else if (op == OP_LW) begin
      addr = a + sx; exp_rwe = 1; exp_rw = t; exp_rd = m_mem[addr[11:2]]; cov[C_LW]++;
    end else if (op == OP_SW) begin
      addr = a + sx; exp_mwe = 1; exp_ma = addr; exp_md = b; cov[C_SW]++;
    end else if (op == OP_BEQ) begin
      if (a == b) begin npc = m_pc + 4 + (sx << 2); cov[C_BEQ_T]++; end
      else cov[C_BEQ_N]++;
    end else if (op == OP_J) begin
      npc = {m_pc[31:28], ins[25:0], 2'b00}; cov[C_J]++;
    end else begin
      cov[C_UNDEF]++;
    end
    if (exp_rwe && exp_rw == 0) cov[C_R0]++;

    checks++;
    if (pc !== m_pc || instruction !== ins) begin
      failures++; $display("cycle %0d: pc %h ins %h, model pc %h ins %h", cycles, pc, instruction, m_pc, ins);
    end
    checks++;
    if (reg_we !== exp_rwe || (exp_rwe && (reg_waddr !== exp_rw || reg_wdata !== exp_rd))) begin
      failures++; $display("cycle %0d pc %h: reg write %b r%0d=%h, model %b r%0d=%h",
                           cycles, m_pc, reg_we, reg_waddr, reg_wdata, exp_rwe, exp_rw, exp_rd);
    end
    checks++;
    if (mem_we !== exp_mwe || (exp_mwe && (mem_addr !== exp_ma || mem_wdata !== exp_md))) begin
      failures++; $display("cycle %0d pc %h: mem write %b [%h]=%h, model %b [%h]=%h",
                           cycles, m_pc, mem_we, mem_addr, mem_wdata, exp_mwe, exp_ma, exp_md);
    end
    if (exp_rwe && exp_rw != 0) m_regs[exp_rw] = exp_rd;
    if (exp_mwe) m_mem[exp_ma[11:2]] = exp_md;
    m_pc = npc;
  endtask

  // load prog[] with reset held, then release reset
  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < IW; i++) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
    rst = 0;
    m_pc = 0;
    foreach (m_regs[i]) m_regs[i] = 0;
  endtask

  task automatic run(int n);
    for (int c = 0; c < n; c++) begin
      model_step();
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  // random instruction for the word at index idx (branches go forward and
  // stay inside the memory; jump targets lie in [START, IW))
  function automatic logic [31:0] rand_inst(int idx);
    int k, s, t, d, off, tgt;
    k = $urandom % 20;
    s = $urandom % 8; t = $urandom % 8; d = $urandom % 8;
    case (k)
      0, 1, 2:    return r_add(d, s, t);
      3, 4:       return r_sub(d, s, t);
      5, 6, 7:    return i_ori(t, s, $urandom);
      8, 9, 10:   return i_lw(t, ($urandom % 2) ? 0 : s, ($urandom % 128) * 4);
      11, 12, 13: return i_sw(t, ($urandom % 2) ? 0 : s, ($urandom % 128) * 4);
      14, 15, 16: begin
        off = int'($urandom % 10);   // forward only, so no program spins in a loop
        if (idx + 1 + off >= IW)   off = IW - 1 - idx - 1;
        if ($urandom % 2) t = s;   // equal operands now and then
        return i_beq(s, t, off);
      end
      17:      begin tgt = START + int'($urandom % (IW - START)); return j_j(tgt); end
      18:      return {6'b00_1000, 26'($urandom)};          // opcode outside the subset
      default: return {OP_RTYPE, 15'($urandom), 5'd0, 6'b10_0100};  // function code outside the subset
    endcase
  endfunction

  initial begin
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    foreach (m_mem[i]) m_mem[i] = 0;

    // ---------- program 0: swap v[k] and v[k+1] ----------
    foreach (prog[i]) prog[i] = 32'hFFFF_FFFF;        // undefined: a no-op
    prog[0]  = i_ori(2, 0, 16'h0100);                 // $2 = &v[k]
    prog[1]  = i_ori(3, 0, 16'h1234);
    prog[2]  = i_ori(4, 0, 16'hABCD);
    prog[3]  = i_sw(3, 2, 0);                         // v[k]   = 0x1234
    prog[4]  = i_sw(4, 2, 4);                         // v[k+1] = 0xABCD
    prog[5]  = i_lw(8, 2, 0);                         // lw $t0, 0($2)
    prog[6]  = i_lw(9, 2, 4);                         // lw $t1, 4($2)
    prog[7]  = i_sw(9, 2, 0);                         // sw $t1, 0($2)
    prog[8]  = i_sw(8, 2, 4);                         // sw $t0, 4($2)
    prog[9]  = i_lw(10, 2, 0);
    prog[10] = i_lw(11, 2, 4);
    prog[11] = j_j(11);                               // stop: jump to self
    load_and_reset();
    run(10);
    checks++;
    if (!(reg_we && reg_waddr == 11 && reg_wdata == 32'h1234)) begin failures++; $display("swap: v[k+1] wrong"); end
    run(1);
    checks++;
    if (m_regs[10] != 32'hABCD || m_regs[11] != 32'h1234) begin failures++; $display("swap: model disagrees"); end
    run(20);                                          // spin on the jump

    // ---------- random programs ----------
    for (int p = 1; p <= NPROG; p++) begin
      prog[0] = i_ori(3, 0, DW * 4);                  // $3 = data-memory size in bytes
      prog[1] = i_ori(2, 0, 4);                       // $2 = 4
      prog[2] = i_sw(0, 1, 0);                        // loop: Mem[$1] = 0
      prog[3] = r_add(1, 1, 2);                       //       $1 += 4
      prog[4] = i_beq(1, 3, 1);                       //       done?
      prog[5] = j_j(2);
      for (int i = START; i < IW; i++) prog[i] = rand_inst(i);
      load_and_reset();
      foreach (m_mem[i]) m_mem[i] = $urandom;         // the memory is not reset: the loop clears it
      run(3 + 4 * DW);                                // the clear loop
      for (int i = 0; i < DW; i++) begin
        checks++;
        if (m_mem[i] != 0) begin failures++; $display("clear loop missed word %0d", i); break; end
      end
      run(RUNCYC);
    end

    for (int c = 0; c < C_N; c++) begin
      $display("%-24s %0d", cov_name[c], cov[c]);
      checks++;
      if (cov[c] == 0) begin failures++; $display("mechanism never exercised: %s", cov_name[c]); end
    end
    $display("cycles run: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
