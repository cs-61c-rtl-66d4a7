// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite CPU at its
// default sizes (no parameter overrides).
//
// The testbench loads a program through the instruction-memory write port
// while reset is held, then runs the CPU one instruction per clock next to
// an instruction-set model written here from the register-transfer
// definitions (ADDU, SUBU, ORI, LW, SW, BEQ; any other word is a no-op).
// Every cycle it compares PC and instruction; after every edge it compares
// all 32 registers, and at the end the whole data memory.
//
// Program 1 is a directed one: it builds an array, swaps two of its words
// with the four-instruction load/load/store/store sequence of the swap
// example (temp = v[k]; v[k] = v[k+1]; v[k+1] = temp), then sums a
// count-down loop closed by BEQ. Program 2 is random: random register
// numbers, immediates and data addresses, short forward branches, ending in
// a branch-to-self. Each mechanism of the design is counted: every
// instruction type, BEQ taken and not taken, backward branch, a register
// written through rd (RegDst=1) and rt (RegDst=0), sign extension of a
// negative offset, zero extension of an immediate with bit 15 set, an
// ignored write to register 0, and an undecoded word acting as a no-op. A
// mechanism that never happened counts as a failure. Also checked: exactly
// one instruction completes per clock (CPI = 1).
module tb_mips_lite_cpu;
  int checks = 0, failures = 0;

  logic        clk, rst;
  logic        imem_we;
  logic [31:0] imem_addr, imem_wdata;
  logic [31:0] pc, instr;

  mips_lite_cpu dut (.clk, .rst, .imem_we, .imem_addr, .imem_wdata, .pc, .instr);

  localparam int IW = 1024;   // default instruction memory words
  localparam int DW = 1024;   // default data memory words

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction-set model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_r   [32];
  logic [31:0] m_mem [DW];
  logic [31:0] prog  [IW];

  // mechanism counters
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_beq_back;
  int n_rd_dest, n_rt_dest, n_neg_off, n_ori_hi, n_r0_write, n_nop;

  function automatic logic [31:0] sx(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic int widx(logic [31:0] a);
    return int'(a[11:2]);    // DW = 1024 words, byte addresses, wrap
  endfunction

  task automatic model_step();
    logic [31:0] w, a, nxt;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd;
    logic [15:0] imm;
    w = prog[m_pc[11:2]];
    op = w[31:26]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11]; fn = w[5:0]; imm = w[15:0];
    nxt = m_pc + 4;
    if (op == 6'h00 && fn == 6'h21) begin
      n_addu++; n_rd_dest++; if (rd == 0) n_r0_write++;
      if (rd != 0) m_r[rd] = m_r[rs] + m_r[rt];
    end else if (op == 6'h00 && fn == 6'h23) begin
      n_subu++; n_rd_dest++; if (rd == 0) n_r0_write++;
      if (rd != 0) m_r[rd] = m_r[rs] - m_r[rt];
    end else if (op == 6'h0D) begin
      n_ori++; n_rt_dest++; if (imm[15]) n_ori_hi++; if (rt == 0) n_r0_write++;
      if (rt != 0) m_r[rt] = m_r[rs] | {16'd0, imm};
    end else if (op == 6'h23) begin
      n_lw++; n_rt_dest++; if (imm[15]) n_neg_off++; if (rt == 0) n_r0_write++;
      a = m_r[rs] + sx(imm);
      if (rt != 0) m_r[rt] = m_mem[widx(a)];
    end else if (op == 6'h2B) begin
      n_sw++; if (imm[15]) n_neg_off++;
      a = m_r[rs] + sx(imm);
      m_mem[widx(a)] = m_r[rt];
    end else if (op == 6'h04) begin
      if (m_r[rs] == m_r[rt]) begin
        if (w != HALT) begin
          n_beq_t++; if (imm[15]) n_beq_back++;
        end
        nxt = m_pc + 4 + {sx(imm)[29:0], 2'b00};
      end else n_beq_nt++;
    end else begin
      n_nop++;
    end
    m_pc = nxt;
  endtask

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h23};
  endfunction
  function automatic logic [31:0] ori(int rt, int rs, int imm);
    return {6'h0D, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] lw(int rt, int imm, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] sw(int rt, int imm, int rs);
    return {6'h2B, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] beq(int rs, int rt, int off);
    return {6'h04, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  localparam logic [31:0] HALT = {6'h04, 5'd0, 5'd0, 16'hFFFF};  // beq r0, r0, -1

  // ---------------- checks ----------------
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h expected %h (model pc %h)", what, got, exp, m_pc);
    end
  endtask

  task automatic check_regs();
    for (int r = 1; r < 32; r++) check($sformatf("r%0d", r), dut.u_dp.u_rf.regs[r], m_r[r]);
    if (instr[25:21] == 5'd0) check("r0 reads zero", dut.u_dp.u_rf.busa, 32'd0);
  endtask

  // load prog[] into instruction memory under reset, sync the model
  task automatic load_and_reset();
    rst = 1;
    imem_we = 1;
    for (int k = 0; k < IW; k++) begin
      imem_addr = 32'(k * 4); imem_wdata = prog[k];
      @(posedge clk); #1;
    end
    imem_we = 0; imem_addr = 0; imem_wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    // registers and data memory are not reset: start the model from the
    // state the CPU holds now
    m_pc = 0;
    m_r[0] = 0;
    for (int r = 1; r < 32; r++) m_r[r] = dut.u_dp.u_rf.regs[r];
    for (int k = 0; k < DW; k++) m_mem[k] = dut.u_dmem.mem[k];
    check("PC after reset", pc, 32'h0);
  endtask

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      check("pc", pc, m_pc);
      check("instr", instr, prog[m_pc[11:2]]);
      model_step();
      @(posedge clk); #1;
      check("pc advanced in one clock", pc, m_pc);
      check_regs();
    end
    for (int k = 0; k < DW; k++) check($sformatf("mem[%0d]", k), dut.u_dmem.mem[k], m_mem[k]);
  endtask

  int p;
  initial begin
    rst = 1; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    {n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_beq_back} = '0;
    {n_rd_dest, n_rt_dest, n_neg_off, n_ori_hi, n_r0_write, n_nop} = '0;

    // ---------- program 1: array setup, swap, count-down loop ----------
    foreach (prog[k]) prog[k] = HALT;
    p = 0;
    prog[p++] = ori(2, 0, 32'h0100);      // $2 = &v[k]  (byte address 0x100)
    prog[p++] = ori(8, 0, 32'h1111);
    prog[p++] = ori(9, 0, 32'hA222);      // bit 15 set: zero extension
    prog[p++] = sw(8, 0, 2);              // v[k]   = 0x1111
    prog[p++] = sw(9, 4, 2);              // v[k+1] = 0xA222
    // swap: temp = v[k]; v[k] = v[k+1]; v[k+1] = temp
    prog[p++] = lw(8, 0, 2);              // lw $t0, 0($2)
    prog[p++] = lw(9, 4, 2);              // lw $t1, 4($2)
    prog[p++] = sw(9, 0, 2);              // sw $t1, 0($2)
    prog[p++] = sw(8, 4, 2);              // sw $t0, 4($2)
    prog[p++] = lw(10, -4, 2);      // negative offset: word below v[k]
    // sum = 5 + 4 + 3 + 2 + 1
    prog[p++] = ori(5, 0, 5);             // n
    prog[p++] = ori(6, 0, 1);             // one
    prog[p++] = subu(7, 7, 7);            // sum = 0
    prog[p++] = addu(7, 7, 5);            // loop: sum += n
    prog[p++] = subu(5, 5, 6);            //       n -= 1
    prog[p++] = beq(5, 0, 1);             //       if n == 0 exit
    prog[p++] = beq(0, 0, -4);            //       goto loop
    prog[p++] = sw(7, 8, 2);              // exit: v[k+2] = sum
    prog[p++] = ori(0, 0, 32'h7777);      // write to register 0 is ignored
    prog[p++] = addu(0, 7, 7);            // likewise through rd
    prog[p++] = 32'h0000_0000;            // undecoded word: no-op
    prog[p++] = 32'hFC00_0000;            // undecoded opcode: no-op
    prog[p++] = addu(11, 0, 7);
    load_and_reset();
    run(p + 3 * 5 + 10);
    check("swap: v[k] holds old v[k+1]", dut.u_dmem.mem[64], 32'h0000_A222);
    check("swap: v[k+1] holds old v[k]", dut.u_dmem.mem[65], 32'h0000_1111);
    check("loop sum", dut.u_dmem.mem[66], 32'd15);
    check("halted at branch-to-self", pc, 32'(4 * p));

    // ---------- program 2: random instruction mix ----------
    foreach (prog[k]) prog[k] = HALT;
    for (p = 0; p < 700; p++) begin
      int kind, r1, r2, r3;
      kind = $urandom_range(0, 9);
      r1 = $urandom_range(0, 31); r2 = $urandom_range(0, 31); r3 = $urandom_range(0, 31);
      case (kind)
        0, 1: prog[p] = addu(r1, r2, r3);
        2:    prog[p] = subu(r1, r2, r3);
        3, 4: prog[p] = ori(r1, r2, $urandom_range(0, 32'hFFFF));
        5:    prog[p] = lw(r1, $urandom_range(0, 32'hFFFF), r2);
        6:    prog[p] = sw(r1, $urandom_range(0, 32'hFFFF), r2);
        7:    prog[p] = beq(r2, ($urandom_range(0, 1) == 1) ? r2 : r3, $urandom_range(0, 3));
        8:    prog[p] = subu(r1, r2, r2);   // make zeros, so BEQ sees equal operands
        default: prog[p] = ori(r1, 0, $urandom_range(0, 7));
      endcase
    end
    load_and_reset();
    run(760);
    check("program 2 halted", pc, 32'(4 * 700));

    // ---------- mechanisms ----------
    begin
      int counts [14];
      string names [14];
      counts = '{n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_beq_back,
                          n_rd_dest, n_rt_dest, n_neg_off, n_ori_hi, n_r0_write, n_nop};
      names = '{"ADDU", "SUBU", "ORI", "LW", "SW", "BEQ taken", "BEQ not taken",
                            "backward branch", "RegDst=rd", "RegDst=rt", "negative offset",
                            "ORI imm bit15", "write to r0", "undecoded no-op"};
      for (int k = 0; k < 14; k++) begin
        $display("mechanism %-16s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
