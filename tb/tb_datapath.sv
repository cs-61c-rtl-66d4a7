// tb_datapath: self-checking test of the single-cycle datapath with the
// control points driven by the testbench, not by the control unit. The
// testbench plays instruction memory (it supplies each word) and data
// memory (an array it reads combinationally and writes at the edge). A
// short sequence exercises every path: ORI (zero extension, rt written),
// ADDU and SUBU (rd written), SW (busB to Data In, address from the ALU),
// LW (MemtoReg, negative offset), BEQ taken and not taken, and checks PC,
// register and memory contents after each cycle.
module tb_datapath;
  import mips_lite_pkg::*;
  int checks = 0, failures = 0;
  logic        clk, rst;
  ctrl_t       ctrl;
  logic [31:0] instr, pc, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] dmem [64];

  datapath dut (.clk, .rst, .ctrl, .instr, .pc, .dmem_addr, .dmem_wdata, .dmem_rdata);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  always_comb dmem_rdata = dmem[dmem_addr[7:2]];
  always_ff @(posedge clk) if (ctrl.mem_wr) dmem[dmem_addr[7:2]] <= dmem_wdata;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic ctrl_t c(logic rd, logic rw, logic as, alu_op_t ac, logic eo,
                              logic mw, logic mr, logic br);
    return '{reg_dst: rd, reg_wr: rw, alu_src: as, alu_ctr: ac, ext_op: eo,
             mem_wr: mw, mem_to_reg: mr, branch: br};
  endfunction

  // one instruction: drive word and control points, let the edge pass
  task automatic step(logic [31:0] w, ctrl_t cc);
    instr = w; ctrl = cc;
    @(posedge clk); #1;
  endtask

  // R-format word; the funct field does not matter here, the testbench
  // supplies the control points itself
  function automatic logic [31:0] rfmt(logic [4:0] rs, logic [4:0] rt, logic [4:0] rd);
    return {6'h00, rs, rt, rd, 5'd0, 6'h21};
  endfunction
  function automatic logic [31:0] ifmt(logic [5:0] op, logic [4:0] rs, logic [4:0] rt, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  initial begin
    foreach (dmem[k]) dmem[k] = 32'(k) * 32'h0101_0101;
    ctrl = CTRL_NOP; instr = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    check("PC after reset", pc, 32'h0);

    // ORI r1 = r0 | 0x8004 (zero extension: upper half stays 0)
    step(ifmt(6'h0D, 0, 1, 16'h8004), c(0, 1, 1, ALU_OR, 0, 0, 0, 0));
    check("PC after ORI", pc, 32'h4);
    check("r1 via busA", dut.u_rf.regs[1], 32'h0000_8004);
    // ORI r2 = r0 | 0x0010
    step(ifmt(6'h0D, 0, 2, 16'h0010), c(0, 1, 1, ALU_OR, 0, 0, 0, 0));
    // ADDU r3 = r1 + r2
    step(rfmt(1, 2, 3), c(1, 1, 0, ALU_ADD, 0, 0, 0, 0));
    check("ADDU r3", dut.u_rf.regs[3], 32'h0000_8014);
    check("ADDU leaves rt", dut.u_rf.regs[2], 32'h0000_0010);
    // SUBU r4 = r2 - r1 (wraps negative)
    step(rfmt(2, 1, 4), c(1, 1, 0, ALU_SUB, 0, 0, 0, 0));
    check("SUBU r4", dut.u_rf.regs[4], 32'hFFFF_800C);
    // SW r3 -> MEM[r2 + 8] = word 6
    instr = ifmt(6'h2B, 2, 3, 16'h0008); ctrl = c(0, 0, 1, ALU_ADD, 1, 1, 0, 0);
    #1;
    check("SW address", dmem_addr, 32'h18);
    check("SW data in", dmem_wdata, 32'h0000_8014);
    @(posedge clk); #1;
    check("SW memory", dmem[6], 32'h0000_8014);
    // LW r5 = MEM[r2 + (-8)] = word 2 (negative offset, sign extension)
    step(ifmt(6'h23, 2, 5, 16'hFFF8), c(0, 1, 1, ALU_ADD, 1, 0, 1, 0));
    check("LW r5", dut.u_rf.regs[5], 32'h0202_0202);
    check("PC before BEQ", pc, 32'h18);
    // BEQ r1, r2 not taken
    step(ifmt(6'h04, 1, 2, 16'h0005), c(0, 0, 0, ALU_SUB, 1, 0, 0, 1));
    check("BEQ not taken", pc, 32'h1C);
    // BEQ r2, r2 taken forward by 5 instructions
    step(ifmt(6'h04, 2, 2, 16'h0005), c(0, 0, 0, ALU_SUB, 1, 0, 0, 1));
    check("BEQ taken forward", pc, 32'h1C + 4 + 20);
    // BEQ r0, r0 taken backward by 3 instructions
    step(ifmt(6'h04, 0, 0, 16'hFFFD), c(0, 0, 0, ALU_SUB, 1, 0, 0, 1));
    check("BEQ taken backward", pc, 32'h34 + 4 - 12);
    // write to r0 is ignored
    step(ifmt(6'h0D, 0, 0, 16'h1234), c(0, 1, 1, ALU_OR, 0, 0, 0, 0));
    instr = rfmt(0, 0, 6); ctrl = c(1, 1, 0, ALU_ADD, 0, 0, 0, 0);
    #1;
    check("r0 reads zero", dut.u_rf.busa, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
