// datapath: single-cycle MIPS-lite datapath.
//
// One instruction passes through it per clock. The PC (a we_register that is
// written every cycle) addresses the instruction memory outside; the fields
// of the returned word select the registers: rs drives RA, rt drives RB, and
// the RegDst multiplexor picks rd or rt for RW. The ALUSrc multiplexor feeds
// the ALU either busB or the extender's 32-bit immediate. The ALU result is
// the data memory address; busB is the data memory's Data In. The MemtoReg
// multiplexor returns the ALU result or the data memory output on busW. The
// next-address logic adds 4 to the PC, or takes the branch target when the
// control asserts Branch and the ALU (subtracting) reports zero.
//
// Timing: everything between the PC and the register file/data memory
// write is combinational, so the clock period must cover PC clock-to-q,
// instruction memory access, control, register file access, ALU (and data
// memory access for LW) plus setup. PC, register file and data memory all
// update on the same rising edge.
module datapath
  import mips_lite_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [31:0] instr,
  output logic [31:0] pc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata
);

  rtype_t      r;
  itype_t      i;
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw;
  logic [31:0] imm32, alu_b, alu_result;
  logic        zero;
  logic [31:0] next_pc;

  always_comb begin
    r = rtype_t'(instr);
    i = itype_t'(instr);
  end

  // Instruction fetch: PC and next-address logic
  we_register #(.WIDTH(32), .RESET_VALUE(32'd0)) u_pc (
    .clk, .rst, .we(1'b1), .d(next_pc), .q(pc)
  );

  next_address_logic u_nal (
    .pc, .imm16(i.imm16), .branch(ctrl.branch), .zero, .next_pc
  );

  // Register file and its destination select
  mux2 #(.WIDTH(5)) u_regdst_mux (
    .sel(ctrl.reg_dst), .in0(r.rt), .in1(r.rd), .out(rw)
  );

  register_file #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .we(ctrl.reg_wr), .ra(r.rs), .rb(r.rt), .rw, .busw, .busa, .busb
  );

  // Execute
  extender u_ext (.imm16(i.imm16), .ext_op(ctrl.ext_op), .imm32);

  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .sel(ctrl.alu_src), .in0(busb), .in1(imm32), .out(alu_b)
  );

  alu #(.WIDTH(32)) u_alu (
    .a(busa), .b(alu_b), .aluctr(ctrl.alu_ctr), .result(alu_result), .zero
  );

  // Memory and write back
  always_comb begin
    dmem_addr  = alu_result;
    dmem_wdata = busb;
  end

  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .in0(alu_result), .in1(dmem_rdata), .out(busw)
  );

endmodule
