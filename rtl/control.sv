// control: main control of the single-cycle MIPS-lite CPU.
//
// Decodes the opcode and, for R-format words, the funct field into the
// datapath's control points so that each instruction performs its register
// transfer in one cycle:
//   ADDU  R[rd] <- R[rs] + R[rt]              RegDst=1 RegWr=1 ALUSrc=0 ADD
//   SUBU  R[rd] <- R[rs] - R[rt]              RegDst=1 RegWr=1 ALUSrc=0 SUB
//   ORI   R[rt] <- R[rs] | zero_ext(imm16)    RegDst=0 RegWr=1 ALUSrc=1 OR  ExtOp=0
//   LW    R[rt] <- MEM[R[rs] + sign_ext(imm)] RegDst=0 RegWr=1 ALUSrc=1 ADD ExtOp=1 MemtoReg=1
//   SW    MEM[R[rs] + sign_ext(imm)] <- R[rt] ALUSrc=1 ADD ExtOp=1 MemWr=1
//   BEQ   branch if R[rs] == R[rt]            ALUSrc=0 SUB ExtOp=1 Branch=1
// Purely combinational. Any other opcode or funct deasserts every control
// point, so the word acts as a no-op; that and the opcode values (the MIPS-I
// ones) are choices of this design. An assertion states the rule that ties
// the state writes together: an instruction writes at most one of register
// file and data memory, and a branch writes neither.
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.ext_op  = 1'b1;
        ctrl.branch  = 1'b1;
      end
      default: ;
    endcase
  end

  always_comb begin
    assert (!(ctrl.reg_wr && ctrl.mem_wr) && !(ctrl.branch && (ctrl.reg_wr || ctrl.mem_wr)))
      else $error("control: conflicting state writes for op %h funct %h", op, funct);
  end

endmodule
