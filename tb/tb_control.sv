// tb_control: self-checking test of the main control decoder. The expected
// control points of each instruction are written out here as a table
// derived from the register transfer of the instruction; every other
// opcode, and R-format words with other funct codes, must deassert
// everything.
module tb_control;
  import mips_lite_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] op, funct;
  ctrl_t      ctrl;

  control dut (.op, .funct, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {RegDst, RegWr, ALUSrc, ALUctr, ExtOp, MemWr, MemtoReg, Branch}
  task automatic expect_ctrl(string name, logic rd, logic rw, logic as, alu_op_t ac,
                             logic eo, logic mw, logic mr, logic br, bit care_ext, bit care_alu);
    checks++;
    if (ctrl.reg_dst !== rd || ctrl.reg_wr !== rw || ctrl.alu_src !== as ||
        (care_alu && ctrl.alu_ctr !== ac) || (care_ext && ctrl.ext_op !== eo) ||
        ctrl.mem_wr !== mw || ctrl.mem_to_reg !== mr || ctrl.branch !== br) begin
      failures++;
      $display("FAIL %s op=%h funct=%h ctrl=%p", name, op, funct, ctrl);
    end
  endtask

  initial begin
    for (int oi = 0; oi < 64; oi++) begin
      for (int fi = 0; fi < 64; fi++) begin
        logic [5:0] o, f;
        o = 6'(oi); f = 6'(fi);
        op = o; funct = f;
        #1;
        if (o == 6'h00 && f == 6'h21)      expect_ctrl("ADDU", 1, 1, 0, ALU_ADD, 0, 0, 0, 0, 0, 1);
        else if (o == 6'h00 && f == 6'h23) expect_ctrl("SUBU", 1, 1, 0, ALU_SUB, 0, 0, 0, 0, 0, 1);
        else if (o == 6'h0D)               expect_ctrl("ORI",  0, 1, 1, ALU_OR,  0, 0, 0, 0, 1, 1);
        else if (o == 6'h23)               expect_ctrl("LW",   0, 1, 1, ALU_ADD, 1, 0, 1, 0, 1, 1);
        else if (o == 6'h2B)               expect_ctrl("SW",   0, 0, 1, ALU_ADD, 1, 1, 0, 0, 1, 1);
        else if (o == 6'h04)               expect_ctrl("BEQ",  0, 0, 0, ALU_SUB, 1, 0, 0, 1, 1, 1);
        else                               expect_ctrl("other", 0, 0, 0, ALU_ADD, 0, 0, 0, 0, 0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
