// tb_extender: exhaustive test of the immediate extender: every 16-bit
// value with zero and with sign extension, against the value computed by
// arithmetic on integers.
module tb_extender;
  int checks = 0, failures = 0;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32;
  logic [31:0] expect_v;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int e = 0; e < 2; e++) begin
        imm16 = 16'(v); ext_op = e[0];
        #1;
        // sign extension: value as a signed 16-bit integer
        if (e == 1) expect_v = (v >= 32768) ? 32'(v - 65536) : 32'(v);
        else        expect_v = 32'(v);
        checks++;
        if (imm32 !== expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL imm16=%h ext_op=%0d imm32=%h", imm16, e, imm32);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
