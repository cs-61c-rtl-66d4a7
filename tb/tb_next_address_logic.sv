// tb_next_address_logic: self-checking test of the next-PC computation:
// PC + 4 unless branch and zero are both 1, then PC + 4 + 4 * displacement,
// with the displacement read as a signed 16-bit number.
module tb_next_address_logic;
  int checks = 0, failures = 0;
  logic [31:0] pc, next_pc;
  logic [15:0] imm16;
  logic        branch, zero;

  next_address_logic dut (.pc, .imm16, .branch, .zero, .next_pc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 800; n++) begin
      int disp;
      logic [31:0] e;
      pc = $urandom & 32'h7fff_fffc;
      imm16 = (n < 4) ? ((n[0]) ? 16'h8000 : 16'hffff) : 16'($urandom);
      branch = n[1]; zero = n[2];
      #1;
      disp = int'($signed(imm16));
      e = (branch && zero) ? 32'(int'(pc) + 4 + 4 * disp) : pc + 4;
      checks++;
      if (next_pc !== e) begin
        failures++;
        $display("FAIL pc=%h imm=%h br=%0b z=%0b next=%h expected %h", pc, imm16, branch, zero, next_pc, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
