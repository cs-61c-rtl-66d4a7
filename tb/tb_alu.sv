// tb_alu: self-checking test of the add/subtract/OR unit and its zero flag.
// Corner values and random operands for each operation; equal operands
// under subtraction must raise zero (the BEQ equality test).
module tb_alu;
  import mips_lite_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result;
  logic        zero;
  alu_op_t     op;

  alu #(.WIDTH(32)) dut (.a, .b, .aluctr(op), .result, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] y, alu_op_t o);
    longint unsigned e;
    a = x; b = y; op = o;
    #1;
    case (o)
      ALU_ADD: e = (longint'(x) + longint'(y)) % 64'h1_0000_0000;
      ALU_SUB: e = (longint'(x) + 64'h1_0000_0000 - longint'(y)) % 64'h1_0000_0000;
      default: e = {32'd0, x | y};
    endcase
    checks++;
    if (result !== e[31:0]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h result=%h expected %h", o.name(), x, y, result, e[31:0]);
    end
    checks++;
    if (zero !== (e[31:0] == 0)) begin
      failures++;
      $display("FAIL zero op=%s a=%h b=%h zero=%0b", o.name(), x, y, zero);
    end
  endtask

  initial begin
    static logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_ffff};
    foreach (corners[i]) foreach (corners[j]) begin
      run(corners[i], corners[j], ALU_ADD);
      run(corners[i], corners[j], ALU_SUB);
      run(corners[i], corners[j], ALU_OR);
    end
    for (int n = 0; n < 300; n++) begin
      logic [31:0] x;
      x = $urandom;
      run(x, $urandom, ALU_ADD);
      run(x, $urandom, ALU_SUB);
      run(x, x, ALU_SUB);            // equal operands: zero must be 1
      run(x, $urandom, ALU_OR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
