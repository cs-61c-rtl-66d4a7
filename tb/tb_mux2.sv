// tb_mux2: self-checking test of the 2:1 multiplexor at 32 and 5 bits.
// Random inputs with both select values; the expected output is taken from
// the input named by sel.
module tb_mux2;
  int checks = 0, failures = 0;
  logic        sel;
  logic [31:0] a0, a1, y;
  logic [4:0]  b0, b1, z;

  mux2 #(.WIDTH(32)) dut32 (.sel, .in0(a0), .in1(a1), .out(y));
  mux2 #(.WIDTH(5))  dut5  (.sel, .in0(b0), .in1(b1), .out(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a0 = $urandom; a1 = $urandom; b0 = 5'($urandom); b1 = 5'($urandom);
      sel = n[0];
      #1;
      checks++;
      if (y !== (n[0] ? a1 : a0)) begin failures++; $display("FAIL 32-bit sel=%0b y=%h", sel, y); end
      checks++;
      if (z !== (n[0] ? b1 : b0)) begin failures++; $display("FAIL 5-bit sel=%0b z=%h", sel, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
