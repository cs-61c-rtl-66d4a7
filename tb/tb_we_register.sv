// tb_we_register: self-checking test of the write-enabled register.
// Checks the reset value, that q follows d only at a rising edge with
// we = 1, that it holds with we = 0, and that q does not change between
// edges.
module tb_we_register;
  int checks = 0, failures = 0;
  logic        clk, rst, we;
  initial clk = 1'b0;
  logic [31:0] d, q, expect_q;

  we_register #(.WIDTH(32), .RESET_VALUE(32'h0040_0000)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, expect_q);
    end
  endtask

  initial begin
    rst = 1; we = 1; d = 32'hdead_beef;
    @(posedge clk); #1;
    expect_q = 32'h0040_0000; check("reset");
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      we = ($urandom_range(0, 2) != 0);
      d  = $urandom;
      #2;
      check("between edges");
      @(posedge clk); #1;
      if (we) expect_q = d;
      check(we ? "load" : "hold");
    end
    rst = 1; @(posedge clk); #1; expect_q = 32'h0040_0000; check("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
