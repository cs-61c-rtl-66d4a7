// tb_ideal_memory: self-checking test of the idealized memory at a small
// size. Writes happen only at a rising edge with we = 1; reads follow the
// address without a clock; the low two address bits are ignored.
module tb_ideal_memory;
  int checks = 0, failures = 0;
  localparam int W = 64;
  logic        clk, we;
  initial clk = 1'b0;
  logic [31:0] addr, din, dout;
  logic [31:0] model [W];

  ideal_memory #(.WORDS(W)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int w = 0; w < W; w++) begin
      addr = 32'(w * 4); din = $urandom;
      @(posedge clk); #1;
      model[w] = din;
    end
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      int w;
      w = $urandom_range(0, W - 1);
      we = 1'($urandom_range(0, 1));
      addr = 32'(w * 4) | 32'($urandom_range(0, 3));
      din = $urandom;
      #1;
      checks++;                        // combinational read, before the edge
      if (dout !== model[w]) begin failures++; $display("FAIL read w=%0d %h expected %h", w, dout, model[w]); end
      @(posedge clk); #1;
      if (we) model[w] = din;
      checks++;
      if (dout !== model[w]) begin failures++; $display("FAIL after edge w=%0d %h expected %h", w, dout, model[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
