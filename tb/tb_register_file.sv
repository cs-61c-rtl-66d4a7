// tb_register_file: self-checking test of the 32 x 32 register file against
// an array model. Random writes and reads on both ports; checks that reads
// are combinational, that a write lands only at the rising edge and only
// with we = 1, and that register 0 reads as zero.
module tb_register_file;
  int checks = 0, failures = 0;
  logic        clk, we;
  initial clk = 1'b0;
  logic [4:0]  ra, rb, rw;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];

  register_file #(.NREGS(32), .WIDTH(32)) dut (.clk, .we, .ra, .rb, .rw, .busw, .busa, .busb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (busa !== model[ra]) begin failures++; $display("FAIL busA r%0d=%h expected %h", ra, busa, model[ra]); end
    checks++;
    if (busb !== model[rb]) begin failures++; $display("FAIL busB r%0d=%h expected %h", rb, busb, model[rb]); end
  endtask

  initial begin
    // fill every register (register 0 write must be ignored)
    we = 1;
    for (int r = 0; r < 32; r++) begin
      rw = 5'(r); busw = $urandom;
      @(negedge clk);
      model[r] = (r == 0) ? 32'd0 : busw;
    end
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk); #1;
      we = 1'($urandom_range(0, 1)); rw = 5'($urandom); busw = $urandom;
      ra = (n % 5 == 0) ? rw : 5'($urandom); rb = 5'($urandom);
      #1;
      check_reads();                // old contents before the edge
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busw;
      check_reads();                // new contents after the edge
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
