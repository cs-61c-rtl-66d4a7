// alu: the add/subtract/OR unit of the MIPS-lite datapath.
//
// result = a + b, a - b or a | b as aluctr selects (ADDU, SUBU/BEQ and ORI).
// Add and subtract wrap modulo 2^WIDTH with no overflow detection, as the
// unsigned MIPS instructions need. zero is 1 when result is all zeros; after a
// subtraction this is the equality test BEQ uses. Purely combinational: the
// outputs are valid one ALU delay after the inputs.
module alu
  import mips_lite_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_t          aluctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (aluctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
