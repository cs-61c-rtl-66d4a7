// extender: widens the 16-bit immediate field to 32 bits.
//
// With ext_op = 0 the upper 16 bits are zero (zero extension, used by ORI);
// with ext_op = 1 they are copies of imm16[15] (sign extension, used by LW,
// SW and BEQ). Purely combinational. The polarity of ext_op is a choice of
// this design.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
