// next_address_logic: computes the program counter of the next instruction.
//
// Sequential code goes to pc + 4. When the instruction is a branch (BEQ) and
// the ALU found its two registers equal (zero = 1), the next PC is
// pc + 4 + (sign-extended imm16 shifted left by two), i.e. the displacement
// counts instructions from the one after the branch. Purely combinational;
// its output is loaded into the PC at the end of the cycle. Built as two
// adders and a select, the plainest circuit for that register transfer.
module next_address_logic (
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic        branch,
  input  logic        zero,
  output logic [31:0] next_pc
);

  logic [31:0] pc_plus4;
  logic [31:0] target;

  always_comb begin
    pc_plus4 = pc + 32'd4;
    target   = pc_plus4 + {{14{imm16[15]}}, imm16, 2'b00};
    next_pc  = (branch && zero) ? target : pc_plus4;
  end

endmodule
