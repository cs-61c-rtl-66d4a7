// mips_lite_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// Holds the instruction field layout (R-format: op/rs/rt/rd/shamt/funct,
// I-format: op/rs/rt/imm16), the opcode and funct values of the six
// instructions the CPU executes, the ALU operation type and the bundle of
// control points that the control unit drives into the datapath.
//
// The field layout is the MIPS one. The numeric opcode and funct values are
// the standard MIPS-I encodings; the ALU operation encoding and the bundling
// of control points into one struct are choices of this design.
package mips_lite_pkg;

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_BEQ   = 6'h04;

  // funct codes of R-format instructions (bits 5:0)
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;

  // R-format instruction word
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  // I-format instruction word
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm16;
  } itype_t;

  // ALUctr: the operations the MIPS-lite subset needs
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } alu_op_t;

  // Control points of the datapath
  typedef struct packed {
    logic    reg_dst;    // RegDst:   1 = write rd, 0 = write rt
    logic    reg_wr;     // RegWr:    register file write enable
    logic    alu_src;    // ALUSrc:   1 = extended immediate, 0 = busB
    alu_op_t alu_ctr;    // ALUctr
    logic    ext_op;     // ExtOp:    1 = sign extend, 0 = zero extend
    logic    mem_wr;     // MemWr:    data memory write enable
    logic    mem_to_reg; // MemtoReg: 1 = data memory output, 0 = ALU result
    logic    branch;     // Branch:   instruction is BEQ
  } ctrl_t;

  // All control points deasserted: the instruction changes nothing but the PC
  localparam ctrl_t CTRL_NOP = '{reg_dst: 1'b0, reg_wr: 1'b0, alu_src: 1'b0,
                                 alu_ctr: ALU_ADD, ext_op: 1'b0, mem_wr: 1'b0,
                                 mem_to_reg: 1'b0, branch: 1'b0};

endpackage
