// mips_lite_cpu: single-cycle MIPS-lite computer.
//
// Executes ADDU, SUBU, ORI, LW, SW and BEQ, each in exactly one clock cycle.
// The processor is a control unit and a datapath; beside it sit a separate
// instruction memory and data memory, so an instruction can be fetched and a
// word loaded or stored in the same cycle. All state (PC, registers, data
// memory) is written on the same rising clock edge.
//
// Ports: clk; rst (synchronous, active high, sets PC to 0); pc and instr show
// the instruction executing in the current cycle. Programs are placed in the
// instruction memory through its write port (imem_we, imem_addr as a byte
// address, imem_wdata; written at the rising edge, normally while rst is
// held) or by a $readmemh image (IMEM_INIT). Memory sizes, the reset, the
// program-load port and the observation ports are choices of this design.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter string       IMEM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  ctrl_t       ctrl;
  logic [31:0] imem_port_addr;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;

  // The instruction memory has one address port: the loader owns it while
  // writing, the PC otherwise.
  mux2 #(.WIDTH(32)) u_imem_addr_mux (
    .sel(imem_we), .in0(pc), .in1(imem_addr), .out(imem_port_addr)
  );

  ideal_memory #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk, .we(imem_we), .addr(imem_port_addr), .din(imem_wdata), .dout(instr)
  );

  control u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl);

  datapath u_dp (
    .clk, .rst, .ctrl, .instr, .pc, .dmem_addr, .dmem_wdata, .dmem_rdata
  );

  ideal_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(ctrl.mem_wr), .addr(dmem_addr), .din(dmem_wdata), .dout(dmem_rdata)
  );

endmodule
