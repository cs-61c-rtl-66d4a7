// register_file: 32 x 32-bit register file with two read ports and one
// write port.
//
// ra selects the register driven on busa and rb the one on busb; reads are
// combinational (the outputs follow the addresses after an access time, the
// clock plays no part). On a rising clock edge with we = 1 the register
// selected by rw takes busw. A read of the register being written returns
// the old value until that edge.
//
// Register 0 always reads as zero and ignores writes, as in MIPS; that and
// the absence of a reset are choices of this design.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busw;
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
