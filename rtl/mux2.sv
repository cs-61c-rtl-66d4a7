// mux2: width-parameterised 2:1 multiplexor.
//
// out follows in1 when sel is 1 and in0 when sel is 0. Purely combinational.
// The single-cycle datapath uses three of them: RegDst (5 bits, rd on input 1,
// rt on input 0), ALUSrc (32 bits, extended immediate on input 1, busB on
// input 0) and MemtoReg (32 bits, data memory on input 1, ALU result on
// input 0); those input assignments follow the datapath drawings.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
