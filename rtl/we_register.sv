// we_register: N-bit register with Write Enable, used as the program counter.
//
// Like a D flip-flop but WIDTH bits wide: on a rising clock edge q takes d
// when we is 1 and holds its value when we is 0. The synchronous,
// active-high reset that loads RESET_VALUE is an addition of this design so
// that the PC starts at a known address. q changes only at the rising edge
// (clock-to-q after it) and d must be stable a setup time before it.
module we_register #(
  parameter int unsigned     WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
