// ideal_memory: idealized word memory with one input bus and one output bus.
//
// addr is a byte address; the word it selects (addr bits above 1:0) is driven
// on dout combinationally, valid an access time after addr, with no clock
// involved. On a rising clock edge with we = 1 the addressed word takes din;
// the clock matters only for writes. The CPU uses one instance as
// instruction memory (never written) and one as data memory.
//
// Choices of this design: WORDS (1024 by default), ignoring the two low
// address bits (accesses are word-aligned), wrapping addresses above the
// array, no reset of the contents, and an optional $readmemh image INIT_FILE.
module ideal_memory #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= din;
  end

  always_comb dout = mem[idx];

endmodule
