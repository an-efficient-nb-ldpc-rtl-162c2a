// dist_ram -- distributed (LUT) RAM with one synchronous write port and one asynchronous read
// port.
//
// Used for the a priori LLR memory (32 words of 80 bits, one per variable node) and for the
// 16 message memories (8 words of 80 bits each: Q and R messages of the four edges of one
// check node). The decoder keeps all its storage in logic rather than in block RAM; the
// asynchronous read is this design's choice and lets a unit read and use a word in the same
// cycle. Write: wdata is stored at waddr on the rising clock edge when we is high. Read: rdata
// shows the word at raddr combinationally (the old word if it is being written in that cycle).
// Contents are not reset: the decoder never reads a word before writing it.
module dist_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 80,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
