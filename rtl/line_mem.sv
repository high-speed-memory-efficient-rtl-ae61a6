// line_mem: one line of the column-stage line buffer: a simple dual-port
// memory with one synchronous write port and one asynchronous read port
// (distributed RAM style), DEPTH words of WIDTH bits. Contents are not reset.
module line_mem #(
  parameter int unsigned WIDTH = 40,
  parameter int unsigned DEPTH = 252
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
