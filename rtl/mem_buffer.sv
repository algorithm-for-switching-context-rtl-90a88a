// mem_buffer: memory buffer between contexts.
//
// Holds the data values and control state read out of a finished context
// until they are written into the next one, and the application's inputs and
// results. A DEPTH x SIZEB array with one synchronous write port and an
// asynchronous read port (read data follows the address in the same cycle),
// so a word can be moved between the buffer and a context every clock.
// Size and port organisation are this design's choices. Not reset: the
// host writes every location it later reads.
module mem_buffer #(
  parameter int DEPTH = 256,
  parameter int SIZEB = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [SIZEB-1:0] wdata,
  output logic [SIZEB-1:0] rdata
);
  logic [SIZEB-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
