// ctx_if_out: Interface Out of a context.
//
// After a context has finished, the host reads its output data values and
// output-place marking word by word over the SIZEB-bit bus. This block is the
// word multiplexer: word w of the output vector is bits [w*SIZEB +: SIZEB];
// an address past the last word reads 0. Combinational (asynchronous read).
module ctx_if_out #(
  parameter int NWORDS = 3,
  parameter int SIZEB  = 8,
  parameter int AW     = 3
) (
  input  logic [NWORDS*SIZEB-1:0] vec,
  input  logic [AW-1:0]           addr,
  output logic [SIZEB-1:0]        rdata
);
  always_comb begin
    rdata = '0;
    for (int w = 0; w < NWORDS; w++)
      if (addr == AW'(w)) rdata = vec[w*SIZEB +: SIZEB];
  end
endmodule
