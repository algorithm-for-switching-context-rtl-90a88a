// ctx_if_in: Interface In of a context.
//
// The host moves a context's input data values and initial input-place
// marking into the FPGA over a SIZEB-bit bus, one word per write. This block
// decodes the word address and presents, for every bit of the context's
// input vector, a write enable and the value to write; the places, IMHF and
// datapath registers of the context load their bits directly from it, so a
// word lands in its destination flip-flops on the clock edge of the write.
// Word w covers vector bits [w*SIZEB +: SIZEB].
// The word-serial organisation follows the document's interface cost model;
// the per-bit enable style is this design's choice. Combinational.
module ctx_if_in #(
  parameter int NWORDS = 5,
  parameter int SIZEB  = 8,
  parameter int AW     = 3
) (
  input  logic                     we,
  input  logic [AW-1:0]            addr,
  input  logic [SIZEB-1:0]         wdata,
  output logic [NWORDS*SIZEB-1:0]  bit_we,
  output logic [NWORDS*SIZEB-1:0]  bit_d
);
  always_comb begin
    bit_we = '0;
    for (int w = 0; w < NWORDS; w++) begin
      bit_d[w*SIZEB +: SIZEB] = wdata;
      if (we && addr == AW'(w)) bit_we[w*SIZEB +: SIZEB] = '1;
    end
  end
endmodule
