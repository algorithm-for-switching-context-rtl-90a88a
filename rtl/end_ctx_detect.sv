// end_ctx_detect: end-of-context detection with Initial Marking Hold
// Flip-flops (IMHF).
//
// When a context is loaded, the marking written into its input places
// (C.P_IN) is also captured in the IMHF, which keep it for the whole
// execution while the places themselves lose their tokens. For each initial
// marking there is a known set of final markings of the output places
// (C.P_OUT) that the context always reaches, and only reaches, when it has
// finished. A combinational pattern matcher compares {P_OUT marking, IMHF}
// against the N_MARK end patterns produced by the partitioning and raises
// IntSw, the end-of-context interrupt, while one matches.
// Interface: imhf_ld is a per-bit load enable from the input interface,
// imhf_d the value; pout is the live output-place marking.
// Timing: IMHF load on the clock edge; int_sw is combinational from the
// IMHF and pout, so it rises in the cycle the final marking appears.
// The per-bit load enable and the synchronous clear are this design's.
module end_ctx_detect #(
  parameter int N_PIN  = 1,
  parameter int N_POUT = 2,
  parameter int N_MARK = 2,
  // Pattern k occupies bits [k*(N_PIN+N_POUT) +: N_PIN+N_POUT], laid out as
  // {pout, imhf}. The default is the end set of context {t0,t1,t2}:
  // p0=1 with {p3,p2} = 01 or 10.
  parameter logic [N_MARK*(N_PIN+N_POUT)-1:0] PATTERNS = {3'b101, 3'b011}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_PIN-1:0]  imhf_ld,
  input  logic [N_PIN-1:0]  imhf_d,
  input  logic [N_POUT-1:0] pout,
  output logic [N_PIN-1:0]  imhf,
  output logic              int_sw
);
  localparam int M = N_PIN + N_POUT;

  always_ff @(posedge clk) begin
    if (rst) imhf <= '0;
    else
      for (int i = 0; i < N_PIN; i++)
        if (imhf_ld[i]) imhf[i] <= imhf_d[i];
  end

  always_comb begin
    int_sw = 1'b0;
    for (int k = 0; k < N_MARK; k++)
      if ({pout, imhf} == PATTERNS[k*M +: M]) int_sw = 1'b1;
  end
endmodule
