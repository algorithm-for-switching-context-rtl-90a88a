// ctx_c2: context {t3, t4} of the example process
//   int f(int a, int b) { x = a+b; if (x<0) y = a*x; else y = x*b; return y; }
//
// Control unit: input places p2, p3 (the output places of the previous
// context, loaded through Interface In) and output place p4.
// Transitions: t3 = p2 (y := a*x), t4 = p3 (y := x*b). t3 and t4 are
// mutually exclusive, so the datapath has one multiplier whose first
// operand is multiplexed between a and b. Registers a, b, x are input data,
// y is the result (DATA_W-bit product, upper half dropped as in C int
// arithmetic).
// End of context: the IMHF keep the initial {p3,p2}; IntSw rises when
// that marking was 01 or 10 and p4 holds a token.
// Interface: as ctx_c1, with
//   input  words: 0 = {6'b0, p3, p2}, 1-2 = a, 3-4 = b, 5-6 = x
//   output words: 0 = {7'b0, p4},     1-2 = y
// Timing: with run high, t3 or t4 fires in the first cycle and int_sw is
// high from the second.
// The context contents follow the document's example; widths, byte layout,
// the shared multiplier and the run guard are this design's choices.
module ctx_c2
  import mc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  run,
  input  logic  in_we,
  input  widx_t in_addr,
  input  byte_t in_data,
  input  widx_t out_addr,
  output byte_t out_data,
  output logic  int_sw
);
  localparam int NIN = C2_NIN, NOUT = C2_NOUT;

  logic [NIN*SIZEB-1:0]  bit_we, bit_d;
  logic [NOUT*SIZEB-1:0] out_vec;

  logic p2, p3, p4;
  logic t3, t4;
  logic [DATA_W-1:0] a, b, x, y, mul_a;
  logic [1:0] imhf_p;

  ctx_if_in #(.NWORDS(NIN), .SIZEB(SIZEB), .AW(3)) u_if_in (
    .we(in_we), .addr(in_addr), .wdata(in_data), .bit_we(bit_we), .bit_d(bit_d));

  // ---- control unit ----
  pn_transition #(.N_P(1), .N_G(1)) u_t3 (.p(p2), .grd(run), .t(t3));
  pn_transition #(.N_P(1), .N_G(1)) u_t4 (.p(p3), .grd(run), .t(t4));

  pn_place #(.N_IN(1), .N_OUT(1)) u_p2 (.clk, .rst, .ld(bit_we[0]), .ld_val(bit_d[0]),
                                        .t_in(1'b0), .t_out(t3), .q(p2));
  pn_place #(.N_IN(1), .N_OUT(1)) u_p3 (.clk, .rst, .ld(bit_we[1]), .ld_val(bit_d[1]),
                                        .t_in(1'b0), .t_out(t4), .q(p3));
  pn_place #(.N_IN(2), .N_OUT(1)) u_p4 (.clk, .rst, .ld(1'b0), .ld_val(1'b0),
                                        .t_in({t3, t4}), .t_out(1'b0), .q(p4));

  // ---- datapath ----
  always_comb mul_a = t3 ? a : b;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0; b <= '0; x <= '0; y <= '0;
    end else begin
      for (int i = 0; i < DATA_W; i++) begin
        if (bit_we[8 + i])  a[i] <= bit_d[8 + i];
        if (bit_we[24 + i]) b[i] <= bit_d[24 + i];
        if (bit_we[40 + i]) x[i] <= bit_d[40 + i];
      end
      if (t3 || t4) y <= mul_a * x;
    end
  end

  // ---- end of context ----
  // pattern layout {p4, imhf_p3, imhf_p2}
  end_ctx_detect #(.N_PIN(2), .N_POUT(1), .N_MARK(2),
                   .PATTERNS({3'b110, 3'b101})) u_end (
    .clk, .rst, .imhf_ld(bit_we[1:0]), .imhf_d(bit_d[1:0]),
    .pout(p4), .imhf(imhf_p), .int_sw(int_sw));

  // ---- Interface Out ----
  assign out_vec = {y, 7'b0, p4};
  ctx_if_out #(.NWORDS(NOUT), .SIZEB(SIZEB), .AW(3)) u_if_out (
    .vec(out_vec), .addr(out_addr), .rdata(out_data));
endmodule
