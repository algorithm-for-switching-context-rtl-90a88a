// ctx_c1: context {t0, t1, t2} of the example process
//   int f(int a, int b) { x = a+b; if (x<0) y = a*x; else y = x*b; return y; }
//
// Control unit: places p0 (input place, loaded through Interface In), p1,
// and p2, p3 (output places). Transitions: t0 = p0 (x := a+b),
// t1 = p1 AND (x<0), t2 = p1 AND NOT (x<0). Datapath: registers a, b
// (input data, loaded through Interface In) and x with one adder.
// End of context: the IMHF keeps p0's initial token; IntSw rises when
// p0 was marked and exactly one of p2, p3 holds a token.
//
// Interface (common to all contexts of this design):
//   rst      configuration clear: every place and register to 0
//   run      global guard added to every transition; the switching
//            controller asserts it while the context executes
//   in_*     word writes into the input vector:
//              word 0 = {7'b0, p0}, words 1-2 = a (low byte first),
//              words 3-4 = b
//   out_*    word reads of the output vector:
//              word 0 = {6'b0, p3, p2}, words 1-2 = x
//   int_sw   end-of-context signal
// Timing: with run held high, t0 fires in the first cycle, t1/t2 in the
// second, and int_sw is high from the third cycle (two transition delays,
// the critical path t0 -> t1).
// The context contents and the CDFG mapping follow the document's example;
// the word widths, byte layout and run guard are this design's choices.
module ctx_c1
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
  localparam int NIN = C1_NIN, NOUT = C1_NOUT;

  logic [NIN*SIZEB-1:0]  bit_we, bit_d;
  logic [NOUT*SIZEB-1:0] out_vec;

  logic p0, p1, p2, p3;
  logic t0, t1, t2;
  logic [DATA_W-1:0] a, b, x;
  logic imhf_p0;

  ctx_if_in #(.NWORDS(NIN), .SIZEB(SIZEB), .AW(3)) u_if_in (
    .we(in_we), .addr(in_addr), .wdata(in_data), .bit_we(bit_we), .bit_d(bit_d));

  // ---- control unit ----
  pn_transition #(.N_P(1), .N_G(1)) u_t0 (.p(p0), .grd(run),             .t(t0));
  pn_transition #(.N_P(1), .N_G(2)) u_t1 (.p(p1), .grd({run,  x[DATA_W-1]}), .t(t1));
  pn_transition #(.N_P(1), .N_G(2)) u_t2 (.p(p1), .grd({run, ~x[DATA_W-1]}), .t(t2));

  pn_place #(.N_IN(1), .N_OUT(1)) u_p0 (.clk, .rst, .ld(bit_we[0]), .ld_val(bit_d[0]),
                                        .t_in(1'b0), .t_out(t0), .q(p0));
  pn_place #(.N_IN(1), .N_OUT(2)) u_p1 (.clk, .rst, .ld(1'b0), .ld_val(1'b0),
                                        .t_in(t0), .t_out({t1, t2}), .q(p1));
  pn_place #(.N_IN(1), .N_OUT(1)) u_p2 (.clk, .rst, .ld(1'b0), .ld_val(1'b0),
                                        .t_in(t1), .t_out(1'b0), .q(p2));
  pn_place #(.N_IN(1), .N_OUT(1)) u_p3 (.clk, .rst, .ld(1'b0), .ld_val(1'b0),
                                        .t_in(t2), .t_out(1'b0), .q(p3));

  // ---- datapath ----
  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0; b <= '0; x <= '0;
    end else begin
      for (int i = 0; i < DATA_W; i++) begin
        if (bit_we[8 + i])  a[i] <= bit_d[8 + i];
        if (bit_we[24 + i]) b[i] <= bit_d[24 + i];
      end
      if (t0) x <= a + b;
    end
  end

  // ---- end of context ----
  end_ctx_detect #(.N_PIN(1), .N_POUT(2), .N_MARK(2),
                   .PATTERNS({3'b101, 3'b011})) u_end (
    .clk, .rst, .imhf_ld(bit_we[0]), .imhf_d(bit_d[0]),
    .pout({p3, p2}), .imhf(imhf_p0), .int_sw(int_sw));

  // ---- Interface Out ----
  assign out_vec = {x, 6'b0, p3, p2};
  ctx_if_out #(.NWORDS(NOUT), .SIZEB(SIZEB), .AW(3)) u_if_out (
    .vec(out_vec), .addr(out_addr), .rdata(out_data));
endmodule
