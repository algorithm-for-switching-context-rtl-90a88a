// pn_place: control-unit cell for one place of the control Petri net.
//
// A place is one D flip-flop holding its token (0 or 1). The next token is
//   (q AND NOT any-output-transition-fires) OR any-input-transition-fires,
// which is one flip-flop, one AND2 and m+n-1 OR2 gates for n input and m
// output transitions, as the area estimate for a place counts them. Because
// the control net is safe, a place never receives and keeps two tokens.
// Added by this design: a synchronous clear `rst` (the context is cleared by
// FPGA configuration) and a load port `ld`/`ld_val` through which the
// context's input interface writes the initial marking.
// A place with no input (or output) transition inside its context is given
// one input tied to 0 by its parent.
// Timing: q changes on the rising clock edge after a transition fires.
module pn_place #(
  parameter int N_IN  = 1,   // input transitions (n)
  parameter int N_OUT = 1    // output transitions (m)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic             ld_val,
  input  logic [N_IN-1:0]  t_in,
  input  logic [N_OUT-1:0] t_out,
  output logic             q
);
  logic q_next;

  always_comb q_next = (q & ~(|t_out)) | (|t_in);

  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (ld) q <= ld_val;
    else         q <= q_next;
  end
endmodule
