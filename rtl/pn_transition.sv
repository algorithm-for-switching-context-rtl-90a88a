// pn_transition: control-unit cell for one transition of the control net.
//
// A transition fires when every input place holds a token and every guard
// condition from the datapath is true: an AND of n places and g guards
// (n+g-1 AND2 gates). The output is the firing pulse that advances the
// places and enables the transition's datapath operation in the same cycle.
// Purely combinational.
module pn_transition #(
  parameter int N_P = 1,   // input places (n)
  parameter int N_G = 1    // guard inputs (g)
) (
  input  logic [N_P-1:0] p,
  input  logic [N_G-1:0] grd,
  output logic           t
);
  always_comb t = (&p) & (&grd);
endmodule
