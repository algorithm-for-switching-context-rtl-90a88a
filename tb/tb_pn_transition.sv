// tb_pn_transition: exhaustive test of the transition cell (two input
// places, two guards): it fires only when all four inputs are 1.
module tb_pn_transition;
  logic [1:0] p, grd;
  logic t;
  int checks = 0, failures = 0;

  pn_transition #(.N_P(2), .N_G(2)) dut (.p, .grd, .t);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {p, grd} = 4'(v);
      #1;
      checks++;
      if (t !== (v == 15)) begin
        failures++;
        $display("p=%b grd=%b t=%b", p, grd, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
