// tb_pn_place: random test of the place cell against a reference model of
// the token rule q' = (q & ~|t_out) | |t_in, with clear and load taking
// priority. Two input and two output transitions.
module tb_pn_place;
  logic clk = 0, rst, ld, ld_val, q;
  logic [1:0] t_in, t_out;
  logic model;
  int checks = 0, failures = 0;

  pn_place #(.N_IN(2), .N_OUT(2)) dut (.clk, .rst, .ld, .ld_val, .t_in, .t_out, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; ld_val = 0; t_in = 0; t_out = 0;
    @(posedge clk); #1;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      rst    = ($urandom_range(0, 31) == 0);
      ld     = ($urandom_range(0, 7) == 0);
      ld_val = 1'($urandom);
      t_in   = ($urandom_range(0, 2) == 0) ? 2'($urandom) : 2'b00;
      t_out  = ($urandom_range(0, 1) == 0) ? 2'($urandom) : 2'b00;
      if (rst)     model = 0;
      else if (ld) model = ld_val;
      else         model = (model & ~(|t_out)) | (|t_in);
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: q=%0b expected %0b", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
