// tb_end_ctx_detect: random test of the IMHF and end-pattern matcher with
// the end set of context {t0,t1,t2}: IntSw exactly when the held initial
// token of p0 is 1 and {p3,p2} is 01 or 10. Also checks that the IMHF keep
// their value while the load enable is low.
module tb_end_ctx_detect;
  logic clk = 0, rst;
  logic [0:0] imhf_ld, imhf_d, imhf;
  logic [1:0] pout;
  logic int_sw;
  logic m_imhf, exp_sw;
  int checks = 0, failures = 0;

  end_ctx_detect dut (.clk, .rst, .imhf_ld, .imhf_d, .pout, .imhf, .int_sw);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; imhf_ld = 0; imhf_d = 0; pout = 0;
    @(posedge clk); #1;
    m_imhf = 0;
    for (int n = 0; n < 1000; n++) begin
      rst     = ($urandom_range(0, 31) == 0);
      imhf_ld = ($urandom_range(0, 3) == 0);
      imhf_d  = 1'($urandom);
      if (rst) m_imhf = 0;
      else if (imhf_ld[0]) m_imhf = imhf_d[0];
      @(posedge clk); #1;
      imhf_ld = 0;
      pout = 2'($urandom);
      #1;
      exp_sw = m_imhf && (pout == 2'b01 || pout == 2'b10);
      checks++;
      if (imhf[0] !== m_imhf || int_sw !== exp_sw) begin
        failures++;
        if (failures < 10) $display("n=%0d imhf=%b/%b pout=%b sw=%b/%b", n, imhf, m_imhf, pout, int_sw, exp_sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
