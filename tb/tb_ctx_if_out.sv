// tb_ctx_if_out: random test of the Interface Out word multiplexer
// (3 words of 8 bits); addresses past the last word read 0.
module tb_ctx_if_out;
  logic [23:0] vec;
  logic [2:0] addr;
  logic [7:0] rdata, exp_d;
  int checks = 0, failures = 0;

  ctx_if_out #(.NWORDS(3), .SIZEB(8), .AW(3)) dut (.vec, .addr, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      vec = 24'($urandom); addr = 3'($urandom);
      #1;
      exp_d = (addr < 3) ? 8'(vec >> (8 * addr)) : 8'h00;
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        if (failures < 10) $display("vec=%h addr=%0d rdata=%h exp=%h", vec, addr, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
